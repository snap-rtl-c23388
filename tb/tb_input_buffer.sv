// tb_input_buffer: the shared IA buffer configuration (4 requesters) is
// filled with random entries through the host port, then the requesters
// read random unaligned addresses, holding each request until granted.
// Each answer must arrive the cycle after the grant, to the granted
// requester only, and hold the FETCH_N entries starting at the address.
// Requesters that all ask at once must each be served within NREQ cycles
// (round robin).
module tb_input_buffer;
  import snap_pkg::*;
  localparam int DEPTH = 1 << IA_AW, NB = FETCH_N, NREQ = N_CORES, AW = IA_AW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  entry_t wr_data = '0;
  logic [NREQ-1:0] req_vld = '0, req_gnt, rsp_vld;
  logic [NREQ-1:0][AW-1:0] req_addr = '0;
  entry_t [NB-1:0] rsp_data;

  input_buffer dut (.*);

  int checks = 0, failures = 0;
  entry_t ref_mem [DEPTH];
  int     wait_cyc [NREQ];
  logic [NREQ-1:0] gnt_q;
  logic [NREQ-1:0][AW-1:0] addr_q;

  always @(posedge clk) if (rst_n) begin
    // answers for last cycle's grants
    checks++;
    if (rsp_vld != gnt_q) begin failures++; $display("FAIL rsp_vld %b exp %b", rsp_vld, gnt_q); end
    for (int r = 0; r < NREQ; r++)
      if (gnt_q[r])
        for (int k = 0; k < NB; k++) begin
          checks++;
          if (rsp_data[k] != ref_mem[(int'(addr_q[r]) + k) % DEPTH]) begin
            failures++;
            if (failures < 6) $display("FAIL req %0d addr %0d entry %0d", r, addr_q[r], k);
          end
        end
    gnt_q  <= req_gnt & req_vld;
    addr_q <= req_addr;
    checks++;
    if ($countones(req_gnt) > 1 || (req_gnt & ~req_vld) != '0) failures++;
    for (int r = 0; r < NREQ; r++) begin
      if (req_vld[r] && !req_gnt[r]) wait_cyc[r]++; else wait_cyc[r] = 0;
      if (wait_cyc[r] >= NREQ) begin failures++; $display("FAIL starvation %0d", r); end
    end
  end

  initial begin
    gnt_q = '0;
    for (int r = 0; r < NREQ; r++) wait_cyc[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 4096; a++) begin
      entry_t e;
      e = entry_t'($urandom);
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = e;
      ref_mem[a] = e;
    end
    // top of memory, for wrap-around reads
    for (int a = DEPTH - NB; a < DEPTH; a++) begin
      entry_t e;
      e = entry_t'($urandom);
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = e;
      ref_mem[a] = e;
    end
    @(negedge clk);
    wr_en = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      for (int r = 0; r < NREQ; r++)
        if (!req_vld[r] || gnt_q[r]) begin
          req_vld[r]  = (it < 200) ? 1'b1 : ($urandom_range(1) == 0);
          req_addr[r] = (it % 50 == 0) ? AW'(DEPTH - $urandom_range(NB - 1))
                                       : AW'($urandom_range(4096 - NB));
        end
    end
    @(negedge clk);
    req_vld = '0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
