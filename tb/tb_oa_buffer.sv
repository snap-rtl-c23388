// tb_oa_buffer: the buffer is cleared, then all 12 writeback ports send
// random accumulations (many to the same banks, so ports collide) with each
// port holding its request until accepted. At most one write per bank per
// cycle may be accepted. Afterwards every word is read back and compared
// with the sums kept here; clearing again must return zeros.
module tb_oa_buffer;
  import snap_pkg::*;
  localparam int DEPTH = 1 << OA_AW, NB = 16, NP = N_CORES * WB_PORTS, AREA = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] wr_vld = '0, wr_rdy;
  psum_t [NP-1:0] wr_ps = '0;
  logic clr = 0, clr_busy, rd_en = 0;
  logic [OA_AW-1:0] rd_addr = '0;
  logic signed [ACC_W-1:0] rd_data;
  logic [31:0] n_conflict;

  oa_buffer dut (.*);

  int checks = 0, failures = 0;
  longint ref_m [AREA];

  task automatic do_clear();
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    while (clr_busy) @(negedge clk);
  endtask

  task automatic read_all(bit zeros);
    for (int a = 0; a < AREA; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = OA_AW'(a);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data != (zeros ? 0 : ACC_W'(ref_m[a]))) begin
        failures++;
        if (failures < 6) $display("FAIL addr %0d: %0d exp %0d", a, rd_data, ref_m[a]);
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    logic [NB-1:0] banks;
    banks = '0;
    for (int p = 0; p < NP; p++)
      if (wr_vld[p] && wr_rdy[p]) begin
        checks++;
        if (banks[wr_ps[p].addr[3:0]]) begin failures++; $display("FAIL two writes to one bank"); end
        banks[wr_ps[p].addr[3:0]] = 1'b1;
        ref_m[wr_ps[p].addr] += longint'(wr_ps[p].value);
      end
  end

  initial begin
    for (int a = 0; a < AREA; a++) ref_m[a] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    do_clear();
    read_all(1);
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++)
        if (!wr_vld[p] || wr_rdy_q[p]) begin
          wr_vld[p] = ($urandom_range(3) != 0);
          wr_ps[p].addr  = OA_AW'($urandom_range(AREA - 1));
          wr_ps[p].value = ACC_W'($urandom_range(200000) - 100000);
        end
    end
    @(negedge clk);
    while (wr_vld != '0) begin
      for (int p = 0; p < NP; p++) if (wr_rdy_q[p]) wr_vld[p] = 0;
      @(negedge clk);
    end
    read_all(0);
    checks++;
    if (n_conflict == 0) failures++;
    do_clear();
    read_all(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NP-1:0] wr_rdy_q;
  always @(posedge clk) wr_rdy_q <= wr_vld & wr_rdy;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
