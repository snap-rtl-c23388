// tb_snap_core: one core with its own IA and W buffers. Random
// channel-ordered windows are written into the buffers, and jobs are
// handed to the core in diagonal mode (IA window per row, OA address per
// diagonal) and then in row mode (IA window per PE, OA address per row),
// each OA chained over two jobs. Writebacks are summed per address, a flush
// empties the reducer at the end of each mode, and the sums are compared
// with dot products computed here from the buffer contents. Also checked:
// never more than 63 multipliers busy (21 PEs x 3), the loader fills a
// bank while others are full (load overlaps compute), and in diagonal mode
// fewer writebacks leave than psums arrive (P-reduce).
module tb_snap_core;
  import snap_pkg::*;
  localparam int NJ = 6, CH = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  array_mode_e mode = MODE_DIAG;
  logic flush = 0, desc_vld = 0, desc_rdy;
  job_desc_t desc = '0;
  logic ia_req_vld, ia_req_gnt, ia_rsp_vld, w_req_vld, w_req_gnt, w_rsp_vld;
  logic [IA_AW-1:0] ia_req_addr;
  logic [W_AW-1:0] w_req_addr;
  entry_t [FETCH_N-1:0] ia_rsp_data, w_rsp_data;
  logic [WB_PORTS-1:0] wb_vld, wb_rdy;
  psum_t [WB_PORTS-1:0] wb_ps;
  logic idle;
  logic [7:0] mult_active;
  logic [31:0] n_psum, n_wb, n_evict;
  logic ia_we = 0, w_we = 0;
  logic [IA_AW-1:0] ia_waddr = '0;
  logic [W_AW-1:0] w_waddr = '0;
  entry_t ia_wdata = '0, w_wdata = '0;

  input_buffer #(.DEPTH(1 << IA_AW), .NREQ(1)) u_ia (
    .clk, .rst_n, .wr_en(ia_we), .wr_addr(ia_waddr), .wr_data(ia_wdata),
    .req_vld(ia_req_vld), .req_addr(ia_req_addr), .req_gnt(ia_req_gnt),
    .rsp_vld(ia_rsp_vld), .rsp_data(ia_rsp_data));
  input_buffer #(.DEPTH(1 << W_AW), .NREQ(1)) u_w (
    .clk, .rst_n, .wr_en(w_we), .wr_addr(w_waddr), .wr_data(w_wdata),
    .req_vld(w_req_vld), .req_addr(w_req_addr), .req_gnt(w_req_gnt),
    .rsp_vld(w_rsp_vld), .rsp_data(w_rsp_data));

  snap_core dut (.*);

  int checks = 0, failures = 0, overlap = 0;
  entry_t ia_mem [1 << IA_AW];
  entry_t w_mem  [1 << W_AW];
  int ia_ptr = 0, w_ptr = 0;
  longint ref_oa [1024], got [1024];

  always @(negedge clk) wb_rdy = WB_PORTS'($urandom);
  always @(posedge clk) if (rst_n) begin
    for (int w = 0; w < WB_PORTS; w++)
      if (wb_vld[w] && wb_rdy[w]) got[wb_ps[w].addr] += longint'(wb_ps[w].value);
    if ($countones(dut.bank_full) >= 2 && dut.busy_l) overlap++;
    if (mult_active > 8'(N_PE * N_MULT)) begin failures++; $display("FAIL mult_active"); end
  end

  task automatic gen_seg(bit is_w, output int base, output int len);
    len = 0;
    base = is_w ? w_ptr : ia_ptr;
    for (int ch = 0; ch < CH && len < AIM_N; ch++)
      if ($urandom_range(99) < 70) begin
        entry_t e;
        e.idx = IDX_W'(ch);
        e.data = DATA_W'($urandom_range(200) - 100);
        @(negedge clk);
        if (is_w) begin w_we = 1; w_waddr = W_AW'(base + len); w_wdata = e; w_mem[base + len] = e; end
        else begin ia_we = 1; ia_waddr = IA_AW'(base + len); ia_wdata = e; ia_mem[base + len] = e; end
        @(posedge clk); #1 w_we = 0; ia_we = 0;
        len++;
      end
    if (is_w) w_ptr += len; else ia_ptr += len;
  endtask

  task automatic run_mode(array_mode_e m);
    int ps0, wb0;
    job_desc_t jobs [NJ];
    mode = m;
    ps0 = int'(n_psum); wb0 = int'(n_wb);
    for (int a = 0; a < 1024; a++) begin ref_oa[a] = 0; got[a] = 0; end
    for (int j = 0; j < NJ; j++) begin
      int wb[PE_COLS], wl[PE_COLS], ib[N_PE], il[N_PE];
      job_desc_t d;
      d = '0;
      for (int c = 0; c < PE_COLS; c++) begin
        gen_seg(1, wb[c], wl[c]);
        d.w[c].base = W_AW'(wb[c]); d.w[c].len = LEN_W'(wl[c]);
      end
      for (int p = 0; p < N_PE; p++) begin
        if (m == MODE_DIAG && p % PE_COLS != 0) begin ib[p] = ib[p - p % PE_COLS]; il[p] = il[p - p % PE_COLS]; end
        else gen_seg(0, ib[p], il[p]);
        d.ia[p].base = IA_AW'(ib[p]); d.ia[p].len = LEN_W'(il[p]);
        d.tag[p] = OA_AW'((j / 2) * 16 + lane_of(p, m));
        d.last[p] = (j % 2 == 1);
        for (int x = 0; x < wl[p % PE_COLS]; x++)
          for (int y = 0; y < il[p]; y++)
            if (w_mem[wb[p % PE_COLS] + x].idx == ia_mem[ib[p] + y].idx)
              ref_oa[d.tag[p]] += longint'(w_mem[wb[p % PE_COLS] + x].data) * longint'(ia_mem[ib[p] + y].data);
      end
      jobs[j] = d;
    end
    for (int j = 0; j < NJ; j++) begin
      @(negedge clk);
      desc_vld = 1; desc = jobs[j];
      while (!desc_rdy) @(negedge clk);
      @(posedge clk); #1 desc_vld = 0;
    end
    repeat (5) @(negedge clk);
    while (!idle) @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    repeat (5) @(negedge clk);
    while (!idle || wb_vld != '0) @(negedge clk);
    for (int a = 0; a < 1024; a++)
      if (ref_oa[a] != 0 || got[a] != 0) begin
        checks++;
        if (got[a] != ref_oa[a]) begin
          failures++;
          if (failures < 6) $display("FAIL mode %0d addr %0d: %0d exp %0d", m, a, got[a], ref_oa[a]);
        end
      end
    checks++;
    if (int'(n_psum) - ps0 != (NJ / 2) * N_PE) begin failures++; $display("FAIL psum count"); end
    $display("mode %0d: %0d psums, %0d writebacks", m, int'(n_psum) - ps0, int'(n_wb) - wb0);
    if (m == MODE_DIAG) begin
      checks++;
      if (int'(n_wb) - wb0 >= int'(n_psum) - ps0) begin failures++; $display("FAIL no P-reduce"); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_mode(MODE_DIAG);
    run_mode(MODE_ROW);
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL load never overlapped compute"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
