// tb_snap_ctrl: the controller runs two passes against simple models of the
// cores (accept a descriptor when ready, then stay busy a random time) and
// of the OA buffer (clear takes a few cycles, reads return a known function
// of the address one cycle later). Checked: the OA buffer is cleared before
// the first descriptor goes out; descriptors reach the core they name, in
// memory order, unchanged; flush comes only when all were issued and every
// core is idle; the drain walks oa_base + p*k_ch + k with channel index k
// and the pixel-end flag at k = k_ch-1; done rises after the drain.
module tb_snap_ctrl;
  import snap_pkg::*;
  localparam int DAW = $clog2(DESC_DEPTH);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic desc_we = 0, start = 0;
  logic [DAW-1:0] desc_waddr = '0;
  job_desc_t desc_wdata = '0, core_desc;
  logic [DAW:0] n_desc = '0;
  logic [OA_AW-1:0] oa_base = '0, n_pix = '0, oa_rd_addr;
  logic [IDX_W:0] k_ch = '0;
  logic [N_CORES-1:0] core_desc_vld, core_desc_rdy, core_idle;
  logic flush, oa_clr, oa_clr_busy, oa_rd_en, cmp_vld, cmp_last, busy, done;
  logic [IDX_W-1:0] cmp_idx;

  snap_ctrl dut (.*);

  int checks = 0, failures = 0;
  job_desc_t dm [DESC_DEPTH];
  int  next_exp, core_busy [N_CORES], clr_cnt, issued, flushes, drained;
  bit  cleared;
  int  exp_pix, exp_ch;
  logic [OA_AW-1:0] rd_q;
  logic rd_q_vld;

  // core models
  always @(negedge clk)
    for (int c = 0; c < N_CORES; c++) core_desc_rdy[c] = (core_busy[c] == 0) && ($urandom_range(2) != 0);
  always_comb for (int c = 0; c < N_CORES; c++) core_idle[c] = (core_busy[c] == 0);

  // OA buffer model
  assign oa_clr_busy = (clr_cnt != 0);

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N_CORES; c++) if (core_busy[c] > 0) core_busy[c]--;
    if (clr_cnt > 0) clr_cnt--;
    if (oa_clr) begin clr_cnt = 5; cleared = 1; end
    // descriptors
    checks++;
    if ($countones(core_desc_vld) > 1) failures++;
    for (int c = 0; c < N_CORES; c++)
      if (core_desc_vld[c] && core_desc_rdy[c]) begin
        checks++;
        if (!cleared || oa_clr_busy || core_desc != dm[next_exp] || int'(core_desc.core) != c) begin
          failures++;
          $display("FAIL descriptor %0d to core %0d", next_exp, c);
        end
        next_exp++;
        issued++;
        core_busy[c] = $urandom_range(30);
      end
    if (flush) begin
      checks++;
      flushes++;
      if (issued != int'(n_desc) || core_idle != '1) begin failures++; $display("FAIL early flush"); end
    end
    // drain: compressor inputs line up with the read one cycle earlier
    if (cmp_vld) begin
      checks++;
      if (!rd_q_vld || rd_q != oa_base + OA_AW'(exp_pix * int'(k_ch) + exp_ch) ||
          cmp_idx != IDX_W'(exp_ch) || cmp_last != (exp_ch == int'(k_ch) - 1) || flushes == 0) begin
        failures++;
        if (failures < 6) $display("FAIL drain p %0d k %0d: addr %0d idx %0d last %0b",
                                   exp_pix, exp_ch, rd_q, cmp_idx, cmp_last);
      end
      drained++;
      if (exp_ch == int'(k_ch) - 1) begin exp_ch = 0; exp_pix++; end else exp_ch++;
    end
    rd_q <= oa_rd_addr;
    rd_q_vld <= oa_rd_en;
  end

  task automatic pass(int nd, int base, int np, int kc);
    for (int i = 0; i < nd; i++) begin
      job_desc_t d;
      d = '0;
      for (int b = 0; b < $bits(job_desc_t) / 32 + 1; b++) d = (d << 32) | job_desc_t'($urandom);
      dm[i] = d;
      @(negedge clk);
      desc_we = 1; desc_waddr = DAW'(i); desc_wdata = d;
    end
    @(negedge clk);
    desc_we = 0;
    n_desc = (DAW+1)'(nd); oa_base = OA_AW'(base); n_pix = OA_AW'(np); k_ch = (IDX_W+1)'(kc);
    next_exp = 0; issued = 0; flushes = 0; drained = 0; exp_pix = 0; exp_ch = 0; cleared = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (issued != nd || flushes != 1 || drained != np * kc || busy) begin
      failures++;
      $display("FAIL pass: issued %0d flushes %0d drained %0d", issued, flushes, drained);
    end
  endtask

  initial begin
    clr_cnt = 0; cleared = 0; rd_q_vld = 0;
    for (int c = 0; c < N_CORES; c++) core_busy[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    pass(20, 100, 5, 7);
    pass(DESC_DEPTH, 0, 9, 8);
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
