// tb_seq_decoder: random match lists are loaded as jobs (tag = job number)
// while the decoder is stepped, sometimes with pauses. Every dispatched
// lane is logged per job. At the end each job must have dispatched exactly
// its matched rows, once each, with the right IA address, lowest row first;
// head lanes must precede next-job lanes; the next job never completes in
// the same step. Rate: a job alone in the decoder with h matches takes
// max(1, ceil(h/3)) steps (3 multipliers per cycle).
module tb_seq_decoder;
  import snap_pkg::*;
  localparam int N = AIM_N, M = N_MULT, AW = $clog2(N), NJ = 120;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load_vld = 0, load_rdy, load_last = 0, step = 0, busy;
  logic [N-1:0] load_hit = '0;
  logic [N-1:0][AW-1:0] load_addr = '0;
  logic [OA_AW-1:0] load_tag = '0, head_tag;
  logic [BANK_W-1:0] load_bank = '0, head_bank;
  logic [M-1:0] lane_vld, lane_nxt;
  logic [M-1:0][BANK_W-1:0] lane_bank;
  logic [M-1:0][AW-1:0] lane_w, lane_ia;
  logic head_done, head_last;

  seq_decoder dut (.*);

  int checks = 0, failures = 0;
  logic [N-1:0]         jmask [NJ];
  logic [N-1:0][AW-1:0] jaddr [NJ];
  logic [N-1:0]         seen  [NJ];
  int                   lastw [NJ];
  int                   steps [NJ];
  int                   done_cnt = 0, solo_checks = 0;
  bit                   solo  [NJ];


  // monitor
  always @(posedge clk) if (rst_n && step && busy) begin
    int h, nx;
    h = int'(head_tag);
    nx = h + 1;
    for (int k = 0; k < M; k++) begin
      if (k > 0 && lane_nxt[k-1] && !lane_nxt[k]) begin failures++; $display("FAIL lane order"); end
      if (lane_vld[k]) begin
        int j, w;
        j = lane_nxt[k] ? nx : h;
        w = int'(lane_w[k]);
        checks++;
        if (j >= NJ || !jmask[j][w] || seen[j][w] || jaddr[j][w] != lane_ia[k] || w <= lastw[j]) begin
          failures++;
          if (failures < 6) $display("FAIL job %0d row %0d", j, w);
        end else begin
          seen[j][w] = 1'b1;
          lastw[j] = w;
        end
      end
    end
    steps[h]++;
    if (head_done) begin
      done_cnt++;
      checks++;
      if (seen[h] != jmask[h]) begin failures++; $display("FAIL job %0d incomplete", h); end
      if (solo[h]) begin
        int hc;
        hc = $countones(jmask[h]);
        checks++;
        solo_checks++;
        if (steps[h] != ((hc == 0) ? 1 : (hc + M - 1) / M)) begin
          failures++;
          $display("FAIL job %0d: %0d steps for %0d matches", h, steps[h], hc);
        end
      end
    end
  end

  initial begin
    for (int j = 0; j < NJ; j++) begin
      int d;
      d = (j % 4 == 0) ? 0 : $urandom_range(100);
      for (int i = 0; i < N; i++) begin
        jmask[j][i] = ($urandom_range(99) < d);
        jaddr[j][i] = AW'($urandom);
      end
      seen[j] = '0; lastw[j] = -1; steps[j] = 0;
      solo[j] = (j % 5 == 0);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NJ; j++) begin
      // solo jobs: wait until the decoder is empty so the job runs alone
      if (solo[j]) while (busy) begin step = busy; @(negedge clk); end
      else @(negedge clk);
      load_vld = 1; load_hit = jmask[j]; load_addr = jaddr[j];
      load_tag = OA_AW'(j); load_last = 1'b1; load_bank = BANK_W'(j % N_WBANK);
      step = busy && (solo[j] || $urandom_range(3) != 0);
      while (!load_rdy) begin @(negedge clk); step = busy && ($urandom_range(3) != 0); end
      @(negedge clk);
      load_vld = 0;
      step = busy && ($urandom_range(3) != 0);
      // solo jobs are stepped every cycle until they finish
      if (solo[j]) begin
        step = busy;
        while (busy) begin @(negedge clk); step = busy; end
      end
    end
    while (busy) begin @(negedge clk); step = busy; end
    step = 0;
    checks++;
    if (done_cnt != NJ || solo_checks == 0) begin
      failures++;
      $display("FAIL %0d jobs done", done_cnt);
    end
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
