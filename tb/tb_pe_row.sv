// tb_pe_row: a PE row with its shared AIM is fed jobs through the window
// banks the way the core feeds it: a free bank is filled with random
// channel-ordered W and IA windows (one pair per PE), then marked full; it
// is freed again after the three PEs have released it. Every job gives each
// PE its own OA address, so each job must produce one psum per PE equal to
// the dot product over matching channel indices, computed here.
// Timing: the AIM serves the 3 PEs one after the other, so after the first
// bank becomes full PE c's decoder must become busy c+1 cycles later.
module tb_pe_row;
  import snap_pkg::*;
  localparam int N = AIM_N, COLS = PE_COLS, NBK = N_WBANK, NJ = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NBK-1:0] bank_full = '0;
  entry_t [NBK-1:0][COLS-1:0][N-1:0] w_win, ia_win;
  logic   [NBK-1:0][COLS-1:0][N-1:0] w_vld = '0, ia_vld = '0;
  logic   [NBK-1:0][COLS-1:0][OA_AW-1:0] tag = '0;
  logic   [NBK-1:0][COLS-1:0] last = '0;
  logic [COLS-1:0] rel, out_vld, out_rdy;
  logic [COLS-1:0][BANK_W-1:0] rel_bank;
  psum_t [COLS-1:0] out_ps;
  logic busy;
  logic [COLS-1:0][1:0] mult_active;

  pe_row dut (.*);

  logic [COLS-1:0] sd_busy;
  assign sd_busy = {dut.g_pe[2].u_sd.busy, dut.g_pe[1].u_sd.busy, dut.g_pe[0].u_sd.busy};

  int checks = 0, failures = 0;
  longint exp_v [COLS][$];
  int     exp_t [COLS][$];
  int     relc [NBK];

  always @(negedge clk) out_rdy = COLS'($urandom);

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < COLS; c++) begin
      if (rel[c]) relc[rel_bank[c]]++;
      if (out_vld[c] && out_rdy[c]) begin
        checks++;
        if (exp_v[c].size() == 0 || out_ps[c].value != ACC_W'(exp_v[c][0]) ||
            out_ps[c].addr != OA_AW'(exp_t[c][0])) begin
          failures++;
          $display("FAIL PE %0d psum %0d @%0d", c, out_ps[c].value, out_ps[c].addr);
        end
        if (exp_v[c].size() != 0) begin
          void'(exp_v[c].pop_front());
          void'(exp_t[c].pop_front());
        end
      end
    end
  end

  task automatic fill(int b, int j);
    for (int c = 0; c < COLS; c++) begin
      int nw, ni, dw, di;
      longint s;
      dw = $urandom_range(100); di = $urandom_range(100);
      nw = 0; ni = 0;
      for (int ch = 0; ch < 64; ch++) begin
        if (nw < N && $urandom_range(99) < dw) begin
          w_win[b][c][nw].idx = IDX_W'(ch);
          w_win[b][c][nw].data = DATA_W'($urandom_range(65535));
          nw++;
        end
        if (ni < N && $urandom_range(99) < di) begin
          ia_win[b][c][ni].idx = IDX_W'(ch);
          ia_win[b][c][ni].data = DATA_W'($urandom_range(65535));
          ni++;
        end
      end
      for (int e = 0; e < N; e++) begin
        w_vld[b][c][e] = (e < nw);
        ia_vld[b][c][e] = (e < ni);
      end
      s = 0;
      for (int x = 0; x < nw; x++)
        for (int y = 0; y < ni; y++)
          if (w_win[b][c][x].idx == ia_win[b][c][y].idx)
            s += longint'(w_win[b][c][x].data) * longint'(ia_win[b][c][y].data);
      tag[b][c] = OA_AW'(j * COLS + c);
      last[b][c] = 1'b1;
      exp_v[c].push_back(s);
      exp_t[c].push_back(j * COLS + c);
    end
  endtask

  initial begin
    int j, b;
    for (int i = 0; i < NBK; i++) relc[i] = 0;
    w_win = '0; ia_win = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // first job alone: check the time-multiplexed search order
    @(negedge clk);
    fill(0, 0);
    bank_full[0] = 1;
    for (int t = 1; t <= COLS + 1; t++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++)
        if (t == c || t == c + 1) begin
          checks++;
          if (sd_busy[c] != (t == c + 1)) begin
            failures++;
            $display("FAIL search order: PE %0d busy %0b at cycle %0d", c, sd_busy[c], t);
          end
        end
    end
    j = 1;
    b = 1;
    while (j < NJ) begin
      @(negedge clk);
      // a freed bank stays empty for at least one cycle, as in the core
      if (!bank_full[b]) begin
        fill(b, j);
        bank_full[b] = 1;
        j++;
        b = (b + 1) % NBK;
      end
      for (int i = 0; i < NBK; i++)
        if (bank_full[i] && relc[i] == COLS) begin bank_full[i] = 0; relc[i] = 0; end
    end
    while (bank_full != '0) begin
      @(negedge clk);
      for (int i = 0; i < NBK; i++)
        if (bank_full[i] && relc[i] == COLS) begin bank_full[i] = 0; relc[i] = 0; end
    end
    repeat (10) @(posedge clk);
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (exp_v[c].size() != 0) failures++;
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
