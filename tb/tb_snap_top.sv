// tb_snap_top: end-to-end test of the whole processor at its default sizes.
// Four passes are run over randomly generated sparse IA and W windows:
//   pass 0, diagonal mode: PEs on a diagonal share an OA (P-reduce), every
//           OA is split over two chained jobs (C-reduce across jobs);
//   pass 1, row mode: the 3 PEs of a row share an OA;
//   pass 2, diagonal mode with random OA addresses, so lanes rarely agree:
//           the reducer tables overflow and evict, and flush drains them;
//   pass 3, diagonal mode on core 0 alone with near-full windows: the
//           loader runs ahead of compute, so a PE finishing a job takes
//           pairs of the next job in the same cycle (adder tree split).
// A reference model in the testbench recomputes every OA from its own copy
// of the buffer contents (dot products over matching channel indices),
// applies ReLU, shift and saturation, drops zeros, and the compressed
// output stream is compared entry by entry. The testbench also counts how
// often each mechanism happened (AIM matches, head/next splits in the adder
// tree, P-reduce merges, reducer evictions, flush with pending entries, OA
// bank conflicts, IA buffer arbitration stalls, zero removal, saturation,
// both array modes) and fails a mechanism that never occurred.
module tb_snap_top;
  import snap_pkg::*;

  localparam int CH    = 48;   // channel index range used by the windows
  localparam int K     = 8;    // OA channels per pixel
  localparam int JOBS  = 6;    // jobs per core per pass
  localparam int NPIX  = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    ia_we = 0, w_we = 0, desc_we = 0, start = 0;
  logic [IA_AW-1:0]        ia_waddr = '0;
  entry_t                  ia_wdata = '0;
  logic [CORE_W-1:0]       w_core = '0;
  logic [W_AW-1:0]         w_waddr = '0;
  entry_t                  w_wdata = '0;
  logic [$clog2(DESC_DEPTH)-1:0] desc_waddr = '0;
  job_desc_t               desc_wdata = '0;
  array_mode_e             mode = MODE_DIAG;
  logic [4:0]              shift = '0;
  logic [$clog2(DESC_DEPTH):0] n_desc = '0;
  logic [OA_AW-1:0]        oa_base = '0, n_pix = '0;
  logic [IDX_W:0]          k_ch = '0;
  logic                    busy, done, out_vld, px_done;
  entry_t                  out_entry;
  logic [IDX_W:0]          px_count;
  logic [9:0]              mult_active;
  logic [N_CORES-1:0][31:0] n_psum, n_wb, n_evict;
  logic [31:0]             n_conflict;

  snap_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- testbench copies of the buffers ----------------
  logic [N_CORES-1:0][N_PE-1:0][OA_AW-1:0] tags;
  int     vbias;   // added to generated values (positive bias forces saturation)
  int     dense;   // density override for every window, 0 = off
  entry_t ia_mem [1 << IA_AW];
  entry_t w_mem  [N_CORES][1 << W_AW];
  int     ia_ptr, w_ptr [N_CORES];
  longint ref_oa [1 << OA_AW];

  task automatic put_ia(int a, entry_t e);
    @(negedge clk); ia_we = 1; ia_waddr = IA_AW'(a); ia_wdata = e;
    @(posedge clk); #1 ia_we = 0;
    ia_mem[a] = e;
  endtask

  task automatic put_w(int c, int a, entry_t e);
    @(negedge clk); w_we = 1; w_core = CORE_W'(c); w_waddr = W_AW'(a); w_wdata = e;
    @(posedge clk); #1 w_we = 0;
    w_mem[c][a] = e;
  endtask

  // sparse channel-ordered window: each channel kept with probability pct%
  task automatic gen_seg(bit is_w, int c, int pct, output int base, output int len);
    len = 0;
    base = is_w ? w_ptr[c] : ia_ptr;
    for (int ch = 0; ch < CH && len < AIM_N; ch++) begin
      if ($urandom_range(99) < (dense != 0 ? dense : pct)) begin
        entry_t e;
        int v;
        v = $urandom_range(120) - 60 + vbias;
        if (v == 0) v = 7;
        e.idx  = IDX_W'(ch);
        e.data = DATA_W'(v);
        if (is_w) put_w(c, base + len, e);
        else      put_ia(base + len, e);
        len++;
      end
    end
    if (is_w) w_ptr[c] += len; else ia_ptr += len;
  endtask

  function automatic longint dotp(int c, int wb, int wl, int ib, int il);
    longint s = 0;
    for (int a = 0; a < wl; a++)
      for (int b = 0; b < il; b++)
        if (w_mem[c][wb+a].idx == ia_mem[ib+b].idx)
          s += longint'(w_mem[c][wb+a].data) * longint'(ia_mem[ib+b].data);
    return s;
  endfunction

  // ---------------- output capture ----------------
  entry_t got_e [$];
  int     got_cnt [$];
  always @(posedge clk) begin
    if (out_vld) got_e.push_back(out_entry);
    if (px_done) got_cnt.push_back(int'(px_count));
  end

  // ---------------- mechanism counters ----------------
  int cov_match, cov_split, cov_evict, cov_flush_pend, cov_conflict, cov_ia_stall;
  int cov_zero_drop, cov_sat, cov_preduce, cov_creduce, cov_diag, cov_row;
  longint mult_sum, active_cycles;

  for (genvar co = 0; co < N_CORES; co++) begin : g_cov_c
    for (genvar r = 0; r < PE_ROWS; r++) begin : g_cov_r
      for (genvar c = 0; c < PE_COLS; c++) begin : g_cov_p
        always @(posedge clk)
          if (dut.g_core[co].u_core.g_row[r].u_row.g_pe[c].step &&
              |(dut.g_core[co].u_core.g_row[r].u_row.g_pe[c].lane_vld &
                ~dut.g_core[co].u_core.g_row[r].u_row.g_pe[c].lane_nxt) &&
              |(dut.g_core[co].u_core.g_row[r].u_row.g_pe[c].lane_vld &
                dut.g_core[co].u_core.g_row[r].u_row.g_pe[c].lane_nxt))
            cov_split++;
      end
    end
    always @(posedge clk) begin
      if (dut.flush && !dut.g_core[co].u_core.u_red.empty) cov_flush_pend++;
      if (dut.ia_req_vld[co] && !dut.ia_req_gnt[co]) cov_ia_stall++;
    end
  end

  always @(posedge clk) begin
    if (mult_active != 0) begin
      cov_match++;
      mult_sum += longint'(mult_active);
      active_cycles++;
    end
    if (!(mult_active <= 10'(N_CORES * N_PE * N_MULT))) begin
      failures++;
      $display("FAIL: %0d multipliers active", mult_active);
    end
  end

  // ---------------- one pass ----------------
  // 0 diag, 1 row, 2 diag random tags, 3 diag with core 0 alone
  task automatic run_pass(int kind);
    int nd;
    nd = 0;
    mode = (kind == 1) ? MODE_ROW : MODE_DIAG;
    vbias = (kind == 1) ? 60 : 0;      // row pass: positive values, saturates
    dense = (kind == 0 || kind == 3) ? 97 : 0;  // near-full windows
    for (int a = 0; a < (1 << OA_AW); a++) ref_oa[a] = 0;
    for (int j = 0; j < JOBS; j++) begin
      for (int c = 0; c < (kind == 3 ? 1 : N_CORES); c++) begin
        job_desc_t d;
        int wb[PE_COLS], wl[PE_COLS], ib[N_PE], il[N_PE];
        d = '0;
        d.core = CORE_W'(c);
        for (int col = 0; col < PE_COLS; col++) begin
          // one column's window empty now and then, one nearly full
          gen_seg(1, c, (j == 1 && col == 2) ? 0 : ((j == 2 && col == 0) ? 95 : 50),
                  wb[col], wl[col]);
          d.w[col].base = W_AW'(wb[col]);
          d.w[col].len  = LEN_W'(wl[col]);
        end
        for (int p = 0; p < N_PE; p++) begin
          if (kind != 1 && p % PE_COLS != 0) begin
            ib[p] = ib[p - p % PE_COLS];
            il[p] = il[p - p % PE_COLS];
          end else
            gen_seg(0, c, 50, ib[p], il[p]);
          d.ia[p].base = IA_AW'(ib[p]);
          d.ia[p].len  = LEN_W'(il[p]);
        end
        // even jobs open an OA, odd jobs finish it (same addresses)
        if (j % 2 == 0)
          for (int p = 0; p < N_PE; p++) begin
            int i, col, pix, k;
            i = p / PE_COLS; col = p % PE_COLS;
            k = (j / 2) * 2 + (c % 2) + 4 * (c / 2 == 1 && kind == 1 ? 1 : 0);
            k = k % K;
            pix = (kind == 1) ? i : (i - col + PE_COLS - 1);
            tags[c][p] = (kind == 2) ? OA_AW'($urandom_range(NPIX * K - 1))
                                  : OA_AW'(pix * K + k);
          end
        for (int p = 0; p < N_PE; p++) begin
          d.tag[p]  = tags[c][p];
          d.last[p] = (j % 2 == 1);
        end
        for (int p = 0; p < N_PE; p++)
          ref_oa[tags[c][p]] += dotp(c, wb[p % PE_COLS], wl[p % PE_COLS], ib[p], il[p]);
        @(negedge clk);
        desc_we = 1; desc_waddr = ($clog2(DESC_DEPTH))'(nd); desc_wdata = d;
        @(negedge clk);
        desc_we = 0;
        nd++;
      end
    end
    n_desc = ($clog2(DESC_DEPTH)+1)'(nd);
    oa_base = '0;
    n_pix = OA_AW'(NPIX);
    k_ch = (IDX_W+1)'(K);
    shift = (kind == 2) ? 5'd2 : 5'd0;
    got_e.delete();
    got_cnt.delete();
    begin
      longint t0;
      int ps0, wb0, ev0;
      ps0 = 0; wb0 = 0; ev0 = 0;
      for (int c = 0; c < N_CORES; c++) begin
        ps0 += int'(n_psum[c]); wb0 += int'(n_wb[c]); ev0 += int'(n_evict[c]);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t0 = cyc;
      wait (done);
      repeat (4) @(posedge clk);
      begin
        int ps1, wb1, ev1;
        ps1 = 0; wb1 = 0; ev1 = 0;
        for (int c = 0; c < N_CORES; c++) begin
          ps1 += int'(n_psum[c]); wb1 += int'(n_wb[c]); ev1 += int'(n_evict[c]);
        end
        $display("pass %0d: %0d cycles, %0d psums from PEs, %0d writebacks, %0d evictions",
                 kind, cyc - t0, ps1 - ps0, wb1 - wb0, ev1 - ev0);
        if (kind != 2 && wb1 - wb0 < ps1 - ps0) cov_preduce++;
        cov_evict += ev1 - ev0;
        // every PE emits one psum per OA it finishes
        checks++;
        if (ps1 - ps0 != (kind == 3 ? 1 : N_CORES) * (JOBS / 2) * N_PE) begin
          failures++;
          $display("FAIL: pass %0d psum count %0d", kind, ps1 - ps0);
        end
      end
    end
    if (kind == 1) cov_row++; else cov_diag++;
    cov_creduce++;
    // compare the compressed output
    begin
      int n = 0;
      for (int p = 0; p < NPIX; p++) begin
        int cnt = 0;
        for (int k = 0; k < K; k++) begin
          longint v;
          v = ref_oa[p * K + k];
          v = (v < 0) ? 0 : (v >>> shift);
          if (v > 32767) begin v = 32767; cov_sat++; end
          if (v == 0) cov_zero_drop++;
          else begin
            checks++;
            if (n >= got_e.size() || got_e[n].idx != IDX_W'(k) ||
                got_e[n].data != DATA_W'(v)) begin
              failures++;
              if (failures < 10)
                $display("FAIL: pass %0d pixel %0d ch %0d expected %0d got idx %0d val %0d",
                         kind, p, k, v, n < got_e.size() ? got_e[n].idx : 0,
                         n < got_e.size() ? got_e[n].data : 0);
            end
            n++;
            cnt++;
          end
        end
        checks++;
        if (p >= got_cnt.size() || got_cnt[p] != cnt) begin
          failures++;
          $display("FAIL: pass %0d pixel %0d count", kind, p);
        end
      end
      checks++;
      if (got_e.size() != n) begin
        failures++;
        $display("FAIL: pass %0d %0d entries, expected %0d", kind, got_e.size(), n);
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  initial begin
    ia_ptr = 0;
    for (int c = 0; c < N_CORES; c++) w_ptr[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int kind = 0; kind < 4; kind++) run_pass(kind);
    cov_conflict = int'(n_conflict);
    $display("mechanisms:");
    need("AIM matches dispatched", cov_match);
    need("adder tree head/next split", cov_split);
    need("C-reduce across chained jobs", cov_creduce);
    need("P-reduce merges", cov_preduce);
    need("reducer overflow evictions", cov_evict);
    need("flush with pending entries", cov_flush_pend);
    need("OA buffer bank conflicts", cov_conflict);
    need("IA buffer arbitration stalls", cov_ia_stall);
    need("zero removal", cov_zero_drop);
    need("saturation", cov_sat);
    need("diagonal mode passes", cov_diag);
    need("row mode passes", cov_row);
    $display("mean busy multipliers in cycles with work: %0d.%02d of %0d",
             mult_sum / (active_cycles > 0 ? active_cycles : 1),
             (mult_sum * 100 / (active_cycles > 0 ? active_cycles : 1)) % 100,
             N_CORES * N_PE * N_MULT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
