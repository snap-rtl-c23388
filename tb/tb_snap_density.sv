// tb_snap_density: runs one 3x3 convolution tile on the whole processor at
// its default sizes, at the three W/IA densities of the standard sparsity
// benchmarks: dense (100%/100%), medium (40%/40%) and sparse (10%/10%).
// Each pass uses the diagonal configuration on all 4 cores: consecutive
// pixels on consecutive PE rows, the three 3x1 kernel column slices on the
// three PE columns, and two chained jobs per OA (C-reduce across jobs).
// One window covers 3200/density input channels (32, 80 and 320), so that
// a compressed window holds about 32 nonzeros at every density, as in a
// channel-first compressed stream. Nonzero values are kept with the given
// probability per channel, for W and IA independently.
// Checks: the compressed output stream against a reference computed in the
// testbench (dot products over matching indices, ReLU, shift, saturation,
// zero removal), the number of final psums, and that the multiply-
// accumulates the array performed (sum of busy multipliers over the pass)
// equal the number of matching W/IA pairs in the reference, so no pair is
// lost or computed twice. It prints cycles, effectual multiply-accumulates
// per cycle and the multiplier utilisation over the compute span (first to
// last cycle with a busy multiplier) for each density.
module tb_snap_density;
  import snap_pkg::*;

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
  int     vbias;   // added to generated values (positive bias forces saturation)
  int     ch_range;  // input channels covered by one window
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
    for (int ch = 0; ch < ch_range && len < AIM_N; ch++) begin
      if ($urandom_range(99) < pct) begin
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

  longint mult_sum, first_act, last_act;
  always @(posedge clk) begin
    mult_sum += longint'(mult_active);
    if (mult_active != 0) begin
      if (first_act < 0) first_act = cyc;
      last_act = cyc;
    end
  end

  function automatic longint npairs(int c, int wb, int wl, int ib, int il);
    longint s = 0;
    for (int a = 0; a < wl; a++)
      for (int b = 0; b < il; b++)
        if (w_mem[c][wb+a].idx == ia_mem[ib+b].idx) s++;
    return s;
  endfunction

  task automatic run_density(int pct, string name);
    int nd;
    longint pairs, t0, m0, ncyc, macs;
    int ps0, ps1;
    nd = 0;
    pairs = 0;
    // a compressed window holds about 32 nonzeros whatever the density
    ch_range = 3200 / pct;
    mode = MODE_DIAG;
    vbias = 0;
    ia_ptr = 0;
    for (int c = 0; c < N_CORES; c++) w_ptr[c] = 0;
    for (int a = 0; a < (1 << OA_AW); a++) ref_oa[a] = 0;
    for (int j = 0; j < JOBS; j++) begin
      for (int c = 0; c < N_CORES; c++) begin
        job_desc_t d;
        int wb[PE_COLS], wl[PE_COLS], ib[N_PE], il[N_PE];
        d = '0;
        d.core = CORE_W'(c);
        for (int col = 0; col < PE_COLS; col++) begin
          gen_seg(1, c, pct, wb[col], wl[col]);
          d.w[col].base = W_AW'(wb[col]);
          d.w[col].len  = LEN_W'(wl[col]);
        end
        for (int p = 0; p < N_PE; p++) begin
          if (p % PE_COLS != 0) begin
            ib[p] = ib[p - p % PE_COLS];
            il[p] = il[p - p % PE_COLS];
          end else
            gen_seg(0, c, pct, ib[p], il[p]);
          d.ia[p].base = IA_AW'(ib[p]);
          d.ia[p].len  = LEN_W'(il[p]);
        end
        for (int p = 0; p < N_PE; p++) begin
          int i, col, k;
          i = p / PE_COLS; col = p % PE_COLS;
          k = ((j / 2) * N_CORES + c) % K;
          d.tag[p]  = OA_AW'((i - col + PE_COLS - 1) * K + k);
          d.last[p] = (j % 2 == 1);
          ref_oa[d.tag[p]] += dotp(c, wb[col], wl[col], ib[p], il[p]);
          pairs += npairs(c, wb[col], wl[col], ib[p], il[p]);
        end
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
    shift = 5'd4;
    got_e.delete();
    got_cnt.delete();
    ps0 = 0;
    for (int c = 0; c < N_CORES; c++) ps0 += int'(n_psum[c]);
    @(negedge clk); start = 1;
    m0 = mult_sum;
    t0 = cyc;
    first_act = -1;
    last_act = 0;
    @(negedge clk); start = 0;
    wait (done);
    repeat (4) @(posedge clk);
    macs = mult_sum - m0;
    // compute span: first to last cycle with a busy multiplier (the OA
    // buffer clear before it and the drain after it are excluded)
    ncyc = (first_act < 0) ? 1 : last_act - first_act + 1;
    ps1 = 0;
    for (int c = 0; c < N_CORES; c++) ps1 += int'(n_psum[c]);
    $display("%-6s density %3d%%: pass %0d cycles, compute span %0d cycles, %0d effectual MACs, %0d.%02d MACs/cycle, utilisation %0d%% of %0d multipliers",
             name, pct, cyc - t0, ncyc, macs, macs / ncyc, (macs * 100 / ncyc) % 100,
             macs * 100 / (ncyc * N_CORES * N_PE * N_MULT), N_CORES * N_PE * N_MULT);
    checks++;
    if (macs != pairs) begin
      failures++;
      $display("FAIL: %s: %0d multiplies performed, %0d matching pairs", name, macs, pairs);
    end
    checks++;
    if (ps1 - ps0 != N_CORES * (JOBS / 2) * N_PE) begin
      failures++;
      $display("FAIL: %s: psum count %0d", name, ps1 - ps0);
    end
    begin
      int n = 0;
      for (int p = 0; p < NPIX; p++) begin
        int cnt = 0;
        for (int k = 0; k < K; k++) begin
          longint v;
          v = ref_oa[p * K + k];
          v = (v < 0) ? 0 : (v >>> shift);
          if (v > 32767) v = 32767;
          if (v != 0) begin
            checks++;
            if (n >= got_e.size() || got_e[n].idx != IDX_W'(k) ||
                got_e[n].data != DATA_W'(v)) begin
              failures++;
              if (failures < 10)
                $display("FAIL: %s pixel %0d ch %0d expected %0d", name, p, k, v);
            end
            n++;
            cnt++;
          end
        end
        checks++;
        if (p >= got_cnt.size() || got_cnt[p] != cnt) begin
          failures++;
          $display("FAIL: %s pixel %0d count", name, p);
        end
      end
      checks++;
      if (got_e.size() != n) begin
        failures++;
        $display("FAIL: %s: %0d entries, expected %0d", name, got_e.size(), n);
      end
    end
  endtask

  initial begin
    mult_sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_density(100, "dense");
    run_density(40, "medium");
    run_density(10, "sparse");
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
