// tb_core_reducer: 21 PE outputs present psums at random times, with the
// writeback ports randomly back-pressured. Three phases:
//   diagonal mode, each round's PEs on one diagonal share an OA address and
//   no PE runs more than one round ahead: every OA must leave as exactly
//   one writeback (P-reduce), with no eviction;
//   row mode, the same with the PEs of a row sharing an address;
//   diagonal mode with random addresses and free-running PEs: the tables
//   overflow and evict, and a final flush empties them; each eviction adds
//   exactly one writeback.
// In every phase the writebacks summed per address must equal the sum of
// the psums sent to that address.
module tb_core_reducer;
  import snap_pkg::*;
  localparam int WB = WB_PORTS, ROUNDS = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  array_mode_e mode = MODE_DIAG;
  logic flush = 0, empty, quiet;
  logic [N_PE-1:0] in_vld = '0, in_rdy;
  psum_t [N_PE-1:0] in_ps = '0;
  logic [WB-1:0] out_vld, out_rdy;
  psum_t [WB-1:0] out_ps;
  logic [31:0] n_in, n_out, n_evict;

  core_reducer dut (.*);

  int checks = 0, failures = 0;
  longint sent [1 << OA_AW];
  longint got  [1 << OA_AW];
  bit     used [1 << OA_AW];
  int     round_of [N_PE];
  psum_t  q [N_PE][$];

  always @(negedge clk) out_rdy = WB'($urandom);

  always @(posedge clk) if (rst_n)
    for (int w = 0; w < WB; w++)
      if (out_vld[w] && out_rdy[w]) got[out_ps[w].addr] += longint'(out_ps[w].value);

  task automatic run_phase(int ph);
    int out0, ev0, distinct, minr;
    bit skew_limit;
    out0 = int'(n_out); ev0 = int'(n_evict);
    distinct = 0;
    skew_limit = (ph != 2);
    mode = (ph == 1) ? MODE_ROW : MODE_DIAG;
    for (int a = 0; a < (1 << OA_AW); a++) begin sent[a] = 0; got[a] = 0; used[a] = 0; end
    for (int p = 0; p < N_PE; p++) begin
      round_of[p] = 0;
      for (int r = 0; r < ROUNDS; r++) begin
        psum_t e;
        e.addr = (ph == 2) ? OA_AW'($urandom_range(200)) : OA_AW'(r * 16 + lane_of(p, mode));
        e.value = ACC_W'($urandom_range(2000000) - 1000000);
        sent[e.addr] += longint'(e.value);
        if (!used[e.addr]) distinct++;
        used[e.addr] = 1;
        q[p].push_back(e);
      end
    end
    // drive
    while (1) begin
      bit all_done;
      @(negedge clk);
      minr = ROUNDS;
      for (int p = 0; p < N_PE; p++) if (round_of[p] < minr) minr = round_of[p];
      all_done = 1;
      for (int p = 0; p < N_PE; p++) begin
        if (q[p].size() != 0) all_done = 0;
        if (!in_vld[p] && q[p].size() != 0 && $urandom_range(2) == 0 &&
            (!skew_limit || round_of[p] <= minr)) begin
          in_vld[p] = 1;
          in_ps[p]  = q[p].pop_front();
          round_of[p]++;
        end
      end
      if (all_done && in_vld == '0) break;
      @(posedge clk);
      #1;
      for (int p = 0; p < N_PE; p++) if (in_rdy_q[p]) in_vld[p] = 0;
    end
    if (ph == 2) begin
      @(negedge clk); flush = 1;
      @(negedge clk); flush = 0;
    end
    while (!empty) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int a = 0; a < (1 << OA_AW); a++)
      if (used[a]) begin
        checks++;
        if (got[a] != sent[a]) begin
          failures++;
          if (failures < 6) $display("FAIL phase %0d addr %0d: got %0d sent %0d", ph, a, got[a], sent[a]);
        end
      end
    checks++;
    if (ph != 2 && (int'(n_out) - out0 != distinct || int'(n_evict) != ev0)) begin
      failures++;
      $display("FAIL phase %0d: %0d writebacks for %0d OAs, %0d evictions", ph,
               int'(n_out) - out0, distinct, int'(n_evict) - ev0);
    end
    if (ph == 2) begin
      checks++;
      if (int'(n_evict) == ev0) begin failures++; $display("FAIL no eviction"); end
    end
    $display("phase %0d: %0d psums, %0d writebacks, %0d evictions", ph, N_PE * ROUNDS,
             int'(n_out) - out0, int'(n_evict) - ev0);
  endtask

  // capture in_rdy at the clock edge
  logic [N_PE-1:0] in_rdy_q;
  always @(posedge clk) in_rdy_q <= in_vld & in_rdy;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 3; ph++) run_phase(ph);
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
