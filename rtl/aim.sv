// aim: associative index matching. An N x N comparator array compares the
// channel index of every compressed weight (row i) with that of every
// compressed input activation (column j) at once. A priority encoder per
// weight row then reads out the address of the lowest matching IA column,
// giving the list of weights that have a partner and where that partner is.
// Structure (comparator array + per-row priority encoders) follows the
// published design; lowest-address priority is this design's choice. Within
// one channel-ordered window an index occurs at most once, so the choice only
// matters for malformed input.
// Purely combinational: the caller registers the result (one search a cycle).
module aim import snap_pkg::*; #(
  parameter int N  = AIM_N,
  parameter int IW = IDX_W,
  localparam int AW = $clog2(N)
) (
  input  logic [N-1:0][IW-1:0] w_idx,
  input  logic [N-1:0]         w_vld,
  input  logic [N-1:0][IW-1:0] ia_idx,
  input  logic [N-1:0]         ia_vld,
  output logic [N-1:0]         hit,      // weight row i has a matching IA
  output logic [N-1:0][AW-1:0] ia_addr   // address of that IA
);

  logic [N-1:0][N-1:0] eq;  // eq[i][j]: weight i matches IA j

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        eq[i][j] = w_vld[i] & ia_vld[j] & (w_idx[i] == ia_idx[j]);
  end

  // priority encoders, lowest column first
  always_comb begin
    for (int i = 0; i < N; i++) begin
      hit[i]     = |eq[i];
      ia_addr[i] = '0;
      for (int j = N - 1; j >= 0; j--)
        if (eq[i][j]) ia_addr[i] = AW'(j);
    end
  end

endmodule
