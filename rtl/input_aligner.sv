// input_aligner: puts the words read from a multi-banked buffer back into
// entry order. A read of NB consecutive entries starting at address a finds
// entry a+k in bank (a+k) mod NB, so the bank outputs are rotated by
// a mod NB: out[k] = bank[(off + k) mod NB]. The published design states that
// inputs are aligned after fetch; the rotator is this design's realisation.
// Combinational.
module input_aligner import snap_pkg::*; #(
  parameter int NB = FETCH_N,
  localparam int OW = $clog2(NB)
) (
  input  entry_t [NB-1:0] bank_data,
  input  logic   [OW-1:0] off,
  output entry_t [NB-1:0] aligned
);

  always_comb
    for (int k = 0; k < NB; k++)
      aligned[k] = bank_data[OW'(off + OW'(k))];

endmodule
