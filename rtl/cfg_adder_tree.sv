// cfg_adder_tree: the configurable adder tree behind a PE's three
// multipliers. Two break bits split the three products into groups of
// adjacent lanes that belong to the same output activation:
//   brk = 2'b00 : p0+p1+p2            (3:1 channel reduce, the common case)
//   brk = 2'b01 : p0 | p1+p2          (OA changes after lane 0)
//   brk = 2'b10 : p0+p1 | p2          (OA changes after lane 1)
//   brk = 2'b11 : p0 | p1 | p2        (three different OAs)
// brk[0] breaks between lanes 0 and 1, brk[1] between lanes 1 and 2. The sum
// of each group appears at the output of the group's first lane and
// grp_vld marks which outputs start a group. Two adders: p1+p2 (gated by
// brk[1]) feeds p0 + (that sum, gated by brk[0]). The published design names
// the tree and the cases it supports; the two-adder arrangement is this
// design's. Combinational.
module cfg_adder_tree import snap_pkg::*; #(
  parameter int W = ACC_W
) (
  input  logic signed [2:0][W-1:0] p,
  input  logic        [1:0]        brk,
  output logic signed [2:0][W-1:0] s,
  output logic        [2:0]        grp_vld
);

  logic signed [W-1:0] sum12;

  always_comb begin
    sum12 = p[1] + (brk[1] ? W'(0) : p[2]);
    s[0]  = p[0] + (brk[0] ? W'(0) : sum12);
    s[1]  = sum12;
    s[2]  = p[2];
    grp_vld = {brk[1], brk[0], 1'b1};
  end

endmodule
