// pe: processing element. Three 16-bit multipliers take the W-IA pairs the
// sequence decoder dispatches (up to 3 a cycle); the configurable adder tree
// sums the products that belong to the same output activation, and the PE
// keeps the running psum of its current OA in an accumulator until the job
// that ends that OA's channel reduction finishes (C-reduce). Only then is the
// final psum, with its OA address, offered to the core reducer.
// Lanes flagged nxt belong to the job after the head (the OA address moved
// on), so the tree is split at the head/next boundary; the head group is
// added to the accumulator and the next group starts the following OA.
// If the head finishes without being the last job of its OA, the next job
// continues the same OA and both groups are added.
// The three multipliers, the tree and retention until C-reduce completes
// follow the published design; accumulator width and the valid/ready output
// are this design's choices.
// Timing: step is the sequence decoder's step; the multiply, the tree and
// the accumulate happen in the same cycle. ready is high when the output
// register can take a psum, and the PE must not step otherwise. out_* is a
// valid/ready register.
module pe import snap_pkg::*; #(
  parameter int M     = N_MULT,
  parameter int TAG_W = OA_AW
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            step,
  input  logic [M-1:0]                    lane_vld,
  input  logic [M-1:0]                    lane_nxt,
  input  logic signed [M-1:0][DATA_W-1:0] w_data,
  input  logic signed [M-1:0][DATA_W-1:0] ia_data,
  input  logic                            head_done,
  input  logic                            head_last,
  input  logic [TAG_W-1:0]                head_tag,
  output logic                            ready,
  output logic                            out_vld,
  input  logic                            out_rdy,
  output psum_t                           out_ps
);

  logic signed [2:0][ACC_W-1:0] prod, s;
  logic [1:0]                   brk;
  logic [2:0]                   grp_vld;
  logic signed [ACC_W-1:0]      acc, head_sum, next_sum, acc_head;

  always_comb begin
    for (int k = 0; k < 3; k++)
      prod[k] = (k < M && lane_vld[k]) ? ACC_W'($signed(w_data[k]) * $signed(ia_data[k])) : '0;
    brk[0] = lane_nxt[0] ^ lane_nxt[1];
    brk[1] = lane_nxt[1] ^ lane_nxt[2];
  end

  cfg_adder_tree #(.W(ACC_W)) u_tree (.p(prod), .brk(brk), .s(s), .grp_vld(grp_vld));

  // head lanes come first, next-job lanes after them
  always_comb begin
    head_sum = lane_nxt[0] ? '0 : s[0];
    if (lane_nxt[0])      next_sum = s[0];
    else if (grp_vld[1])  next_sum = s[1];
    else if (grp_vld[2])  next_sum = s[2];
    else                  next_sum = '0;
    acc_head = acc + head_sum;
  end

  assign ready = !out_vld || out_rdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      out_vld <= 1'b0;
      out_ps  <= '0;
    end else begin
      if (out_vld && out_rdy) out_vld <= 1'b0;
      if (step) begin
        if (head_done && head_last) begin
          out_vld      <= 1'b1;
          out_ps.addr  <= head_tag;
          out_ps.value <= acc_head;
          acc          <= next_sum;
        end else if (head_done) begin
          acc <= acc_head + next_sum;
        end else begin
          acc <= acc_head;
        end
      end
    end
  end

  a_step_ready: assert property (@(posedge clk) disable iff (!rst_n) step |-> ready);

endmodule
