// seq_decoder: sequence decoder between the AIM and one PE's multipliers.
// It holds the AIM results of up to two jobs (the job being worked on, the
// head, and the one after it) as a bit mask of matched weight rows plus the
// IA address of each row's partner. Every step it hands the M lowest
// remaining matches to the M multiplier lanes as (weight address, IA
// address) pairs and clears them from the mask.
// When the head has fewer than M matches left it finishes in this step
// (head_done) and the free lanes are filled from the next job, whose
// products then belong to a different OA: this is the case the PE's adder
// tree splits. A lane taken from the next job is flagged lane_nxt. The next
// job is never finished in the same step (at least one match stays), so at
// most one job completes per step. A job with no match at all finishes in a
// step of its own with no lane valid.
// The published design gives the decoder's purpose (locate the addresses of
// matched pairs for dispatch); the two-job queue and the lane-filling rule
// are this design's.
// Timing: load and step act at the clock edge; lane outputs are
// combinational from the queue registers. step must only be asserted while
// busy.
module seq_decoder import snap_pkg::*; #(
  parameter int N     = AIM_N,
  parameter int M     = N_MULT,
  parameter int TAG_W = OA_AW,
  parameter int BW    = BANK_W,
  localparam int AW   = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the AIM
  input  logic                load_vld,
  output logic                load_rdy,
  input  logic [N-1:0]        load_hit,
  input  logic [N-1:0][AW-1:0] load_addr,
  input  logic [TAG_W-1:0]    load_tag,
  input  logic                load_last,
  input  logic [BW-1:0]       load_bank,
  // dispatch
  input  logic                step,
  output logic                busy,
  output logic [M-1:0]        lane_vld,
  output logic [M-1:0]        lane_nxt,
  output logic [M-1:0][BW-1:0] lane_bank,
  output logic [M-1:0][AW-1:0] lane_w,
  output logic [M-1:0][AW-1:0] lane_ia,
  output logic                head_done,
  output logic                head_last,
  output logic [TAG_W-1:0]    head_tag,
  output logic [BW-1:0]       head_bank
);

  typedef struct packed {
    logic [N-1:0]         mask;
    logic [N-1:0][AW-1:0] addr;
    logic [TAG_W-1:0]     tag;
    logic                 last;
    logic [BW-1:0]        bank;
  } job_t;

  job_t       q [2];
  logic [1:0] cnt;
  logic [N-1:0] m0_next, m1_next;

  assign busy      = (cnt != 0);
  assign load_rdy  = (cnt < 2);
  assign head_last = q[0].last;
  assign head_tag  = q[0].tag;
  assign head_bank = q[0].bank;

  always_comb begin
    logic [N-1:0] m0, m1;
    logic         found;
    int           b;
    m0 = q[0].mask;
    m1 = q[1].mask;
    lane_vld  = '0;
    lane_nxt  = '0;
    lane_bank = '0;
    lane_w    = '0;
    lane_ia   = '0;
    for (int k = 0; k < M; k++) begin
      // lowest remaining match of the head
      found = 1'b0;
      b = 0;
      for (int i = N - 1; i >= 0; i--)
        if (m0[i]) begin found = 1'b1; b = i; end
      if (found) begin
        lane_vld[k]  = 1'b1;
        lane_bank[k] = q[0].bank;
        lane_w[k]    = AW'(b);
        lane_ia[k]   = q[0].addr[b];
        m0[b]        = 1'b0;
      end else begin
        lane_nxt[k] = 1'b1;
        if (cnt == 2) begin
          found = 1'b0;
          b = 0;
          for (int i = N - 1; i >= 0; i--)
            if (m1[i]) begin found = 1'b1; b = i; end
          // keep at least one match so the next job does not also finish
          if (found && ((m1 & ~(N'(1) << b)) != '0)) begin
            lane_vld[k]  = 1'b1;
            lane_bank[k] = q[1].bank;
            lane_w[k]    = AW'(b);
            lane_ia[k]   = q[1].addr[b];
            m1[b]        = 1'b0;
          end
        end
      end
    end
    head_done = busy && (m0 == '0);
    m0_next   = m0;
    m1_next   = m1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      q[0] <= '0;
      q[1] <= '0;
    end else begin
      job_t       nq [2];
      logic [1:0] ncnt;
      nq[0] = q[0];
      nq[1] = q[1];
      ncnt  = cnt;
      if (step && busy) begin
        if (head_done) begin
          nq[0]      = q[1];
          nq[0].mask = m1_next;
          ncnt       = cnt - 1'b1;
        end else begin
          nq[0].mask = m0_next;
        end
      end
      if (load_vld && load_rdy) begin
        job_t j;
        j.mask = load_hit;
        j.addr = load_addr;
        j.tag  = load_tag;
        j.last = load_last;
        j.bank = load_bank;
        if (ncnt == 0) nq[0] = j;
        else           nq[1] = j;
        ncnt = ncnt + 1'b1;
      end
      q[0] <= nq[0];
      q[1] <= nq[1];
      cnt  <= ncnt;
    end
  end

endmodule
