// oa_buffer: multi-banked output-activation buffer shared by the cores.
// Writebacks are accumulations: the arriving psum is added to the word at
// its OA address, so psums of one OA may arrive from several cores, several
// passes or an evicted partial reduction and still end up summed. Address a
// lives in bank a mod NB; each bank accepts one writeback per cycle, chosen
// round-robin among the ports that address it, and the others see wr_rdy
// low and retry. clr zeroes the whole buffer (DEPTH/NB cycles, all banks in
// parallel, writebacks held off meanwhile). A read port with one cycle of
// latency drains results.
// The multi-banked, shared OA buffer follows the published design; bank
// count, accumulate-on-write, clearing and the single-cycle read-add-write
// (as a register-file model) are this design's choices.
module oa_buffer import snap_pkg::*; #(
  parameter int DEPTH = 1 << OA_AW,
  parameter int NB    = 16,
  parameter int NP    = N_CORES * WB_PORTS,
  localparam int AW   = $clog2(DEPTH),
  localparam int OW   = $clog2(NB),
  localparam int RW   = $clog2(DEPTH / NB)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NP-1:0]            wr_vld,
  output logic [NP-1:0]            wr_rdy,
  input  psum_t [NP-1:0]           wr_ps,
  input  logic                     clr,
  output logic                     clr_busy,
  input  logic                     rd_en,
  input  logic [AW-1:0]            rd_addr,
  output logic signed [ACC_W-1:0]  rd_data,
  output logic [31:0]              n_conflict  // writebacks held by a bank conflict
);

  logic signed [ACC_W-1:0] mem [NB][DEPTH/NB];

  logic [$clog2(NP+1)-1:0] rr;
  logic [RW-1:0]           clr_row;

  // per-bank arbitration
  logic [NB-1:0]                 b_go;
  logic [NB-1:0][$clog2(NP)-1:0] b_port;

  always_comb begin
    int q;
    wr_rdy = '0;
    b_go   = '0;
    b_port = '0;
    q      = 0;
    if (!clr_busy)
      for (int i = 0; i < NP; i++) begin
        q = (int'(rr) + i) % NP;
        if (wr_vld[q] && !b_go[wr_ps[q].addr[OW-1:0]]) begin
          b_go[wr_ps[q].addr[OW-1:0]]   = 1'b1;
          b_port[wr_ps[q].addr[OW-1:0]] = ($clog2(NP))'(q);
          wr_rdy[q] = 1'b1;
        end
      end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (clr_busy)
        mem[b][clr_row] <= '0;
      else if (b_go[b])
        mem[b][wr_ps[b_port[b]].addr[AW-1:OW]] <=
          mem[b][wr_ps[b_port[b]].addr[AW-1:OW]] + wr_ps[b_port[b]].value;
    end
    if (rd_en) rd_data <= mem[rd_addr[OW-1:0]][rd_addr[AW-1:OW]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr         <= '0;
      clr_busy   <= 1'b0;
      clr_row    <= '0;
      n_conflict <= '0;
    end else begin
      rr <= ($clog2(NP+1))'((int'(rr) + 1) % NP);
      n_conflict <= n_conflict + 32'($countones(wr_vld & ~wr_rdy));
      if (clr && !clr_busy) begin
        clr_busy <= 1'b1;
        clr_row  <= '0;
      end else if (clr_busy) begin
        clr_row <= clr_row + 1'b1;
        if (clr_row == RW'(DEPTH / NB - 1)) clr_busy <= 1'b0;
      end
    end
  end

endmodule
