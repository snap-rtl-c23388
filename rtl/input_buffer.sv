// input_buffer: multi-banked buffer of compressed entries (value + channel
// index), used as the IA buffer shared by the cores and as each core's
// private W buffer. Entry address a lives in bank a mod NB, row a / NB, so
// any NB consecutive entries sit in different banks and are read together
// in one cycle. Requesters share the read path through a round-robin
// arbiter: one request is granted per cycle and its NB entries, aligned by
// input_aligner, come back on rsp_data the next cycle with rsp_vld set for
// that requester only. A host port writes one entry per cycle (writes take
// priority over nothing; reads and writes go to the banks in the same cycle).
// Multi-banking and sharing follow the published design; bank count, read
// width, arbitration and the write port are this design's choices.
module input_buffer import snap_pkg::*; #(
  parameter int DEPTH = 1 << IA_AW,
  parameter int NB    = FETCH_N,
  parameter int NREQ  = N_CORES,
  localparam int AW   = $clog2(DEPTH),
  localparam int RW   = $clog2(DEPTH / NB),
  localparam int OW   = $clog2(NB)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [AW-1:0]              wr_addr,
  input  entry_t                     wr_data,
  input  logic [NREQ-1:0]            req_vld,
  input  logic [NREQ-1:0][AW-1:0]    req_addr,
  output logic [NREQ-1:0]            req_gnt,
  output logic [NREQ-1:0]            rsp_vld,
  output entry_t [NB-1:0]            rsp_data
);

  entry_t mem [NB][DEPTH/NB];

  // round-robin arbiter
  logic [$clog2(NREQ+1)-1:0] rr;
  logic [AW-1:0]             sel_addr;
  logic                      any;

  always_comb begin
    int q;
    req_gnt  = '0;
    any      = 1'b0;
    sel_addr = '0;
    for (int i = 0; i < NREQ; i++) begin
      q = (int'(rr) + i) % NREQ;
      if (!any && req_vld[q]) begin
        any        = 1'b1;
        req_gnt[q] = 1'b1;
        sel_addr   = req_addr[q];
      end
    end
  end

  // banked read, aligned next cycle
  entry_t [NB-1:0] bank_q;
  logic   [OW-1:0] off_q;

  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      logic [AW-1:0] a;
      a = sel_addr + AW'(OW'(OW'(b) - sel_addr[OW-1:0]));
      bank_q[b] <= mem[b][a[AW-1:OW]];
    end
    off_q <= sel_addr[OW-1:0];
    if (wr_en) mem[wr_addr[OW-1:0]][wr_addr[AW-1:OW]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr      <= '0;
      rsp_vld <= '0;
    end else begin
      rsp_vld <= req_gnt;
      if (any) rr <= ($clog2(NREQ+1))'((int'(rr) + 1) % NREQ);
    end
  end

  input_aligner #(.NB(NB)) u_align (.bank_data(bank_q), .off(off_q), .aligned(rsp_data));

endmodule
