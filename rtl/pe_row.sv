// pe_row: one row of the PE array with the AIM that serves it. A single
// N x N AIM is time-multiplexed over the row's PEs: each cycle it searches
// one PE's (W window, IA window) pair of the current window bank and loads
// the match list into that PE's sequence decoder. After the last PE of the
// row it moves to the next bank (the core fills banks in turn). The
// decoders dispatch up to M pairs per PE per cycle; the W and IA values are
// read from the core's window registers at the addresses they give.
// When a PE's decoder finishes a job it pulses rel with the job's bank so
// the core can count the bank free.
// One AIM per row of 3 PEs, time-multiplexed, follows the published design;
// the search order and the NBK-bank scheme are this design's choices.
// Timing: a search takes one cycle and its result is in the decoder the
// next cycle; a dispatched pair is multiplied and accumulated in the cycle
// it is dispatched.
module pe_row import snap_pkg::*; #(
  parameter int N     = AIM_N,
  parameter int COLS  = PE_COLS,
  parameter int M     = N_MULT,
  parameter int NBK   = N_WBANK,
  localparam int AW   = $clog2(N),
  localparam int BW   = $clog2(NBK)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // window banks, written by the core
  input  logic [NBK-1:0]        bank_full,
  input  entry_t [NBK-1:0][COLS-1:0][N-1:0] w_win,
  input  logic   [NBK-1:0][COLS-1:0][N-1:0] w_vld,
  input  entry_t [NBK-1:0][COLS-1:0][N-1:0] ia_win,
  input  logic   [NBK-1:0][COLS-1:0][N-1:0] ia_vld,
  input  logic   [NBK-1:0][COLS-1:0][OA_AW-1:0] tag,
  input  logic   [NBK-1:0][COLS-1:0]        last,
  // job release, one per PE
  output logic [COLS-1:0]       rel,
  output logic [COLS-1:0][BW-1:0] rel_bank,
  // finished psums, one per PE
  output logic [COLS-1:0]       out_vld,
  input  logic [COLS-1:0]       out_rdy,
  output psum_t [COLS-1:0]      out_ps,
  // activity
  output logic                  busy,
  output logic [COLS-1:0][1:0]  mult_active  // multipliers used this cycle
);

  // ---------------- search scheduler ----------------
  logic [BW-1:0]           nb;                 // bank being searched
  logic [$clog2(COLS)-1:0] pcur;               // PE being searched
  logic [NBK-1:0]          searched;           // bank done by this row
  logic                    do_search;
  logic [COLS-1:0]         ld_rdy;
  logic [N-1:0]            hit;
  logic [N-1:0][AW-1:0]    hit_addr;
  logic [N-1:0][IDX_W-1:0] s_widx, s_iaidx;

  assign do_search = bank_full[nb] && !searched[nb] && ld_rdy[pcur];

  always_comb begin
    for (int e = 0; e < N; e++) begin
      s_widx[e]  = w_win[nb][pcur][e].idx;
      s_iaidx[e] = ia_win[nb][pcur][e].idx;
    end
  end

  aim #(.N(N), .IW(IDX_W)) u_aim (
    .w_idx (s_widx), .w_vld (w_vld[nb][pcur]),
    .ia_idx(s_iaidx), .ia_vld(ia_vld[nb][pcur]),
    .hit   (hit), .ia_addr(hit_addr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nb       <= '0;
      pcur     <= '0;
      searched <= '0;
    end else begin
      for (int b = 0; b < NBK; b++)
        if (!bank_full[b]) searched[b] <= 1'b0;
      if (do_search) begin
        if (int'(pcur) == COLS - 1) begin
          pcur         <= '0;
          searched[nb] <= 1'b1;
          nb           <= (nb == BW'(NBK - 1)) ? '0 : nb + 1'b1;
        end else begin
          pcur <= pcur + 1'b1;
        end
      end
    end
  end

  // ---------------- decoders and PEs ----------------
  logic [COLS-1:0] sd_busy;

  for (genvar c = 0; c < COLS; c++) begin : g_pe
    logic [M-1:0]          lane_vld, lane_nxt;
    logic [M-1:0][BW-1:0]  lane_bank;
    logic [M-1:0][AW-1:0]  lane_w, lane_ia;
    logic                  head_done, head_last, step, pe_rdy;
    logic [BW-1:0]         head_bank;
    logic [OA_AW-1:0]      head_tag;
    logic signed [M-1:0][DATA_W-1:0] wd, iad;

    seq_decoder #(.N(N), .M(M), .TAG_W(OA_AW), .BW(BW)) u_sd (
      .clk, .rst_n,
      .load_vld (do_search && int'(pcur) == c),
      .load_rdy (ld_rdy[c]),
      .load_hit (hit),
      .load_addr(hit_addr),
      .load_tag (tag[nb][c]),
      .load_last(last[nb][c]),
      .load_bank(nb),
      .step, .busy(sd_busy[c]),
      .lane_vld, .lane_nxt, .lane_bank, .lane_w, .lane_ia,
      .head_done, .head_last, .head_tag, .head_bank
    );

    always_comb begin
      for (int k = 0; k < M; k++) begin
        wd[k]  = w_win[lane_bank[k]][c][lane_w[k]].data;
        iad[k] = ia_win[lane_bank[k]][c][lane_ia[k]].data;
      end
    end

    assign step = sd_busy[c] && pe_rdy;
    assign rel[c]      = step && head_done;
    assign rel_bank[c] = head_bank;

    always_comb begin
      mult_active[c] = '0;
      if (step)
        for (int k = 0; k < M; k++) mult_active[c] += 2'(lane_vld[k]);
    end

    pe #(.M(M), .TAG_W(OA_AW)) u_pe (
      .clk, .rst_n, .step,
      .lane_vld, .lane_nxt, .w_data(wd), .ia_data(iad),
      .head_done, .head_last, .head_tag,
      .ready(pe_rdy),
      .out_vld(out_vld[c]), .out_rdy(out_rdy[c]), .out_ps(out_ps[c])
    );
  end

  assign busy = |sd_busy || |out_vld;

endmodule
