// snap_core: one compute core. It holds N_WBANK banks of window registers, a
// loader that fills them from the buffers, PE_ROWS pe_rows (each one AIM, 3
// sequence decoders, 3 PEs) and the core reducer.
// A job (job_desc_t) names, for each PE column, a compressed W window of up
// to AIM_N entries from the core's W buffer, and for each PE an IA window of
// up to AIM_N entries from the shared IA buffer, plus each PE's OA address
// and whether the job ends that OA's channel reduction.
//   diagonal mode: the IA window of row i (segment of PE (i,0)) is broadcast
//     to the 3 PEs of the row, the W window of column j to the 7 PEs of the
//     column; PEs on one diagonal produce psums of the same OA (P-reduce).
//   row mode: every PE gets its own IA window (a channel slice), the W window
//     of column j is shared by the column; the 3 PEs of a row produce psums
//     of the same OA.
// The loader reads FETCH_N aligned entries per request (W buffer private,
// IA buffer arbitrated among cores), then marks the bank full; the rows
// search it, and each PE's sequence decoder releases the bank when it has
// finished the job. With N_WBANK (3) banks the loader can fetch up to two
// jobs ahead of the slowest PE, so a PE that finishes a job usually finds
// the next one already matched and keeps its multipliers busy.
// Reduced psums leave on WB_PORTS valid/ready writeback ports.
// Core composition (PE array, AIM per row, core reducer) and the two array
// configurations follow the published design; the job format, the multi-
// banked window registers and the loader are this design's choices.
module snap_core import snap_pkg::*; #(
  parameter int N    = AIM_N,
  parameter int NF   = FETCH_N,
  parameter int WB   = WB_PORTS,
  parameter int TBL  = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  array_mode_e         mode,
  input  logic                flush,
  // jobs
  input  logic                desc_vld,
  output logic                desc_rdy,
  input  job_desc_t           desc,
  // IA buffer read port
  output logic                ia_req_vld,
  output logic [IA_AW-1:0]    ia_req_addr,
  input  logic                ia_req_gnt,
  input  logic                ia_rsp_vld,
  input  entry_t [NF-1:0]     ia_rsp_data,
  // W buffer read port
  output logic                w_req_vld,
  output logic [W_AW-1:0]     w_req_addr,
  input  logic                w_req_gnt,
  input  logic                w_rsp_vld,
  input  entry_t [NF-1:0]     w_rsp_data,
  // writeback
  output logic [WB-1:0]       wb_vld,
  input  logic [WB-1:0]       wb_rdy,
  output psum_t [WB-1:0]      wb_ps,
  // status
  output logic                idle,
  output logic [7:0]          mult_active,  // multipliers busy this cycle
  output logic [31:0]         n_psum,       // psums from PEs
  output logic [31:0]         n_wb,         // writebacks
  output logic [31:0]         n_evict       // reducer overflow evictions
);

  localparam int ROWS = PE_ROWS;
  localparam int COLS = PE_COLS;
  localparam int SW   = $clog2(N_PE);
  localparam int NCH  = (N + NF - 1) / NF;   // fetches per window
  localparam int CHW  = (NCH > 1) ? $clog2(NCH) : 1;

  localparam int NBK  = N_WBANK;
  localparam int BW   = BANK_W;

  // ---------------- window registers ----------------
  entry_t [NBK-1:0][COLS-1:0][N-1:0]            w_win;
  entry_t [ROWS-1:0][NBK-1:0][COLS-1:0][N-1:0]  ia_win;
  logic   [NBK-1:0][COLS-1:0][LEN_W-1:0]        w_len;
  logic   [ROWS-1:0][NBK-1:0][COLS-1:0][LEN_W-1:0] ia_len;
  logic   [ROWS-1:0][NBK-1:0][COLS-1:0][OA_AW-1:0] tag;
  logic   [ROWS-1:0][NBK-1:0][COLS-1:0]         last;
  logic   [NBK-1:0]                             bank_full;

  logic   [NBK-1:0][COLS-1:0][N-1:0]            w_vld;
  logic   [ROWS-1:0][NBK-1:0][COLS-1:0][N-1:0]  ia_vld;

  always_comb
    for (int b = 0; b < NBK; b++) begin
      for (int c = 0; c < COLS; c++)
        for (int e = 0; e < N; e++)
          w_vld[b][c][e] = (e < int'(w_len[b][c]));
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          for (int e = 0; e < N; e++)
            ia_vld[r][b][c][e] = (e < int'(ia_len[r][b][c]));
    end

  // ---------------- loader ----------------
  // Two walkers run side by side once a job is accepted: one reads the W
  // segments from the private W buffer, the other the IA segments from the
  // shared IA buffer, each one read of NF entries per granted cycle. An
  // answer arrives the cycle after its grant and is written into the bank
  // being loaded. When both walkers are done and nothing is outstanding the
  // bank is marked full and the next bank (in turn) becomes the target.
  logic             busy_l;    // a job is being loaded
  job_desc_t        d;
  logic [BW-1:0]    lb;        // bank being loaded
  logic [SW-1:0]    wseg, iseg;
  logic [CHW-1:0]   wchunk, ichunk;
  logic             wdone, idone;
  logic             wpend, ipend;
  logic [SW-1:0]    wpend_seg, ipend_seg;
  logic [CHW-1:0]   wpend_chunk, ipend_chunk;

  logic [LEN_W-1:0] wlen_c, ilen_c;
  logic [SW-1:0]    n_seg;
  logic             wneed, ineed, wlastc, ilastc;

  always_comb begin
    n_seg  = (mode == MODE_ROW) ? SW'(N_PE) : SW'(ROWS);
    wlen_c = d.w[wseg].len;
    ilen_c = (mode == MODE_ROW) ? d.ia[iseg].len : d.ia[int'(iseg) * COLS].len;
    wneed  = (int'(wchunk) * NF) < int'(wlen_c);
    ineed  = (int'(ichunk) * NF) < int'(ilen_c);
    wlastc = ((int'(wchunk) + 1) * NF) >= int'(wlen_c);
    ilastc = ((int'(ichunk) + 1) * NF) >= int'(ilen_c);
    w_req_vld   = busy_l && !wdone && wneed;
    w_req_addr  = d.w[wseg].base + W_AW'(int'(wchunk) * NF);
    ia_req_vld  = busy_l && !idone && ineed;
    ia_req_addr = ((mode == MODE_ROW) ? d.ia[iseg].base : d.ia[int'(iseg) * COLS].base)
                  + IA_AW'(int'(ichunk) * NF);
    desc_rdy    = !busy_l && !bank_full[lb];
  end

  // releases from PEs
  logic [ROWS-1:0][COLS-1:0]         rel;
  logic [ROWS-1:0][COLS-1:0][BW-1:0] rel_bank;
  logic [NBK-1:0][SW:0]              rel_cnt;
  logic [NBK-1:0][SW:0]              rel_now;

  always_comb begin
    rel_now = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (rel[r][c]) rel_now[rel_bank[r][c]] += 1'b1;
  end

  // window writes (no reset: entries are read only where the lengths mark
  // them valid)
  always_ff @(posedge clk) begin
    if (wpend && w_rsp_vld)
      for (int k = 0; k < NF; k++) begin
        int e;
        e = int'(wpend_chunk) * NF + k;
        if (e < N) w_win[lb][wpend_seg][e] <= w_rsp_data[k];
      end
    if (ipend && ia_rsp_vld)
      for (int k = 0; k < NF; k++) begin
        int e;
        e = int'(ipend_chunk) * NF + k;
        if (e < N) begin
          if (mode == MODE_ROW)
            ia_win[int'(ipend_seg) / COLS][lb][int'(ipend_seg) % COLS][e] <= ia_rsp_data[k];
          else
            for (int c = 0; c < COLS; c++) ia_win[ipend_seg][lb][c][e] <= ia_rsp_data[k];
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_l      <= 1'b0;
      d           <= '0;
      lb          <= '0;
      wseg        <= '0;
      iseg        <= '0;
      wchunk      <= '0;
      ichunk      <= '0;
      wdone       <= 1'b0;
      idone       <= 1'b0;
      wpend       <= 1'b0;
      ipend       <= 1'b0;
      wpend_seg   <= '0;
      ipend_seg   <= '0;
      wpend_chunk <= '0;
      ipend_chunk <= '0;
      bank_full   <= '0;
      rel_cnt     <= '0;
      w_len       <= '0;
      ia_len      <= '0;
      tag         <= '0;
      last        <= '0;
    end else begin
      // bank release: all PEs finished the bank's job
      for (int b = 0; b < NBK; b++) begin
        if (bank_full[b] && rel_cnt[b] + rel_now[b] == (SW+1)'(N_PE)) begin
          bank_full[b] <= 1'b0;
          rel_cnt[b]   <= '0;
        end else begin
          rel_cnt[b] <= rel_cnt[b] + rel_now[b];
        end
      end
      // outstanding reads
      wpend <= w_req_vld && w_req_gnt;
      ipend <= ia_req_vld && ia_req_gnt;
      if (w_req_vld && w_req_gnt) begin
        wpend_seg   <= wseg;
        wpend_chunk <= wchunk;
      end
      if (ia_req_vld && ia_req_gnt) begin
        ipend_seg   <= iseg;
        ipend_chunk <= ichunk;
      end
      if (!busy_l) begin
        if (desc_vld && desc_rdy) begin
          busy_l <= 1'b1;
          d      <= desc;
          wseg   <= '0;
          iseg   <= '0;
          wchunk <= '0;
          ichunk <= '0;
          wdone  <= 1'b0;
          idone  <= 1'b0;
          for (int c = 0; c < COLS; c++) w_len[lb][c] <= desc.w[c].len;
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++) begin
              ia_len[r][lb][c] <= (mode == MODE_ROW) ? desc.ia[r*COLS+c].len : desc.ia[r*COLS].len;
              tag[r][lb][c]    <= desc.tag[r*COLS+c];
              last[r][lb][c]   <= desc.last[r*COLS+c];
            end
        end
      end else begin
        // W walker
        if (!wdone && (!wneed || w_req_gnt)) begin
          if (wneed && !wlastc) wchunk <= wchunk + 1'b1;
          else begin
            wchunk <= '0;
            if (wseg == SW'(COLS - 1)) wdone <= 1'b1;
            else                       wseg  <= wseg + 1'b1;
          end
        end
        // IA walker
        if (!idone && (!ineed || ia_req_gnt)) begin
          if (ineed && !ilastc) ichunk <= ichunk + 1'b1;
          else begin
            ichunk <= '0;
            if (iseg == n_seg - 1'b1) idone <= 1'b1;
            else                      iseg  <= iseg + 1'b1;
          end
        end
        // finished: last answers written
        if (wdone && idone && !wpend && !ipend) begin
          busy_l        <= 1'b0;
          bank_full[lb] <= 1'b1;
          lb            <= (lb == BW'(NBK - 1)) ? '0 : lb + 1'b1;
        end
      end
    end
  end

  // ---------------- PE rows ----------------
  logic [ROWS-1:0]                 row_busy;
  logic [N_PE-1:0]                 pe_vld, pe_rdy;
  psum_t [N_PE-1:0]                pe_ps;
  logic [ROWS-1:0][COLS-1:0][1:0]  ma;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    pe_row #(.N(N), .COLS(COLS), .M(N_MULT), .NBK(NBK)) u_row (
      .clk, .rst_n,
      .bank_full, .w_win, .w_vld, .ia_win(ia_win[r]), .ia_vld(ia_vld[r]), .tag(tag[r]), .last(last[r]),
      .rel(rel[r]), .rel_bank(rel_bank[r]),
      .out_vld(pe_vld[r*COLS +: COLS]), .out_rdy(pe_rdy[r*COLS +: COLS]),
      .out_ps(pe_ps[r*COLS +: COLS]),
      .busy(row_busy[r]), .mult_active(ma[r])
    );
  end

  always_comb begin
    mult_active = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) mult_active += 8'(ma[r][c]);
  end

  // ---------------- core reducer ----------------
  logic red_quiet;

  core_reducer #(.TBL(TBL), .WB(WB)) u_red (
    .clk, .rst_n, .mode, .flush,
    .in_vld(pe_vld), .in_rdy(pe_rdy), .in_ps(pe_ps),
    .out_vld(wb_vld), .out_rdy(wb_rdy), .out_ps(wb_ps),
    .empty(), .quiet(red_quiet), .n_in(n_psum), .n_out(n_wb), .n_evict
  );

  // idle: nothing in flight; the reducer may still hold incomplete entries,
  // which only a flush releases
  assign idle = !busy_l && (bank_full == '0) && (row_busy == '0) && red_quiet;

endmodule
