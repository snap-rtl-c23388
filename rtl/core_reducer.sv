// core_reducer: second reduction level (P-reduce). PEs hand over final
// channel-reduced psums with their OA address; the reducer adds up the
// psums of PEs that belong to the same reduction lane and carry the same OA
// address, so that one writeback leaves the core where several would.
// Lanes follow the PE array configuration:
//   diagonal mode: PE(i,j) is in lane i-j+COLS-1 (CONV with P-reduce)
//   row mode:      PE(i,j) is in lane i            (1x1 CONV, FC)
// Each lane has a table of TBL entries {OA address, sum, count}. Every cycle
// a lane accepts one psum (lowest PE first): it is added to the entry with
// the same address, or takes a free entry. An entry is complete when all
// PEs of its lane have contributed. If a psum finds neither a match nor a
// free entry (overflow) it waits and the lowest incomplete entry is evicted
// (written back partial). flush evicts everything. Eviction never loses
// data because the OA buffer accumulates what it receives.
// Up to WB complete entries leave per cycle on the writeback ports.
// Lane membership and the purpose follow the published design; the table,
// its size, eviction and the port count are this design's choices.
// Timing: a psum is accepted in the cycle in_rdy is high; an entry can
// leave from the cycle after it became complete.
module core_reducer import snap_pkg::*; #(
  parameter int TBL = 4,
  parameter int WB  = WB_PORTS,
  localparam int NL = PE_ROWS + PE_COLS - 1,
  localparam int CW = $clog2(N_PE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  array_mode_e       mode,
  input  logic              flush,
  input  logic [N_PE-1:0]   in_vld,
  output logic [N_PE-1:0]   in_rdy,
  input  psum_t [N_PE-1:0]  in_ps,
  output logic [WB-1:0]     out_vld,
  input  logic [WB-1:0]     out_rdy,
  output psum_t [WB-1:0]    out_ps,
  output logic              empty,    // no entry held, no writeback pending
  output logic              quiet,    // only incomplete entries held
  output logic [31:0]       n_in,     // psums received
  output logic [31:0]       n_out,    // writebacks sent
  output logic [31:0]       n_evict   // overflow evictions
);

  logic [NL-1:0][TBL-1:0]            e_vld, e_done;
  logic [NL-1:0][TBL-1:0][OA_AW-1:0] e_addr;
  logic [NL-1:0][TBL-1:0][ACC_W-1:0] e_sum;
  logic [NL-1:0][TBL-1:0][CW-1:0]    e_cnt;

  // expected contributions per lane
  logic [NL-1:0][CW-1:0] lsize;
  always_comb
    for (int l = 0; l < NL; l++) lsize[l] = CW'(lane_size(l, mode));

  // complete entries
  logic [NL-1:0][TBL-1:0] e_cmp;
  always_comb
    for (int l = 0; l < NL; l++)
      for (int t = 0; t < TBL; t++)
        e_cmp[l][t] = e_vld[l][t] && (e_done[l][t] || e_cnt[l][t] == lsize[l]);

  // ---------------- output selection ----------------
  logic [WB-1:0]          take;
  logic [WB-1:0][$clog2(NL)-1:0]  take_l;
  logic [WB-1:0][$clog2(TBL)-1:0] take_t;
  logic [NL-1:0][TBL-1:0] taken;

  always_comb begin
    taken  = '0;
    take   = '0;
    take_l = '0;
    take_t = '0;
    for (int w = 0; w < WB; w++) begin
      if (!out_vld[w] || out_rdy[w]) begin
        for (int l = NL - 1; l >= 0; l--)
          for (int t = TBL - 1; t >= 0; t--)
            if (e_cmp[l][t] && !taken[l][t]) begin
              take[w]   = 1'b1;
              take_l[w] = ($clog2(NL))'(l);
              take_t[w] = ($clog2(TBL))'(t);
            end
        if (take[w]) taken[take_l[w]][take_t[w]] = 1'b1;
      end
    end
  end

  // ---------------- input acceptance per lane ----------------
  logic [NL-1:0]                  l_acc, l_match, l_evict;
  logic [NL-1:0][$clog2(N_PE)-1:0] l_pe;
  logic [NL-1:0][$clog2(TBL)-1:0]  l_slot, l_ev_slot;

  always_comb begin
    in_rdy  = '0;
    l_acc   = '0;
    l_match = '0;
    l_evict = '0;
    l_pe    = '0;
    l_slot  = '0;
    l_ev_slot = '0;
    for (int l = 0; l < NL; l++) begin
      logic found, fm, ff, anydone, fe;
      found = 1'b0;
      for (int p = N_PE - 1; p >= 0; p--)
        if (in_vld[p] && lane_of(p, mode) == l) begin
          found = 1'b1;
          l_pe[l] = ($clog2(N_PE))'(p);
        end
      fm = 1'b0;
      ff = 1'b0;
      anydone = 1'b0;
      fe = 1'b0;
      for (int t = TBL - 1; t >= 0; t--) begin
        if (e_vld[l][t] && !e_cmp[l][t] && e_addr[l][t] == in_ps[l_pe[l]].addr) begin
          fm = 1'b1; l_slot[l] = ($clog2(TBL))'(t);
        end
        if (e_vld[l][t] && !e_cmp[l][t]) begin
          fe = 1'b1; l_ev_slot[l] = ($clog2(TBL))'(t);
        end
        if (e_cmp[l][t]) anydone = 1'b1;
      end
      if (!fm)
        for (int t = TBL - 1; t >= 0; t--)
          if (!e_vld[l][t]) begin ff = 1'b1; l_slot[l] = ($clog2(TBL))'(t); end
      if (found && !flush) begin
        if (fm || ff) begin
          l_acc[l]   = 1'b1;
          l_match[l] = fm;
          in_rdy[l_pe[l]] = 1'b1;
        end else if (!anydone && fe) begin
          l_evict[l] = 1'b1;
        end
      end
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_vld   <= '0;
      e_done  <= '0;
      e_addr  <= '0;
      e_sum   <= '0;
      e_cnt   <= '0;
      out_vld <= '0;
      out_ps  <= '0;
      n_in    <= '0;
      n_out   <= '0;
      n_evict <= '0;
    end else begin
      for (int w = 0; w < WB; w++) begin
        if (out_vld[w] && out_rdy[w]) out_vld[w] <= 1'b0;
        if (take[w]) begin
          out_vld[w]       <= 1'b1;
          out_ps[w].addr   <= e_addr[take_l[w]][take_t[w]];
          out_ps[w].value  <= e_sum[take_l[w]][take_t[w]];
          e_vld[take_l[w]][take_t[w]] <= 1'b0;
          e_done[take_l[w]][take_t[w]] <= 1'b0;
        end
      end
      n_out <= n_out + 32'($countones(take));
      n_in  <= n_in + 32'($countones(l_acc));
      n_evict <= n_evict + 32'($countones(l_evict));
      for (int l = 0; l < NL; l++) begin
        if (l_acc[l]) begin
          if (l_match[l]) begin
            e_sum[l][l_slot[l]] <= e_sum[l][l_slot[l]] + in_ps[l_pe[l]].value;
            e_cnt[l][l_slot[l]] <= e_cnt[l][l_slot[l]] + 1'b1;
          end else begin
            e_vld[l][l_slot[l]]  <= 1'b1;
            e_done[l][l_slot[l]] <= 1'b0;
            e_addr[l][l_slot[l]] <= in_ps[l_pe[l]].addr;
            e_sum[l][l_slot[l]]  <= in_ps[l_pe[l]].value;
            e_cnt[l][l_slot[l]]  <= CW'(1);
          end
        end
        if (l_evict[l]) e_done[l][l_ev_slot[l]] <= 1'b1;
        if (flush)
          for (int t = 0; t < TBL; t++)
            if (e_vld[l][t] && !taken[l][t]) e_done[l][t] <= 1'b1;
      end
    end
  end

  assign empty = (e_vld == '0) && (out_vld == '0);
  assign quiet = (e_cmp == '0) && (out_vld == '0);

endmodule
