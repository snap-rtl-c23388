// snap_ctrl: control module. It sequences one layer pass:
//   1. clear the OA buffer,
//   2. issue the n_desc job descriptors held in its descriptor memory, in
//      order, each to the core its descriptor names (a core that is busy
//      holds up the ones behind it),
//   3. wait until every core is idle, pulse flush so the core reducers
//      write back what they still hold, and wait for idle again,
//   4. drain the OA buffer pixel by pixel: word oa_base + p*k_ch + k is OA
//      channel k of pixel p; each word goes to the output compressor with
//      channel index k and a pixel-end flag on k = k_ch-1,
//   5. raise done (held until the next start).
// The published design only names the control module; this sequencing, the
// descriptor memory and the OA address convention are this design's.
// Timing: the OA buffer read has one cycle of latency, so cmp_* is
// registered to line up with its data.
module snap_ctrl import snap_pkg::*; #(
  parameter int DEPTH = DESC_DEPTH,
  localparam int DAW  = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // descriptor memory write
  input  logic                  desc_we,
  input  logic [DAW-1:0]        desc_waddr,
  input  job_desc_t             desc_wdata,
  // pass configuration
  input  logic                  start,
  input  logic [DAW:0]          n_desc,
  input  logic [OA_AW-1:0]      oa_base,
  input  logic [OA_AW-1:0]      n_pix,
  input  logic [IDX_W:0]        k_ch,
  // cores
  output logic [N_CORES-1:0]    core_desc_vld,
  input  logic [N_CORES-1:0]    core_desc_rdy,
  output job_desc_t             core_desc,
  input  logic [N_CORES-1:0]    core_idle,
  output logic                  flush,
  // OA buffer
  output logic                  oa_clr,
  input  logic                  oa_clr_busy,
  output logic                  oa_rd_en,
  output logic [OA_AW-1:0]      oa_rd_addr,
  // output compressor
  output logic                  cmp_vld,
  output logic [IDX_W-1:0]      cmp_idx,
  output logic                  cmp_last,
  // status
  output logic                  busy,
  output logic                  done
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_CLRW, S_ISSUE, S_SETTLE, S_FLUSH, S_FWAIT, S_DRAIN, S_DONE
  } state_e;

  job_desc_t        dmem [DEPTH];
  state_e           st;
  logic [DAW:0]     di;
  logic [2:0]       wcnt;
  logic [OA_AW-1:0] pix;
  logic [IDX_W:0]   ch;
  logic [OA_AW-1:0] row_base;

  always_ff @(posedge clk)
    if (desc_we) dmem[desc_waddr] <= desc_wdata;

  assign core_desc = dmem[di[DAW-1:0]];

  always_comb begin
    core_desc_vld = '0;
    if (st == S_ISSUE && di < n_desc) core_desc_vld[core_desc.core] = 1'b1;
    flush      = (st == S_FLUSH);
    oa_clr     = (st == S_CLR);
    oa_rd_en   = (st == S_DRAIN);
    oa_rd_addr = row_base + OA_AW'(ch);
    busy       = (st != S_IDLE) && (st != S_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      di       <= '0;
      wcnt     <= '0;
      pix      <= '0;
      ch       <= '0;
      row_base <= '0;
      done     <= 1'b0;
      cmp_vld  <= 1'b0;
      cmp_idx  <= '0;
      cmp_last <= 1'b0;
    end else begin
      cmp_vld  <= oa_rd_en;
      cmp_idx  <= IDX_W'(ch);
      cmp_last <= oa_rd_en && (ch == k_ch - 1'b1);
      case (st)
        S_IDLE, S_DONE: if (start) begin
          done <= 1'b0;
          st   <= S_CLR;
        end
        S_CLR:  st <= S_CLRW;
        S_CLRW: if (!oa_clr_busy) begin
          di <= '0;
          st <= S_ISSUE;
        end
        S_ISSUE: begin
          if (di >= n_desc) begin
            wcnt <= '1;
            st   <= S_SETTLE;
          end else if (core_desc_rdy[core_desc.core]) begin
            di <= di + 1'b1;
          end
        end
        S_SETTLE: begin
          if (wcnt != 0) wcnt <= wcnt - 1'b1;
          else if (&core_idle) st <= S_FLUSH;
        end
        S_FLUSH: begin
          wcnt <= '1;
          st   <= S_FWAIT;
        end
        S_FWAIT: begin
          if (wcnt != 0) wcnt <= wcnt - 1'b1;
          else if (&core_idle) begin
            pix      <= '0;
            ch       <= '0;
            row_base <= oa_base;
            st       <= (n_pix == 0 || k_ch == 0) ? S_DONE : S_DRAIN;
            done     <= (n_pix == 0 || k_ch == 0);
          end
        end
        S_DRAIN: begin
          if (ch == k_ch - 1'b1) begin
            ch       <= '0;
            pix      <= pix + 1'b1;
            row_base <= row_base + OA_AW'(k_ch);
            if (pix == n_pix - 1'b1) begin
              st   <= S_DONE;
              done <= 1'b1;
            end
          end else begin
            ch <= ch + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
