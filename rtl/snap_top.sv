// snap_top: the sparse neural acceleration processor. A control module, a
// memory module (IA buffer shared by the cores, one private W buffer per
// core, a shared OA buffer, output compressor) and four compute cores.
// A host loads compressed IA entries, compressed W entries per core and job
// descriptors, sets the pass configuration and pulses start. The cores pair
// W and IA entries by channel index (AIM), multiply, reduce over channels in
// the PEs and over pixels or channel slices in the core reducers, and
// accumulate into the OA buffer. The controller then drains the OA buffer
// through ReLU and zero removal; compressed OA entries appear on out_*,
// with px_done/px_count at each pixel end. done rises when the pass is over.
// Ports are plain signals; the host write ports are one entry per cycle.
// Composition follows the published design (4 cores of 7x3 PEs with 3
// multipliers each, 252 multipliers); buffer sizes and host ports are this
// design's choices.
module snap_top import snap_pkg::*; (
  input  logic                   clk,
  input  logic                   rst_n,
  // host: IA buffer
  input  logic                   ia_we,
  input  logic [IA_AW-1:0]       ia_waddr,
  input  entry_t                 ia_wdata,
  // host: W buffers
  input  logic                   w_we,
  input  logic [CORE_W-1:0]      w_core,
  input  logic [W_AW-1:0]        w_waddr,
  input  entry_t                 w_wdata,
  // host: job descriptors
  input  logic                   desc_we,
  input  logic [$clog2(DESC_DEPTH)-1:0] desc_waddr,
  input  job_desc_t              desc_wdata,
  // pass configuration
  input  array_mode_e            mode,
  input  logic [4:0]             shift,
  input  logic [$clog2(DESC_DEPTH):0] n_desc,
  input  logic [OA_AW-1:0]       oa_base,
  input  logic [OA_AW-1:0]       n_pix,
  input  logic [IDX_W:0]         k_ch,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  // compressed output activations
  output logic                   out_vld,
  output entry_t                 out_entry,
  output logic                   px_done,
  output logic [IDX_W:0]         px_count,
  // activity
  output logic [9:0]             mult_active,
  output logic [N_CORES-1:0][31:0] n_psum,
  output logic [N_CORES-1:0][31:0] n_wb,
  output logic [N_CORES-1:0][31:0] n_evict,
  output logic [31:0]            n_conflict
);

  // ---------------- control ----------------
  logic [N_CORES-1:0] core_desc_vld, core_desc_rdy, core_idle;
  job_desc_t          core_desc;
  logic               flush, oa_clr, oa_clr_busy, oa_rd_en;
  logic [OA_AW-1:0]   oa_rd_addr;
  logic signed [ACC_W-1:0] oa_rd_data;
  logic               cmp_vld, cmp_last;
  logic [IDX_W-1:0]   cmp_idx;

  snap_ctrl u_ctrl (
    .clk, .rst_n,
    .desc_we, .desc_waddr, .desc_wdata,
    .start, .n_desc, .oa_base, .n_pix, .k_ch,
    .core_desc_vld, .core_desc_rdy, .core_desc, .core_idle, .flush,
    .oa_clr, .oa_clr_busy, .oa_rd_en, .oa_rd_addr,
    .cmp_vld, .cmp_idx, .cmp_last,
    .busy, .done
  );

  // ---------------- IA buffer (shared) ----------------
  logic [N_CORES-1:0]              ia_req_vld, ia_req_gnt, ia_rsp_vld;
  logic [N_CORES-1:0][IA_AW-1:0]   ia_req_addr;
  entry_t [FETCH_N-1:0]            ia_rsp_data;

  input_buffer #(.DEPTH(1 << IA_AW), .NB(FETCH_N), .NREQ(N_CORES)) u_ia_buf (
    .clk, .rst_n,
    .wr_en(ia_we), .wr_addr(ia_waddr), .wr_data(ia_wdata),
    .req_vld(ia_req_vld), .req_addr(ia_req_addr), .req_gnt(ia_req_gnt),
    .rsp_vld(ia_rsp_vld), .rsp_data(ia_rsp_data)
  );

  // ---------------- cores with private W buffers ----------------
  logic [N_CORES*WB_PORTS-1:0] wb_vld, wb_rdy;
  psum_t [N_CORES*WB_PORTS-1:0] wb_ps;
  logic [N_CORES-1:0][7:0]     core_ma;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    logic                 w_req_vld, w_req_gnt, w_rsp_vld;
    logic [W_AW-1:0]      w_req_addr;
    entry_t [FETCH_N-1:0] w_rsp_data;

    input_buffer #(.DEPTH(1 << W_AW), .NB(FETCH_N), .NREQ(1)) u_w_buf (
      .clk, .rst_n,
      .wr_en(w_we && w_core == CORE_W'(c)), .wr_addr(w_waddr), .wr_data(w_wdata),
      .req_vld(w_req_vld), .req_addr(w_req_addr), .req_gnt(w_req_gnt),
      .rsp_vld(w_rsp_vld), .rsp_data(w_rsp_data)
    );

    snap_core u_core (
      .clk, .rst_n, .mode, .flush,
      .desc_vld(core_desc_vld[c]), .desc_rdy(core_desc_rdy[c]), .desc(core_desc),
      .ia_req_vld(ia_req_vld[c]), .ia_req_addr(ia_req_addr[c]), .ia_req_gnt(ia_req_gnt[c]),
      .ia_rsp_vld(ia_rsp_vld[c]), .ia_rsp_data,
      .w_req_vld, .w_req_addr, .w_req_gnt, .w_rsp_vld, .w_rsp_data,
      .wb_vld(wb_vld[c*WB_PORTS +: WB_PORTS]), .wb_rdy(wb_rdy[c*WB_PORTS +: WB_PORTS]),
      .wb_ps(wb_ps[c*WB_PORTS +: WB_PORTS]),
      .idle(core_idle[c]), .mult_active(core_ma[c]),
      .n_psum(n_psum[c]), .n_wb(n_wb[c]), .n_evict(n_evict[c])
    );
  end

  always_comb begin
    mult_active = '0;
    for (int c = 0; c < N_CORES; c++) mult_active += 10'(core_ma[c]);
  end

  // ---------------- OA buffer and output compression ----------------
  oa_buffer #(.DEPTH(1 << OA_AW), .NB(16), .NP(N_CORES * WB_PORTS)) u_oa_buf (
    .clk, .rst_n,
    .wr_vld(wb_vld), .wr_rdy(wb_rdy), .wr_ps(wb_ps),
    .clr(oa_clr), .clr_busy(oa_clr_busy),
    .rd_en(oa_rd_en), .rd_addr(oa_rd_addr), .rd_data(oa_rd_data),
    .n_conflict
  );

  output_compressor u_cmp (
    .clk, .rst_n, .shift,
    .in_vld(cmp_vld), .in_value(oa_rd_data), .in_idx(cmp_idx), .in_last(cmp_last),
    .out_vld, .out_entry, .px_done, .px_count
  );

endmodule
