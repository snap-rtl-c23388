// snap_pkg: sizes, types and helper functions shared by the sparse neural
// acceleration processor. The array shape (4 cores, 7x3 PEs per core, 3
// multipliers per PE, 16-bit data, a 32x32 associative index matcher per PE
// row) follows the published design; index, address, accumulator and fetch
// widths are this implementation's own choices and are marked as such below.
package snap_pkg;

  // ---- sizes taken from the published design ----
  localparam int DATA_W  = 16;  // 16-bit weights and activations
  localparam int AIM_N   = 32;  // 32x32 comparator array (search depth)
  localparam int N_MULT  = 3;   // multipliers per PE
  localparam int PE_ROWS = 7;   // PE rows per core
  localparam int PE_COLS = 3;   // PE columns per core (one AIM per row)
  localparam int N_PE    = PE_ROWS * PE_COLS;
  localparam int N_CORES = 4;

  // ---- implementation choices ----
  localparam int IDX_W   = 12;  // channel index of a compressed entry
  localparam int ACC_W   = 32;  // psum / OA accumulator width
  localparam int OA_AW   = 14;  // OA buffer address (16384 words)
  localparam int IA_AW   = 14;  // IA buffer address (16384 entries)
  localparam int W_AW    = 13;  // W buffer address per core (8192 entries)
  localparam int LEN_W   = $clog2(AIM_N + 1); // segment length 0..AIM_N
  localparam int FETCH_N = 32;  // entries per buffer read (= banks): one window
  localparam int WB_PORTS = 3;  // writeback ports per core
  localparam int DESC_DEPTH = 64;
  localparam int N_WBANK = 3;   // window register banks per core
  localparam int BANK_W  = $clog2(N_WBANK);
  localparam int CORE_W  = $clog2(N_CORES);

  // Compressed entry: non-zero value plus its channel index.
  typedef struct packed {
    logic [IDX_W-1:0]         idx;
    logic signed [DATA_W-1:0] data;
  } entry_t;

  // Partial sum travelling to the OA buffer.
  typedef struct packed {
    logic [OA_AW-1:0]        addr;
    logic signed [ACC_W-1:0] value;
  } psum_t;

  typedef enum logic {
    MODE_DIAG = 1'b0,  // diagonal PEs share an OA (CONV with P-reduce)
    MODE_ROW  = 1'b1   // PEs of a row share an OA (1x1 CONV, FC)
  } array_mode_e;

  typedef struct packed {
    logic [IA_AW-1:0] base;
    logic [LEN_W-1:0] len;
  } ia_seg_t;

  typedef struct packed {
    logic [W_AW-1:0]  base;
    logic [LEN_W-1:0] len;
  } w_seg_t;

  // One job for one core: a W window per PE column (broadcast down the
  // columns) and an IA window per PE (diagonal mode uses only column 0's
  // segment of each row and broadcasts it along the row), plus the OA
  // address each PE accumulates into and whether this job ends that OA's
  // channel reduction.
  typedef struct packed {
    logic [CORE_W-1:0]              core;
    w_seg_t  [PE_COLS-1:0]          w;
    ia_seg_t [N_PE-1:0]             ia;
    logic    [N_PE-1:0][OA_AW-1:0]  tag;
    logic    [N_PE-1:0]             last;
  } job_desc_t;

  // Reduction lane of PE (row i, column j).
  function automatic int lane_of(int pe, array_mode_e mode);
    int i, j;
    i = pe / PE_COLS;
    j = pe % PE_COLS;
    return (mode == MODE_DIAG) ? (i - j + PE_COLS - 1) : i;
  endfunction

  // Number of PEs that feed lane l.
  function automatic int lane_size(int l, array_mode_e mode);
    int n;
    n = 0;
    for (int p = 0; p < N_PE; p++)
      if (lane_of(p, mode) == l) n++;
    return n;
  endfunction

endpackage
