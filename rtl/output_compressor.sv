// output_compressor: turns drained OA words back into the compressed form
// the next layer reads. Each word passes through ReLU, an arithmetic right
// shift by `shift` and saturation to 16 bits; words that end up zero are
// dropped and the others leave as {channel index, value} entries. in_last
// marks the last channel of a pixel: one cycle later px_done pulses with the
// number of entries that pixel produced.
// ReLU zeroing and zero removal before writeback follow the published
// design; the requantisation (shift, saturate) is this design's choice.
// Timing: one register stage, one word per cycle.
module output_compressor import snap_pkg::*; (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [4:0]              shift,
  input  logic                    in_vld,
  input  logic signed [ACC_W-1:0] in_value,
  input  logic [IDX_W-1:0]        in_idx,
  input  logic                    in_last,
  output logic                    out_vld,
  output entry_t                  out_entry,
  output logic                    px_done,
  output logic [IDX_W:0]          px_count
);

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 << (DATA_W - 1)) - 1);

  logic signed [ACC_W-1:0] r;
  logic [IDX_W:0]          cnt;
  logic                    nz;

  always_comb begin
    r  = (in_value[ACC_W-1]) ? '0 : (in_value >>> shift);
    if (r > MAXV) r = MAXV;
    nz = (r != 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld   <= 1'b0;
      out_entry <= '0;
      px_done   <= 1'b0;
      px_count  <= '0;
      cnt       <= '0;
    end else begin
      out_vld <= in_vld && nz;
      px_done <= in_vld && in_last;
      if (in_vld && nz) begin
        out_entry.idx  <= in_idx;
        out_entry.data <= DATA_W'(r);
      end
      if (in_vld) begin
        if (in_last) begin
          px_count <= cnt + (IDX_W+1)'(nz);
          cnt      <= '0;
        end else begin
          cnt <= cnt + (IDX_W+1)'(nz);
        end
      end
    end
  end

endmodule
