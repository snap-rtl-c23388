// tb_output_compressor: a random stream of OA words (negative, zero, small
// and overflowing values, random pixel ends, several shifts) goes in; the
// expected compressed entries and per-pixel counts are computed in the
// testbench and compared in order.
module tb_output_compressor;
  import snap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] shift;
  logic in_vld = 0, in_last = 0, out_vld, px_done;
  logic signed [ACC_W-1:0] in_value;
  logic [IDX_W-1:0] in_idx;
  entry_t out_entry;
  logic [IDX_W:0] px_count;
  int checks = 0, failures = 0;
  entry_t exp_e [$];
  int exp_c [$];
  int cnt = 0;

  output_compressor dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (out_vld) begin
      checks++;
      if (exp_e.size() == 0 || out_entry != exp_e[0]) begin
        failures++;
        $display("FAIL entry %h", out_entry);
      end
      if (exp_e.size() != 0) void'(exp_e.pop_front());
    end
    if (px_done) begin
      checks++;
      if (exp_c.size() == 0 || int'(px_count) != exp_c[0]) failures++;
      if (exp_c.size() != 0) void'(exp_c.pop_front());
    end
  end

  initial begin
    shift = 0;
    in_value = 0;
    in_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      longint v, r;
      int sel;
      @(negedge clk);
      sel = $urandom_range(9);
      if (sel < 3) v = -longint'($urandom_range(100000));
      else if (sel < 5) v = 0;
      else if (sel < 8) v = $urandom_range(40000);
      else v = $urandom_range(2000000);
      if (it % 100 == 0) shift = 5'($urandom_range(4));
      in_vld = 1;
      in_value = ACC_W'(v);
      in_idx = IDX_W'(it % 37);
      in_last = (it % 37 == 36) || ($urandom_range(9) == 0);
      r = (v < 0) ? 0 : (v >>> shift);
      if (r > 32767) r = 32767;
      if (r != 0) begin
        entry_t e;
        e.idx = in_idx;
        e.data = DATA_W'(r);
        exp_e.push_back(e);
        cnt++;
      end
      if (in_last) begin
        exp_c.push_back(cnt);
        cnt = 0;
      end
    end
    @(negedge clk);
    in_vld = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_e.size() != 0 || exp_c.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
