// tb_cfg_adder_tree: every break configuration with random products; the
// expected group sums are formed directly from the lane grouping.
module tb_cfg_adder_tree;
  import snap_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [2:0][ACC_W-1:0] p, s;
  logic [1:0] brk;
  logic [2:0] grp_vld;
  int checks = 0, failures = 0;

  cfg_adder_tree dut (.*);

  initial begin
    for (int it = 0; it < 400; it++) begin
      logic signed [ACC_W-1:0] e [3];
      logic [2:0] ev;
      for (int k = 0; k < 3; k++) p[k] = ACC_W'($urandom_range(200000) - 100000);
      brk = 2'(it % 4);
      // group start lanes and sums
      ev = {brk[1], brk[0], 1'b1};
      e[2] = p[2];
      e[1] = brk[1] ? p[1] : p[1] + p[2];
      e[0] = brk[0] ? p[0] : (brk[1] ? p[0] + p[1] : p[0] + p[1] + p[2]);
      @(posedge clk);
      checks++;
      if (grp_vld != ev) failures++;
      for (int k = 0; k < 3; k++)
        if (ev[k]) begin
          checks++;
          if (s[k] != e[k]) begin
            failures++;
            $display("FAIL brk %b lane %0d: %0d expected %0d", brk, k, s[k], e[k]);
          end
        end
    end
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
