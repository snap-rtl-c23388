// tb_aim: random windows of weight and IA channel indices (IA indices may
// repeat, so the priority rule is exercised) are applied to the 32x32 AIM;
// for every weight row the testbench searches its own list for the lowest
// matching valid IA and compares hit and address.
module tb_aim;
  import snap_pkg::*;
  localparam int N = AIM_N, AW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0][IDX_W-1:0] w_idx, ia_idx;
  logic [N-1:0] w_vld, ia_vld, hit;
  logic [N-1:0][AW-1:0] ia_addr;
  int checks = 0, failures = 0, nhits = 0;

  aim dut (.*);

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int i = 0; i < N; i++) begin
        w_idx[i]  = IDX_W'($urandom_range(it % 3 == 0 ? 15 : 63));
        ia_idx[i] = IDX_W'($urandom_range(it % 3 == 0 ? 15 : 63));
        w_vld[i]  = ($urandom_range(9) < 8);
        ia_vld[i] = ($urandom_range(9) < 8);
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        int exp_a;
        exp_a = -1;
        for (int j = 0; j < N; j++)
          if (exp_a < 0 && w_vld[i] && ia_vld[j] && w_idx[i] == ia_idx[j]) exp_a = j;
        checks++;
        if (hit[i] != (exp_a >= 0) || (exp_a >= 0 && ia_addr[i] != AW'(exp_a))) begin
          failures++;
          if (failures < 5) $display("FAIL it %0d row %0d: hit %0b addr %0d expected %0d",
                                     it, i, hit[i], ia_addr[i], exp_a);
        end
        if (exp_a >= 0) nhits++;
      end
    end
    checks++;
    if (nhits == 0) failures++;
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
