// tb_input_aligner: random bank words and offsets; entry k of the output
// must be the word of bank (off + k) mod NB.
module tb_input_aligner;
  import snap_pkg::*;
  localparam int NB = FETCH_N;
  logic clk = 0;
  always #5 clk = ~clk;
  entry_t [NB-1:0] bank_data, aligned;
  logic [$clog2(NB)-1:0] off;
  int checks = 0, failures = 0;

  input_aligner dut (.*);

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int b = 0; b < NB; b++) bank_data[b] = entry_t'($urandom);
      off = $clog2(NB)'($urandom_range(NB - 1));
      @(posedge clk);
      for (int k = 0; k < NB; k++) begin
        checks++;
        if (aligned[k] != bank_data[(int'(off) + k) % NB]) failures++;
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
