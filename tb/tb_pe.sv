// tb_pe: the PE is driven the way a sequence decoder drives it: each step
// carries 0-3 head lanes, and when the head job finishes the remaining
// lanes may carry pairs of the next job (flagged nxt). Jobs are chained:
// a job that is not the last of its OA is followed by more pairs of the
// same OA. The testbench keeps the running sum of products itself and
// expects one psum per OA, with the OA's address, when its last job ends.
// The output is randomly back-pressured; the PE is only stepped when ready.
module tb_pe;
  import snap_pkg::*;
  localparam int M = N_MULT;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step = 0, head_done = 0, head_last = 0, ready, out_vld, out_rdy;
  logic [M-1:0] lane_vld = '0, lane_nxt = '0;
  logic signed [M-1:0][DATA_W-1:0] w_data = '0, ia_data = '0;
  logic [OA_AW-1:0] head_tag = '0;
  psum_t out_ps;
  int checks = 0, failures = 0, splits = 0;
  psum_t exp_q [$];

  pe dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (out_vld && out_rdy) begin
      checks++;
      if (exp_q.size() == 0 || out_ps != exp_q[0]) begin
        failures++;
        $display("FAIL psum %0d @%0d", out_ps.value, out_ps.addr);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  always @(negedge clk) out_rdy = ($urandom_range(3) != 0);

  initial begin
    longint acc;
    int tag, nsteps;
    acc = 0;
    tag = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nsteps = 0;
    while (nsteps < 3000) begin
      int nh;
      bit dn, ls;
      longint hs, ns;
      @(negedge clk);
      #1;
      if (!ready) begin step = 0; continue; end
      nsteps++;
      nh = $urandom_range(M);
      dn = (nh < M) ? ($urandom_range(2) == 0) : 1'b0;
      ls = dn && ($urandom_range(1) == 0);
      hs = 0; ns = 0;
      for (int k = 0; k < M; k++) begin
        w_data[k]  = DATA_W'($urandom_range(65535));
        ia_data[k] = DATA_W'($urandom_range(65535));
        if (k < nh) begin
          lane_vld[k] = 1; lane_nxt[k] = 0;
          hs += longint'($signed(w_data[k])) * longint'($signed(ia_data[k]));
        end else begin
          lane_nxt[k] = 1;
          lane_vld[k] = dn && ($urandom_range(1) == 0);
          if (lane_vld[k]) ns += longint'($signed(w_data[k])) * longint'($signed(ia_data[k]));
        end
      end
      if (dn && ns != 0 && nh > 0) splits++;
      step = 1; head_done = dn; head_last = ls; head_tag = OA_AW'(tag);
      acc += hs;
      if (dn && ls) begin
        psum_t e;
        e.addr = OA_AW'(tag);
        e.value = ACC_W'(acc);
        exp_q.push_back(e);
        acc = ns;
        tag++;
      end else if (dn) acc += ns;
    end
    @(negedge clk);
    step = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || splits == 0) failures++;
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
