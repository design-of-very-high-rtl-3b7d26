// tb_theta_op: streams random alpha sets and premise codes, one per clock, in
// MIN and in Product mode, and checks each theta four clocks later against
// the reference (rejected inputs count as 1.0, an all zero premise gives 0).
module tb_theta_op;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;

  tnorm_e     tnorm;
  alpha_t     alpha [4];
  logic [3:0] premise;
  alpha_t     theta;

  theta_op dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$];
  int nnull = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin

    tnorm = TNORM_MIN; premise = '0;
    for (int v = 0; v < 4; v++) alpha[v] = '0;
    for (int m = 0; m < 2; m++) begin
      tnorm = (m != 0) ? TNORM_PRODUCT : TNORM_MIN;
      exp_q.delete();
      for (int i = 0; i < 2000; i++) begin
        int al [4];
        for (int v = 0; v < 4; v++) begin
          al[v] = $urandom_range(0, 15);
          alpha[v] = alpha_t'(al[v]);
        end
        premise = 4'($urandom_range(0, 15));
        if (premise == 0) nnull++;
        exp_q.push_back(ref_theta(al, premise, m != 0));
        @(negedge clk);
        if (exp_q.size() == 4) begin
          automatic int e = exp_q.pop_front();
          checks++;
          if (int'(theta) != e) begin
            failures++;
            $display("FAIL: mode %0d theta %0d expected %0d", m, theta, e);
          end
        end
      end
    end
    checks++;
    if (nnull == 0) begin failures++; $display("FAIL: no absent rule"); end
    $display("absent rules %0d", nnull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
