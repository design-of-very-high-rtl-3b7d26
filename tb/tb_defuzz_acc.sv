// tb_defuzz_acc: feeds data sets of 16 rules (random theta and Z), mostly back
// to back and sometimes with idle clocks between them, and checks that done
// pulses two clocks after each last rule with sum(theta) and sum(Z*theta) of
// exactly that set.
module tb_defuzz_acc;
  import fuzzy_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic        valid, first, last, done;
  alpha_t      theta;
  z_t          z;
  logic [7:0]  sum_t;
  logic [14:0] sum_zt;

  defuzz_acc dut (.*);

  int checks = 0, failures = 0;
  int exp_t [$], exp_zt [$], due [$];
  int cyc = 0;
  always @(negedge clk) cyc++;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  always @(negedge clk) begin
    if (rst_n && done) begin
      check(exp_t.size() > 0, "done without a set");
      if (exp_t.size() > 0) begin
        automatic int et = exp_t.pop_front(), ez = exp_zt.pop_front(), d = due.pop_front();
        check(int'(sum_t) == et && int'(sum_zt) == ez,
              $sformatf("sums %0d %0d expected %0d %0d", sum_t, sum_zt, et, ez));
        check(cyc == d, $sformatf("done at %0d expected %0d", cyc, d));
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; first = 0; last = 0; theta = '0; z = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 100; s++) begin
      automatic int st = 0, szt = 0;
      for (int r = 0; r < 16; r++) begin
        valid = 1; first = (r == 0); last = (r == 15);
        theta = alpha_t'((s % 10 == 0) ? 15 : $urandom_range(0, 15));
        z = z_t'((s % 10 == 0) ? 127 : $urandom_range(0, 127));
        st += int'(theta);
        szt += int'(theta) * int'(z);
        if (r == 15) begin
          exp_t.push_back(st);
          exp_zt.push_back(szt);
          due.push_back(cyc + 3);
        end
        @(negedge clk);
      end
      valid = 0; first = 0; last = 0;
      if (s % 3 == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(exp_t.size() == 0, "missing done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
