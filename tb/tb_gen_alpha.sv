// tb_gen_alpha: streams random inputs and symmetric trapezoids, one per clock,
// and checks each alpha three clocks later against the reference: 15 within
// the top half width, 0 beyond the support half width, a linear fall between.
module tb_gen_alpha;
  import genetic_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;

  g_val_t   x;
  g_mf_t    mf;
  g_alpha_t alpha;

  gen_alpha dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$];

  function automatic int ref_alpha(int xv, g_mf_t m);
    automatic int d = (xv > int'(m.centre)) ? xv - int'(m.centre) : int'(m.centre) - xv;
    if (d <= int'(m.top)) return 15;
    if (d >= int'(m.base)) return 0;
    return ((int'(m.base) - d) * 15) / (int'(m.base) - int'(m.top));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int nmid = 0;
    x = '0; mf = '0;
    for (int i = 0; i < 4000; i++) begin
      automatic int t = $urandom_range(0, 100);
      mf.centre = g_val_t'($urandom_range(0, 511));
      mf.top = g_val_t'(t);
      mf.base = g_val_t'((i % 50 == 0) ? $urandom_range(0, t) : t + $urandom_range(1, 300));
      x = g_val_t'($urandom_range(0, 511));
      exp_q.push_back(ref_alpha(int'(x), mf));
      @(negedge clk);
      if (exp_q.size() == 3) begin
        automatic int e = exp_q.pop_front();
        checks++;
        if (e > 0 && e < 15) nmid++;
        if (int'(alpha) != e) begin
          failures++;
          $display("FAIL: alpha %0d expected %0d", alpha, e);
        end
      end
    end
    checks++;
    if (nmid == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
