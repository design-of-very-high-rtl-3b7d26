// tb_alpha_gen: checks the MF generator. Writes seven random trapezoids (with
// shoulders, triangles and wide plateaus) and streams one random (fuzzy set,
// x) pair per clock; every alpha must equal the reference trapezoid value four
// clocks later.
module tb_alpha_gen;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;

  logic      shp_we;
  fs_idx_t   shp_fs, fs;
  mf_shape_t shp_data;
  val_t      x;
  alpha_t    alpha;

  alpha_gen dut (.*);

  int checks = 0, failures = 0;
  mf_shape_t m [N_FS];
  int exp_q [$];

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n15 = 0, nmid = 0;
    shp_we = 0; fs = '0; x = '0;
    for (int f = 0; f < N_FS; f++) begin
      int p [4];
      for (int k = 0; k < 4; k++) p[k] = $urandom_range(0, 127);
      p.sort();
      if (f == 1) p[1] = p[0];          // vertical left edge
      if (f == 2) p[2] = p[1];          // triangle
      m[f] = '{a: val_t'(p[0]), b: val_t'(p[1]), c: val_t'(p[2]), d: val_t'(p[3])};
      @(negedge clk);
      shp_we = 1; shp_fs = fs_idx_t'(f); shp_data = m[f];
    end
    @(negedge clk);
    shp_we = 0;
    for (int i = 0; i < 3000; i++) begin
      fs = fs_idx_t'($urandom_range(0, N_FS - 1));
      x = val_t'($urandom_range(0, 127));
      exp_q.push_back(ref_alpha(int'(x), m[fs]));
      @(negedge clk);
      if (exp_q.size() == 4) begin
        automatic int e = exp_q.pop_front();
        check(int'(alpha) == e, $sformatf("alpha %0d expected %0d", alpha, e));
        if (e == 15) n15++; else if (e > 0) nmid++;
      end
    end
    check(n15 > 0 && nmid > 0, "plateau and edges both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
