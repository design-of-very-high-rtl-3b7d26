// tb_mf_ars: checks the Active Rule Selector. Loads ordered MF supports for
// four inputs, applies random input sets and compares the registered base
// fuzzy set of every input, one clock after ld, with a reference scan; also
// checks that the register holds while ld is low.
module tb_mf_ars;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;

  logic        sup_we, ld;
  logic [1:0]  sup_var;
  fs_idx_t     sup_fs;
  mf_support_t sup_data;
  val_t        x [4];
  fs_idx_t     base_q [4];
  val_t        x_q [4];

  mf_ars dut (.*);

  int checks = 0, failures = 0;
  mf_support_t m_sup [4][N_FS];

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
    int exp [4];
    sup_we = 0; ld = 0;
    for (int v = 0; v < 4; v++) x[v] = '0;
    for (int v = 0; v < 4; v++) begin
      automatic int pos = $urandom_range(0, 5);
      for (int f = 0; f < N_FS; f++) begin
        automatic int first = pos, last;
        // some neighbours overlap, some leave a gap
        last = first + $urandom_range(8, 30);
        if (last > 127) last = 127;
        pos = last - $urandom_range(0, 10) + (($urandom_range(0, 3) == 0) ? 12 : 0);
        if (pos > 127) pos = 127;
        if (pos < first) pos = first;
        m_sup[v][f] = '{first: val_t'(first), last: val_t'(last)};
        @(negedge clk);
        sup_we = 1; sup_var = 2'(v); sup_fs = fs_idx_t'(f); sup_data = m_sup[v][f];
      end
    end
    @(negedge clk);
    sup_we = 0;
    for (int i = 0; i < 400; i++) begin
      for (int v = 0; v < 4; v++) begin
        x[v] = val_t'($urandom_range(0, 127));
        exp[v] = ref_lo(int'(x[v]), m_sup[v]);
      end
      ld = 1;
      @(negedge clk);
      ld = 0;
      for (int v = 0; v < 4; v++) begin
        check(int'(base_q[v]) == exp[v], $sformatf("var %0d x %0d base %0d expected %0d", v, x[v], base_q[v], exp[v]));
        check(x_q[v] == x[v], "x not registered");
      end
      for (int v = 0; v < 4; v++) x[v] = val_t'($urandom_range(0, 127));
      @(negedge clk);
      for (int v = 0; v < 4; v++) check(int'(base_q[v]) == exp[v], "base changed without ld");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
