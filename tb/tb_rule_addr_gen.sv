// tb_rule_addr_gen: checks the issue of the 16 active rules. For random base
// indices it holds busy until release, and checks, per clock, the stage 2
// fuzzy set indices, first/last tags and input values, the stage 3 rule
// address (mixed radix 7, one clock later) and that release comes in the
// sixteenth issue clock. Two data sets are also run back to back.
module tb_rule_addr_gen;
  import fuzzy_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic    busy, release_o, s2_valid, s2_first, s2_last;
  fs_idx_t base [4];
  val_t    x [4];
  fs_idx_t s2_fs [4];
  val_t    s2_x [4];
  logic [RADDR_W-1:0] s3_raddr;

  rule_addr_gen dut (.*);

  int checks = 0, failures = 0;
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

  int exp_addr = -1;
  initial begin
    busy = 0;
    for (int v = 0; v < 4; v++) begin base[v] = '0; x[v] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      for (int v = 0; v < 4; v++) begin
        base[v] = fs_idx_t'($urandom_range(0, 5));
        x[v] = val_t'($urandom_range(0, 127));
      end
      busy = 1;
      for (int r = 0; r < 16; r++) begin
        check(release_o == (r == 15), $sformatf("release at rule %0d", r));
        @(negedge clk);
        begin
          automatic int addr = 0;
          check(s2_valid && s2_first == (r == 0) && s2_last == (r == 15), "tags");
          for (int v = 0; v < 4; v++) begin
            automatic int f = int'(base[v]) + ((r >> (3 - v)) & 1);
            check(int'(s2_fs[v]) == f, $sformatf("rule %0d var %0d fs %0d expected %0d", r, v, s2_fs[v], f));
            check(s2_x[v] == x[v], "x");
            addr = addr * 7 + f;
          end
          if (exp_addr >= 0) check(int'(s3_raddr) == exp_addr, $sformatf("raddr %0d expected %0d", s3_raddr, exp_addr));
          exp_addr = addr;
        end
      end
      if (t % 2 == 0) begin
        busy = 0;
        @(negedge clk);
        check(int'(s3_raddr) == exp_addr, "last raddr");
        check(!s2_valid, "valid without busy");
        exp_addr = -1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
