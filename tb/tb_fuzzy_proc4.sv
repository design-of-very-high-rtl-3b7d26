// tb_fuzzy_proc4: end to end test of the four input fuzzy processor at its
// default size (4 inputs, 7 fuzzy sets, 2401 rules), driven and checked by
// proc4_agent (see there for what is covered).
module tb_fuzzy_proc4;
  import fuzzy_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz

  logic        in_valid, in_ready;
  val_t        in_x [4];
  tnorm_e      tnorm;
  logic        sup_we, shp_we, rule_we;
  logic [1:0]  sup_var, shp_var;
  fs_idx_t     sup_fs, shp_fs;
  mf_support_t sup_data;
  mf_shape_t   shp_data;
  logic [RADDR_W-1:0] rule_addr;
  rule_word_t  rule_data;
  logic        out_valid;
  val_t        out_z;
  int          checks, failures;
  logic        finished;

  fuzzy_proc4 dut (.*);
  proc4_agent agent (.*);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      wait (finished);
      repeat (100_000) @(posedge clk);
    join_any
    if (!finished) $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + (finished ? 0 : 1));
    $finish;
  end
endmodule
