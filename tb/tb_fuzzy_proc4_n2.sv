// tb_fuzzy_proc4_n2: end to end test of the two input variant of the fuzzy
// processor (fuzzy_proc4 with N_IN = 2: 49 rules, 4 active rules per data
// set, a data set every 4 clocks, 18 clocks latency), driven and checked by
// proc4_agent.
module tb_fuzzy_proc4_n2;
  import fuzzy_pkg::*;

  localparam int N_IN = 2;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz

  logic        in_valid, in_ready;
  val_t        in_x [N_IN];
  tnorm_e      tnorm;
  logic        sup_we, shp_we, rule_we;
  logic        sup_var, shp_var;
  fs_idx_t     sup_fs, shp_fs;
  mf_support_t sup_data;
  mf_shape_t   shp_data;
  logic [RADDR_W-1:0] rule_addr;
  rule_word_t  rule_data;
  logic        out_valid;
  val_t        out_z;
  int          checks, failures;
  logic        finished;

  fuzzy_proc4 #(.N_IN(N_IN)) dut (.*);
  proc4_agent #(.N_IN(N_IN)) agent (.*);

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
