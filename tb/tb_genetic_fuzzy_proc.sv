// tb_genetic_fuzzy_proc: end to end test of the ten input genetic fuzzy
// processor at its default size (10 inputs, 60 rules, 4 systems), driven and
// checked by genetic_agent (see there for what is covered).
module tb_genetic_fuzzy_proc;
  import genetic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz

  logic       in_valid, in_ready;
  g_val_t     in_x [G_N_IN];
  logic [1:0] in_sys;
  logic       rule_we, sys_we;
  g_raddr_t   rule_addr;
  g_rule_t    rule_data;
  logic [1:0] sys_idx;
  g_sys_t     sys_data;
  logic       out_valid;
  g_val_t     out_z;
  int         checks, failures;
  logic       finished;

  genetic_fuzzy_proc dut (.*);
  genetic_agent agent (.*);

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
