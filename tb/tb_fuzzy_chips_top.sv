// tb_fuzzy_chips_top: end to end test of the whole design at its default
// parameters. Both processors run at the same time, each driven and checked
// by its own agent: the four input processor in MIN and Product mode,
// isolated and back to back, with input stalls, absent rules, rejected
// alphas and a zero divisor; the genetic processor on all four fuzzy
// systems, isolated, back to back and switching systems. Every output is
// compared with a reference model, and latency and throughput are checked.
module tb_fuzzy_chips_top;
  import fuzzy_pkg::*;
  import genetic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz

  // four input processor
  logic        p4_in_valid, p4_in_ready;
  val_t        p4_in_x [4];
  tnorm_e      p4_tnorm;
  logic        p4_sup_we, p4_shp_we, p4_rule_we;
  logic [1:0]  p4_sup_var, p4_shp_var;
  fs_idx_t     p4_sup_fs, p4_shp_fs;
  mf_support_t p4_sup_data;
  mf_shape_t   p4_shp_data;
  logic [RADDR_W-1:0] p4_rule_addr;
  rule_word_t  p4_rule_data;
  logic        p4_out_valid;
  val_t        p4_out_z;
  int          p4_checks, p4_failures;
  logic        p4_finished;

  // genetic processor
  logic       g_in_valid, g_in_ready;
  g_val_t     g_in_x [G_N_IN];
  logic [1:0] g_in_sys;
  logic       g_rule_we, g_sys_we;
  g_raddr_t   g_rule_addr;
  g_rule_t    g_rule_data;
  logic [1:0] g_sys_idx;
  g_sys_t     g_sys_data;
  logic       g_out_valid;
  g_val_t     g_out_z;
  int         g_checks, g_failures;
  logic       g_finished;

  fuzzy_chips_top dut (.*);

  proc4_agent p4_agent (
    .clk, .rst_n,
    .in_valid (p4_in_valid),  .in_ready (p4_in_ready), .in_x (p4_in_x), .tnorm (p4_tnorm),
    .sup_we   (p4_sup_we),    .sup_var  (p4_sup_var),  .sup_fs (p4_sup_fs), .sup_data (p4_sup_data),
    .shp_we   (p4_shp_we),    .shp_var  (p4_shp_var),  .shp_fs (p4_shp_fs), .shp_data (p4_shp_data),
    .rule_we  (p4_rule_we),   .rule_addr(p4_rule_addr), .rule_data (p4_rule_data),
    .out_valid(p4_out_valid), .out_z    (p4_out_z),
    .checks   (p4_checks),    .failures (p4_failures), .finished (p4_finished)
  );

  genetic_agent g_agent (
    .clk, .rst_n,
    .in_valid (g_in_valid),  .in_ready (g_in_ready), .in_x (g_in_x), .in_sys (g_in_sys),
    .rule_we  (g_rule_we),   .rule_addr(g_rule_addr), .rule_data (g_rule_data),
    .sys_we   (g_sys_we),    .sys_idx  (g_sys_idx),  .sys_data (g_sys_data),
    .out_valid(g_out_valid), .out_z    (g_out_z),
    .checks   (g_checks),    .failures (g_failures), .finished (g_finished)
  );

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      wait (p4_finished && g_finished);
      repeat (100_000) @(posedge clk);
    join_any
    if (!(p4_finished && g_finished)) $display("FAIL: watchdog");
    $display("four input processor: %0d checks, %0d failures", p4_checks, p4_failures);
    $display("genetic processor: %0d checks, %0d failures", g_checks, g_failures);
    $display("TB_RESULT checks=%0d failures=%0d", p4_checks + g_checks,
             p4_failures + g_failures + ((p4_finished && g_finished) ? 0 : 1));
    $finish;
  end
endmodule
