// fuzzy_chips_top: the two fuzzy processors side by side.
//
// p4_* : four input processor with active rule selection (fuzzy_proc4 at
//        its default size: 4 inputs of 7 bits, 7 fuzzy sets each, 2401 rules,
//        16 active rules per data set, one rule per clock).
// g_*  : ten input processor for genetic fuzzy systems (genetic_fuzzy_proc:
//        10 inputs of 9 bits, 60 rules, four selectable systems).
// The two share only the clock and the reset; each keeps its own handshake,
// configuration ports and output, exactly as described in its own module.
// Both run at the 50 MHz clock the processors were designed for.
module fuzzy_chips_top
  import fuzzy_pkg::*;
  import genetic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // four input processor
  input  logic               p4_in_valid,
  output logic               p4_in_ready,
  input  val_t               p4_in_x [4],
  input  tnorm_e             p4_tnorm,
  input  logic               p4_sup_we,
  input  logic [1:0]         p4_sup_var,
  input  fs_idx_t            p4_sup_fs,
  input  mf_support_t        p4_sup_data,
  input  logic               p4_shp_we,
  input  logic [1:0]         p4_shp_var,
  input  fs_idx_t            p4_shp_fs,
  input  mf_shape_t          p4_shp_data,
  input  logic               p4_rule_we,
  input  logic [RADDR_W-1:0] p4_rule_addr,
  input  rule_word_t         p4_rule_data,
  output logic               p4_out_valid,
  output val_t               p4_out_z,
  // genetic processor
  input  logic               g_in_valid,
  output logic               g_in_ready,
  input  g_val_t             g_in_x [G_N_IN],
  input  logic [1:0]         g_in_sys,
  input  logic               g_rule_we,
  input  g_raddr_t           g_rule_addr,
  input  g_rule_t            g_rule_data,
  input  logic               g_sys_we,
  input  logic [1:0]         g_sys_idx,
  input  g_sys_t             g_sys_data,
  output logic               g_out_valid,
  output g_val_t             g_out_z
);

  fuzzy_proc4 u_proc4 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (p4_in_valid),
    .in_ready (p4_in_ready),
    .in_x     (p4_in_x),
    .tnorm    (p4_tnorm),
    .sup_we   (p4_sup_we),
    .sup_var  (p4_sup_var),
    .sup_fs   (p4_sup_fs),
    .sup_data (p4_sup_data),
    .shp_we   (p4_shp_we),
    .shp_var  (p4_shp_var),
    .shp_fs   (p4_shp_fs),
    .shp_data (p4_shp_data),
    .rule_we  (p4_rule_we),
    .rule_addr(p4_rule_addr),
    .rule_data(p4_rule_data),
    .out_valid(p4_out_valid),
    .out_z    (p4_out_z)
  );

  genetic_fuzzy_proc u_genetic (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (g_in_valid),
    .in_ready (g_in_ready),
    .in_x     (g_in_x),
    .in_sys   (g_in_sys),
    .rule_we  (g_rule_we),
    .rule_addr(g_rule_addr),
    .rule_data(g_rule_data),
    .sys_we   (g_sys_we),
    .sys_idx  (g_sys_idx),
    .sys_data (g_sys_data),
    .out_valid(g_out_valid),
    .out_z    (g_out_z)
  );

endmodule
