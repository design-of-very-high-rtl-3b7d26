// fuzzy_proc4: pipelined Sugeno fuzzy processor with active rule selection.
//
// The processor evaluates a zero order Sugeno fuzzy system of N_IN inputs
// (7 bit each, 7 trapezoidal fuzzy sets per input) and one 7 bit output. The
// full rule base of 7^N_IN rules is stored, but with at most two membership
// functions overlapping only 2^N_IN rules can be non zero for a given input
// data set; only those are processed, one per clock, so the time per data set
// does not depend on the fuzzy system. With N_IN = 4 a data set takes 16
// clocks (320 ns at 50 MHz); N_IN = 2 gives the two input variant, 4 clocks.
//
// Pipeline (one rule per clock through stages 2..12):
//   input register : data set taken on in_valid && in_ready (off pipeline)
//   stage 1        : mf_ars, active fuzzy sets of every input
//   stage 2-3      : rule_addr_gen, MF shape and rule memory addresses
//   stage 3-6      : alpha_gen per input, rule_mem read (premise code, Z)
//   stage 7-10     : theta_op (alpha rejection, MIN/Product, selection),
//                    Z carried along in a shift register
//   stage 11-12    : defuzz_acc, sum(theta), theta*Z, sum(Z*theta)
//   off pipeline   : seq_divider, Zo = sum(Z*theta)/sum(theta)
// A data set accepted at clock edge E produces out_valid after edge E+32
// (1 + 2^N_IN + 10 + 5 clocks; 640 ns for N_IN = 4; E+18 for N_IN = 2, whose
// divider retires 4 bits per clock to keep up with a set every 4 clocks). Data sets can be accepted
// back to back every 2^N_IN clocks; in_ready is low otherwise, and a data set
// offered early waits in the input register.
//
// Configuration ports write the MF support memories (sup_*), the MF shape
// memories (shp_*) and the rule memory (rule_*). They should be written while
// no data set is in flight. tnorm selects MIN or Product and is read by every
// rule at stage 10, so it should change only between data sets.
//
// The block structure, stage numbering and the widths follow the processor
// description; the valid/ready input handshake and the configuration write
// ports are this design's own.
//
// An assertion checks that an offered data set stays offered until taken.
// Its disable iff samples rst_n at the clock, so lint reports rst_n as used
// both asynchronously and synchronously. The assertion is not part of the
// circuit, and the reset stays asynchronous.
module fuzzy_proc4
  import fuzzy_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input data set handshake
  input  logic                    in_valid,
  output logic                    in_ready,
  input  val_t                    in_x [N_IN],
  input  tnorm_e                  tnorm,
  // MF support memories
  input  logic                    sup_we,
  input  logic [$clog2(N_IN)-1:0] sup_var,
  input  fs_idx_t                 sup_fs,
  input  mf_support_t             sup_data,
  // MF shape memories
  input  logic                    shp_we,
  input  logic [$clog2(N_IN)-1:0] shp_var,
  input  fs_idx_t                 shp_fs,
  input  mf_shape_t               shp_data,
  // rule memory
  input  logic                    rule_we,
  input  logic [RADDR_W-1:0]      rule_addr,
  input  rule_word_t              rule_data,
  // output
  output logic                    out_valid,
  output val_t                    out_z
);

  localparam int unsigned N_ACT  = 1 << N_IN;
  localparam int unsigned DEPTH  = N_FS ** N_IN;
  localparam int unsigned ST_W   = $clog2(N_ACT * ALPHA_MAX + 1);
  localparam int unsigned SZT_W  = $clog2(N_ACT * ALPHA_MAX * ((1 << Z_W) - 1) + 1);
  localparam int unsigned TAG_D  = 8;   // stage 2 -> stage 10
  localparam int unsigned ZSH_D  = 4;   // stage 6 -> stage 10
  // divider radix: 2 bits per clock (load + 4 steps) unless a data set is
  // shorter than that, as in the two input variant (load + 2 steps)
  localparam int unsigned DIV_BPC = (N_ACT >= 5) ? 2 : 4;

  // ---------------------------------------------------------------- input register
  logic in_full, s1_full, s1_release, in_to_s1;
  val_t in_q [N_IN];

  assign in_to_s1 = in_full && (!s1_full || s1_release);
  assign in_ready = !in_full || in_to_s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_full <= 1'b0;
      s1_full <= 1'b0;
    end else begin
      if (in_valid && in_ready) in_full <= 1'b1;
      else if (in_to_s1)        in_full <= 1'b0;
      if (in_to_s1)             s1_full <= 1'b1;
      else if (s1_release)      s1_full <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) in_q <= in_x;
  end

  // ---------------------------------------------------------------- stage 1
  fs_idx_t s1_base [N_IN];
  val_t    s1_x    [N_IN];

  mf_ars #(.N_IN(N_IN)) u_ars (
    .clk     (clk),
    .sup_we  (sup_we),
    .sup_var (sup_var),
    .sup_fs  (sup_fs),
    .sup_data(sup_data),
    .ld      (in_to_s1),
    .x       (in_q),
    .base_q  (s1_base),
    .x_q     (s1_x)
  );

  // ---------------------------------------------------------------- stages 2-3
  logic               s2_valid, s2_first, s2_last;
  fs_idx_t            s2_fs [N_IN];
  val_t               s2_x  [N_IN];
  logic [RADDR_W-1:0] s3_raddr;

  rule_addr_gen #(.N_IN(N_IN)) u_addr (
    .clk      (clk),
    .rst_n    (rst_n),
    .busy     (s1_full),
    .base     (s1_base),
    .x        (s1_x),
    .release_o(s1_release),
    .s2_valid (s2_valid),
    .s2_first (s2_first),
    .s2_last  (s2_last),
    .s2_fs    (s2_fs),
    .s2_x     (s2_x),
    .s3_raddr (s3_raddr)
  );

  // ---------------------------------------------------------------- stages 3-6
  alpha_t s6_alpha [N_IN];

  for (genvar v = 0; v < N_IN; v++) begin : g_fuzz
    alpha_gen u_alpha (
      .clk     (clk),
      .shp_we  (shp_we && shp_var == ($bits(shp_var))'(v)),
      .shp_fs  (shp_fs),
      .shp_data(shp_data),
      .fs      (s2_fs[v]),
      .x       (s2_x[v]),
      .alpha   (s6_alpha[v])
    );
  end

  rule_word_t s6_rule;

  rule_mem #(.DEPTH(DEPTH)) u_rules (
    .clk    (clk),
    .wr_en  (rule_we),
    .wr_addr(rule_addr),
    .wr_data(rule_data),
    .raddr  (s3_raddr),
    .rdata  (s6_rule)
  );

  // ---------------------------------------------------------------- stages 7-10
  alpha_t s10_theta;

  theta_op #(.N_IN(N_IN)) u_theta (
    .clk    (clk),
    .tnorm  (tnorm),
    .alpha  (s6_alpha),
    .premise(s6_rule.premise),
    .theta  (s10_theta)
  );

  // Z shift process, stages 7-10
  z_t zsh [ZSH_D];
  always_ff @(posedge clk) begin
    zsh[0] <= s6_rule.z;
    for (int i = 1; i < ZSH_D; i++) zsh[i] <= zsh[i-1];
  end

  // rule tags, stage 2 -> stage 10
  logic [2:0] tag [TAG_D];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAG_D; i++) tag[i] <= '0;
    end else begin
      tag[0] <= {s2_valid, s2_first, s2_last};
      for (int i = 1; i < TAG_D; i++) tag[i] <= tag[i-1];
    end
  end

  // ---------------------------------------------------------------- stages 11-12
  logic             acc_done;
  logic [ST_W-1:0]  sum_t;
  logic [SZT_W-1:0] sum_zt;

  defuzz_acc #(.N_ACT(N_ACT)) u_defuzz (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (tag[TAG_D-1][2]),
    .first (tag[TAG_D-1][1]),
    .last  (tag[TAG_D-1][0]),
    .theta (s10_theta),
    .z     (zsh[ZSH_D-1]),
    .done  (acc_done),
    .sum_t (sum_t),
    .sum_zt(sum_zt)
  );

  // ---------------------------------------------------------------- division
  seq_divider #(
    .NUM_W(SZT_W),
    .DEN_W(ST_W),
    .Q_W  (Z_W + 1),
    .OUT_W(IN_W),
    .BPC  (DIV_BPC)
  ) u_div (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (acc_done),
    .num    (sum_zt),
    .den    (sum_t),
    .q_valid(out_valid),
    .q      (out_z)
  );

  // handshake rule: a data set once offered stays offered until it is taken
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid && !in_ready |=> in_valid)
    else $error("fuzzy_proc4: in_valid dropped before in_ready");

endmodule
