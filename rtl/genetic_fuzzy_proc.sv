// genetic_fuzzy_proc: ten input Sugeno fuzzy processor for genetic fuzzy
// systems.
//
// A genetic rule generator yields few rules, each with its own membership
// functions, and most of them fire for any input, so there is no active rule
// selection: every rule of the chosen fuzzy system is processed, one per
// clock. Up to four fuzzy systems live in the 60 rule memory; the system
// table gives each its first rule and rule count, and every data set names
// the system (in_sys) that evaluates it.
//
// Pipeline, one rule per clock:
//   G1    : rule memory read (address = first + rule counter)
//   G2-G4 : gen_alpha for each of the ten inputs; Z and tags carried along
//   G5    : theta = minimum of the ten alpha values
//   G6-G7 : defuzz_acc, sum(theta), theta*Z, sum(Z*theta)
//   then  : seq_divider (6 clocks), Zo = sum(Z*theta)/sum(theta)
// A data set of n rules takes n clocks (20 ns per rule at 50 MHz); back to
// back sets are accepted every max(n, 6) clocks, the 6 being the divider's
// time, so that no result is lost for systems of fewer than 6 rules.
// out_valid rises n + 12 clocks after the accepting edge. A system whose count is 0 is run as if it had one rule.
//
// Interface: in_valid/in_ready take the ten 9 bit inputs and the system
// number; rule_we writes a rule word; sys_we writes the system table. Write
// the tables only while no data set is in flight.
//
// The ten 9 bit inputs, 9 bit output, 60 rules, four selectable systems, one
// rule per clock and the Sugeno output follow the processor description. The
// minimum as T-norm, the 4 bit truth values, the system table, the handshake
// and the stage split are this design's own.
//
// An assertion checks that an offered data set stays offered until taken.
// Its disable iff samples rst_n at the clock, so lint reports rst_n as used
// both asynchronously and synchronously. The assertion is not part of the
// circuit, and the reset stays asynchronous.
module genetic_fuzzy_proc
  import genetic_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  g_val_t                     in_x [G_N_IN],
  input  logic [$clog2(G_N_SYS)-1:0] in_sys,
  input  logic                       rule_we,
  input  g_raddr_t                   rule_addr,
  input  g_rule_t                    rule_data,
  input  logic                       sys_we,
  input  logic [$clog2(G_N_SYS)-1:0] sys_idx,
  input  g_sys_t                     sys_data,
  output logic                       out_valid,
  output g_val_t                     out_z
);

  localparam int unsigned ST_W  = $clog2(G_N_RULES * G_AMAX + 1);
  localparam int unsigned SZT_W = $clog2(G_N_RULES * G_AMAX * ((1 << G_IN_W) - 1) + 1);
  localparam int unsigned TAG_D = 5;   // G1 -> G5
  localparam int unsigned DIV_BPC = 2;
  // clocks the divider needs between two starts: load plus its steps
  localparam int unsigned MIN_SET = (G_IN_W + 1 + DIV_BPC - 1) / DIV_BPC + 1;

  // ---------------------------------------------------------------- system table
  g_sys_t sys_tab [G_N_SYS];
  always_ff @(posedge clk) begin
    if (sys_we) sys_tab[sys_idx] <= sys_data;
  end

  // ---------------------------------------------------------------- data set register and rule issue
  logic     busy, last_issue;
  g_val_t   cur_x [G_N_IN];
  g_raddr_t cur_first, cur_last_cnt, cnt;
  logic [$clog2(MIN_SET)-1:0] hold;   // clocks until the divider can take another set

  assign last_issue = busy && (cnt == cur_last_cnt);
  assign in_ready   = (!busy || last_issue) && hold == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      hold <= '0;
    end else begin
      if (in_valid && in_ready) hold <= ($bits(hold))'(MIN_SET - 1);
      else if (hold != '0)      hold <= hold - 1'b1;
      if (in_valid && in_ready) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (last_issue) begin
        busy <= 1'b0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      cur_x        <= in_x;
      cur_first    <= sys_tab[in_sys].first;
      cur_last_cnt <= (sys_tab[in_sys].count == '0) ? '0 : sys_tab[in_sys].count - 1'b1;
    end
  end

  // ---------------------------------------------------------------- G1
  g_rule_t g1_rule;
  g_val_t  g1_x [G_N_IN];

  gen_rule_mem u_rules (
    .clk    (clk),
    .wr_en  (rule_we),
    .wr_addr(rule_addr),
    .wr_data(rule_data),
    .raddr  (cur_first + cnt),
    .rdata  (g1_rule)
  );

  always_ff @(posedge clk) g1_x <= cur_x;

  logic [2:0] tag [TAG_D];   // {valid, first, last}, G1 .. G5
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAG_D; i++) tag[i] <= '0;
    end else begin
      tag[0] <= {busy, busy && cnt == '0, last_issue};
      for (int i = 1; i < TAG_D; i++) tag[i] <= tag[i-1];
    end
  end

  // ---------------------------------------------------------------- G2-G4
  g_alpha_t g4_alpha [G_N_IN];
  for (genvar v = 0; v < G_N_IN; v++) begin : g_in
    gen_alpha u_alpha (
      .clk  (clk),
      .x    (g1_x[v]),
      .mf   (g1_rule.mf[v]),
      .alpha(g4_alpha[v])
    );
  end

  g_val_t zsh [3];
  always_ff @(posedge clk) begin
    zsh[0] <= g1_rule.z;
    zsh[1] <= zsh[0];
    zsh[2] <= zsh[1];
  end

  // ---------------------------------------------------------------- G5
  g_alpha_t g5_theta, min_d;
  g_val_t   g5_z;
  always_comb begin
    min_d = g4_alpha[0];
    for (int v = 1; v < G_N_IN; v++)
      if (g4_alpha[v] < min_d) min_d = g4_alpha[v];
  end
  always_ff @(posedge clk) begin
    g5_theta <= min_d;
    g5_z     <= zsh[2];
  end

  // ---------------------------------------------------------------- G6-G7
  logic             acc_done;
  logic [ST_W-1:0]  sum_t;
  logic [SZT_W-1:0] sum_zt;

  defuzz_acc #(.N_ACT(G_N_RULES), .AW(G_AW), .ZW(G_IN_W)) u_defuzz (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (tag[TAG_D-1][2]),
    .first (tag[TAG_D-1][1]),
    .last  (tag[TAG_D-1][0]),
    .theta (g5_theta),
    .z     (g5_z),
    .done  (acc_done),
    .sum_t (sum_t),
    .sum_zt(sum_zt)
  );

  seq_divider #(
    .NUM_W(SZT_W),
    .DEN_W(ST_W),
    .Q_W  (G_IN_W + 1),
    .OUT_W(G_IN_W),
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
    else $error("genetic_fuzzy_proc: in_valid dropped before in_ready");

endmodule
