// theta_op: MIN or Product operator (pipeline stages 7 to 10).
//
// Turns the alpha values of one rule into its premise truth theta.
//   stage 7  : alpha selection/rejection. An input variable whose premise
//              code bit is 0 is absent from the rule, so its alpha is replaced
//              by the neutral value 15 (truth 1.0). A premise code of all zeros
//              marks a rule that does not exist; its theta is forced to 0.
//   stage 8-9: a tree of three identical two-input cells, each computing both
//              the minimum and the renormalised product of its two inputs.
//   stage 10 : theta is taken from the MIN or the Product tree (tnorm).
// One rule per clock, four clocks from alpha to theta. Up to four inputs are
// supported; fewer are padded with the neutral value.
//
// The stage split, the three two-input cells and the MIN/Product choice
// follow the processor description; replacing a rejected alpha by 15 and the
// product renormalisation (p*q/15) are this design's own.
module theta_op
  import fuzzy_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  logic              clk,
  input  tnorm_e            tnorm,
  input  alpha_t            alpha   [N_IN],
  input  logic [MAX_IN-1:0] premise,
  output alpha_t            theta
);

  // stage 7
  alpha_t s7_a [MAX_IN];
  logic   s7_null;
  always_ff @(posedge clk) begin
    for (int v = 0; v < MAX_IN; v++) begin
      if (v < N_IN && premise[MAX_IN-1-v]) s7_a[v] <= alpha[v];
      else                                 s7_a[v] <= alpha_t'(ALPHA_MAX);
    end
    s7_null <= (premise[MAX_IN-1 -: N_IN] == '0);
  end

  // stage 8: first level cells
  alpha_t s8_min [2];
  alpha_t s8_prd [2];
  logic   s8_null;
  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      s8_min[k] <= (s7_a[2*k] < s7_a[2*k+1]) ? s7_a[2*k] : s7_a[2*k+1];
      s8_prd[k] <= alpha_mul(s7_a[2*k], s7_a[2*k+1]);
    end
    s8_null <= s7_null;
  end

  // stage 9: second level cell
  alpha_t s9_min, s9_prd;
  logic   s9_null;
  always_ff @(posedge clk) begin
    s9_min  <= (s8_min[0] < s8_min[1]) ? s8_min[0] : s8_min[1];
    s9_prd  <= alpha_mul(s8_prd[0], s8_prd[1]);
    s9_null <= s8_null;
  end

  // stage 10: theta selection
  always_ff @(posedge clk) begin
    if (s9_null)                     theta <= '0;
    else if (tnorm == TNORM_PRODUCT) theta <= s9_prd;
    else                             theta <= s9_min;
  end

endmodule
