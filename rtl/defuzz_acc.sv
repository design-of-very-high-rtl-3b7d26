// defuzz_acc: Sugeno inference and defuzzification sums (pipeline stages 11
// and 12).
//
// Stage 11 accumulates sum(theta) and forms the product theta*Z of the
// current rule; stage 12 accumulates sum(Z*theta). The first rule of a data
// set (first tag) restarts both sums, so consecutive data sets follow each
// other without a gap. When the last rule of a set leaves stage 12, done
// pulses for one clock with the two final sums, which go to the divider.
//
// Widths: with the defaults (16 rules, 4 bit theta, 7 bit Z) sum(theta)
// needs 8 bits and sum(Z*theta) 15 bits; both follow from N_ACT, AW and ZW,
// which the genetic processor sets to 60 rules and 9 bit Z.
//
// The split of the two stages follows the processor description; the
// first/last tagging is this design's own.
module defuzz_acc
  import fuzzy_pkg::*;
#(
  parameter int unsigned N_ACT = 16,
  parameter int unsigned AW    = ALPHA_W,
  parameter int unsigned ZW    = Z_W,
  localparam int unsigned ST_W  = $clog2(N_ACT * ((1 << AW) - 1) + 1),
  localparam int unsigned SZT_W = $clog2(N_ACT * ((1 << AW) - 1) * ((1 << ZW) - 1) + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic             first,
  input  logic             last,
  input  logic [AW-1:0]    theta,
  input  logic [ZW-1:0]    z,
  output logic             done,
  output logic [ST_W-1:0]  sum_t,
  output logic [SZT_W-1:0] sum_zt
);

  localparam int unsigned P_W = AW + ZW;

  logic             s11_valid, s11_first, s11_last;
  logic [ST_W-1:0]  s11_sum_t;
  logic [P_W-1:0]   s11_prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s11_valid <= 1'b0;
      s11_first <= 1'b0;
      s11_last  <= 1'b0;
      done      <= 1'b0;
    end else begin
      s11_valid <= valid;
      s11_first <= valid && first;
      s11_last  <= valid && last;
      done      <= s11_valid && s11_last;
    end
  end

  always_ff @(posedge clk) begin
    if (valid) begin
      s11_sum_t <= (first ? '0 : s11_sum_t) + ST_W'(theta);
      s11_prod  <= P_W'(theta) * P_W'(z);
    end
    if (s11_valid) begin
      sum_zt <= (s11_first ? '0 : sum_zt) + SZT_W'(s11_prod);
      sum_t  <= s11_sum_t;
    end
  end

endmodule
