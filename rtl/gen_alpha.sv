// gen_alpha: truth value of one input for one rule of a genetic fuzzy system.
//
// The rule's membership function for this input is a symmetric trapezoid
// given by its centre, the half width of its flat top and the half width of
// its support. With dist = |x - centre|:
//   dist <= top  : 15
//   dist >= base : 0
//   otherwise    : floor((base - dist) * 15 / (base - top))
// Three pipeline stages (distance and region, scaling, division), one rule per
// clock, alpha three clocks after x and mf.
//
// Symmetric trapezoids follow the processor description; the parameterisation
// by two half widths, the 4 bit result and the stage split are this design's
// own.
module gen_alpha
  import genetic_pkg::*;
(
  input  logic     clk,
  input  g_val_t   x,
  input  g_mf_t    mf,
  output g_alpha_t alpha
);

  localparam int unsigned NUM_W = G_IN_W + G_AW;

  typedef enum logic [1:0] {
    R_ZERO  = 2'd0,
    R_SLOPE = 2'd1,
    R_TOP   = 2'd2
  } region_e;

  // stage 1: distance from the centre and region
  g_val_t  dist_c;
  region_e reg_d, s1_reg;
  g_val_t  num_d, den_d, s1_num, s1_den;
  always_comb begin
    dist_c  = (x >= mf.centre) ? x - mf.centre : mf.centre - x;
    num_d = '0;
    den_d = '0;
    if (dist_c <= mf.top)       reg_d = R_TOP;
    else if (dist_c >= mf.base) reg_d = R_ZERO;
    else begin
      reg_d = R_SLOPE;
      num_d = mf.base - dist_c;
      den_d = mf.base - mf.top;
    end
  end
  always_ff @(posedge clk) begin
    s1_reg <= reg_d;
    s1_num <= num_d;
    s1_den <= den_d;
  end

  // stage 2: numerator times 15
  region_e          s2_reg;
  logic [NUM_W-1:0] s2_num;
  g_val_t           s2_den;
  always_ff @(posedge clk) begin
    s2_reg <= s1_reg;
    s2_num <= NUM_W'(s1_num) * NUM_W'(G_AMAX);
    s2_den <= s1_den;
  end

  // stage 3: division
  logic [NUM_W-1:0] quot;
  always_comb quot = (s2_den == '0) ? NUM_W'(G_AMAX) : s2_num / NUM_W'(s2_den);
  always_ff @(posedge clk) begin
    unique case (s2_reg)
      R_TOP:   alpha <= g_alpha_t'(G_AMAX);
      R_SLOPE: alpha <= (quot > NUM_W'(G_AMAX)) ? g_alpha_t'(G_AMAX) : g_alpha_t'(quot);
      default: alpha <= '0;
    endcase
  end

endmodule
