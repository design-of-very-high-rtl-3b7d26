// alpha_gen: MF shape memory and MF generator of one input variable
// (pipeline stages 3 to 6).
//
// The shape memory holds the four corner points a <= b <= c <= d of each of
// the N_FS trapezoidal membership functions of the variable. For each rule
// the fuzzy set index read in stage 3 selects a shape, and the generator
// computes the 4 bit truth value alpha of the input x:
//   x < a or x > d : 0
//   a <= x < b     : floor((x - a) * 15 / (b - a))      rising edge
//   b <= x <= c    : 15                                  plateau
//   c < x <= d     : floor((d - x) * 15 / (d - c))      falling edge
// Stage 3 reads the memory, stage 4 picks the edge and forms the distances,
// stage 5 scales the numerator by 15 and stage 6 divides. A new rule may
// enter every clock; alpha appears four clocks after fs and x.
//
// Interface: shp_we writes shape shp_data at index shp_fs. fs and x are the
// stage 2 outputs; alpha is the stage 6 register.
//
// The four stored points, the trapezoid-only shapes, the 4 bit alpha and the
// stages 3 to 6 follow the processor description; the edge interpolation
// formula and the work done in each stage are this design's own.
module alpha_gen
  import fuzzy_pkg::*;
(
  input  logic      clk,
  input  logic      shp_we,
  input  fs_idx_t   shp_fs,
  input  mf_shape_t shp_data,
  input  fs_idx_t   fs,
  input  val_t      x,
  output alpha_t    alpha
);

  typedef enum logic [1:0] {
    REG_ZERO  = 2'd0,
    REG_RISE  = 2'd1,
    REG_FLAT  = 2'd2,
    REG_FALL  = 2'd3
  } region_e;

  mf_shape_t shape_mem [N_FS];

  always_ff @(posedge clk) begin
    if (shp_we) shape_mem[shp_fs] <= shp_data;
  end

  // stage 3: shape memory read
  mf_shape_t s3_shape;
  val_t      s3_x;
  always_ff @(posedge clk) begin
    s3_shape <= shape_mem[fs];
    s3_x     <= x;
  end

  // stage 4: region and distances
  region_e s4_reg, reg_d;
  val_t    s4_num, s4_den, num_d, den_d;
  always_comb begin
    num_d = '0;
    den_d = '0;
    if (s3_x < s3_shape.a || s3_x > s3_shape.d) begin
      reg_d = REG_ZERO;
    end else if (s3_x < s3_shape.b) begin
      reg_d = REG_RISE;
      num_d = s3_x - s3_shape.a;
      den_d = s3_shape.b - s3_shape.a;
    end else if (s3_x <= s3_shape.c) begin
      reg_d = REG_FLAT;
    end else begin
      reg_d = REG_FALL;
      num_d = s3_shape.d - s3_x;
      den_d = s3_shape.d - s3_shape.c;
    end
  end
  always_ff @(posedge clk) begin
    s4_reg <= reg_d;
    s4_num <= num_d;
    s4_den <= den_d;
  end

  // stage 5: numerator times ALPHA_MAX
  localparam int unsigned NUM_W = IN_W + ALPHA_W;
  region_e           s5_reg;
  logic [NUM_W-1:0]  s5_num;
  val_t              s5_den;
  always_ff @(posedge clk) begin
    s5_reg <= s4_reg;
    s5_num <= NUM_W'(s4_num) * NUM_W'(ALPHA_MAX);
    s5_den <= s4_den;
  end

  // stage 6: division and selection
  logic [NUM_W-1:0] quot;
  alpha_t           alpha_d;
  always_comb begin
    quot = (s5_den == '0) ? NUM_W'(ALPHA_MAX) : s5_num / NUM_W'(s5_den);
    unique case (s5_reg)
      REG_ZERO: alpha_d = '0;
      REG_FLAT: alpha_d = alpha_t'(ALPHA_MAX);
      default:  alpha_d = (quot > NUM_W'(ALPHA_MAX)) ? alpha_t'(ALPHA_MAX) : alpha_t'(quot);
    endcase
  end
  always_ff @(posedge clk) alpha <= alpha_d;

endmodule
