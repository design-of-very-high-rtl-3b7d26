// fuzzy_pkg: widths, record types and constants shared by the blocks of the
// four input Sugeno fuzzy processor.
//
// The numbers follow the processor's published feature list: 7 bit inputs and
// output, 7 fuzzy sets (FS) per input, trapezoidal membership functions (MF),
// 4 bit alpha (predicate truth) and theta (premise truth), 7 bit crisp
// consequents, MIN or Product as T-norm. The packing of the record types and
// the T-norm encoding are this design's own choices.
package fuzzy_pkg;

  localparam int unsigned IN_W      = 7;   // input / crisp value width
  localparam int unsigned N_FS      = 7;   // fuzzy sets per input variable
  localparam int unsigned FS_W      = 3;   // FS index width
  localparam int unsigned ALPHA_W   = 4;   // alpha and theta width
  localparam int unsigned ALPHA_MAX = (1 << ALPHA_W) - 1;  // truth value 1.0
  localparam int unsigned Z_W       = 7;   // crisp consequent width (128 values)
  localparam int unsigned MAX_IN    = 4;   // premise code width of the rule word
  localparam int unsigned RADDR_W   = 12;  // rule memory address width (7^4 = 2401 words)

  typedef logic [IN_W-1:0]    val_t;
  typedef logic [FS_W-1:0]    fs_idx_t;
  typedef logic [ALPHA_W-1:0] alpha_t;
  typedef logic [Z_W-1:0]     z_t;

  // Support of one MF as held by the Active Rule Selector: first and last
  // abscissa where the MF is non zero.
  typedef struct packed {
    val_t first;
    val_t last;
  } mf_support_t;

  // Shape of one trapezoidal MF: rises from a to b, flat to c, falls to d.
  typedef struct packed {
    val_t a;
    val_t b;
    val_t c;
    val_t d;
  } mf_shape_t;

  // One rule memory word. premise[MAX_IN-1] belongs to the first input
  // variable; a 0 bit means that variable is absent from the original rule.
  typedef struct packed {
    logic [MAX_IN-1:0] premise;
    z_t                z;
  } rule_word_t;

  typedef enum logic {
    TNORM_MIN     = 1'b0,
    TNORM_PRODUCT = 1'b1
  } tnorm_e;

  // Truth-value product, renormalised so that ALPHA_MAX * ALPHA_MAX = ALPHA_MAX.
  function automatic alpha_t alpha_mul(alpha_t p, alpha_t q);
    logic [2*ALPHA_W-1:0] prod;
    prod = p * q;
    return alpha_t'(prod / (2*ALPHA_W)'(ALPHA_MAX));
  endfunction

endpackage
