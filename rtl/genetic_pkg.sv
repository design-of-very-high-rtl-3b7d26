// genetic_pkg: widths and record types of the ten input processor for
// genetic fuzzy systems.
//
// In a genetic fuzzy system every rule carries its own membership functions,
// so a rule word holds, for each of the 10 inputs, one symmetric trapezoid
// (centre, half width of the flat top, half width of the support) and the
// crisp consequent Z. The 10 inputs of 9 bits, the 9 bit output, the 60 rule
// capacity and the four selectable fuzzy systems follow the processor
// description; the 4 bit truth values and the field layout are this design's
// own.
package genetic_pkg;

  localparam int unsigned G_N_IN    = 10;  // input variables
  localparam int unsigned G_IN_W    = 9;   // input, Z and output width
  localparam int unsigned G_N_RULES = 60;  // rule memory capacity
  localparam int unsigned G_RA_W    = 6;   // rule memory address width
  localparam int unsigned G_N_SYS   = 4;   // selectable fuzzy systems
  localparam int unsigned G_AW      = 4;   // alpha / theta width
  localparam int unsigned G_AMAX    = (1 << G_AW) - 1;

  typedef logic [G_IN_W-1:0] g_val_t;
  typedef logic [G_AW-1:0]   g_alpha_t;
  typedef logic [G_RA_W-1:0] g_raddr_t;

  // symmetric trapezoid: 1.0 for |x - centre| <= top, 0 for |x - centre| >= base
  typedef struct packed {
    g_val_t centre;
    g_val_t top;
    g_val_t base;
  } g_mf_t;

  typedef struct packed {
    g_mf_t [G_N_IN-1:0] mf;
    g_val_t             z;
  } g_rule_t;

  // one fuzzy system: rules first .. first+count-1 of the rule memory
  typedef struct packed {
    g_raddr_t first;
    g_raddr_t count;
  } g_sys_t;

endpackage
