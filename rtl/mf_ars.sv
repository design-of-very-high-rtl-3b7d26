// mf_ars: MF support memories and Active Rule Selector (pipeline stage 1).
//
// For every input variable a small memory holds the first and last abscissa
// of each of its N_FS membership functions. With at most two MFs overlapping
// at any point, an input value touches at most two neighbouring fuzzy sets.
// The selector finds, per variable, the lowest fuzzy set whose support holds
// the input (or, in a gap between supports, the first one that has not yet
// ended) and clamps it to N_FS-2, so that the pair (base, base+1) always
// covers every non zero MF. The 2^N_IN combinations of these pairs are the
// active rules.
//
// Interface: sup_we writes support word sup_data for fuzzy set sup_fs of
// variable sup_var. When ld is high the input data set x is sampled together
// with the selected base indices into the stage 1 register (base_q, x_q),
// which then holds until the next ld. One clock from x to base_q.
//
// The memories, the stage and the selection of two involved MFs follow the
// processor description; the selection rule itself and the clamping are this
// design's own, assuming MFs are stored in increasing order along the axis.
module mf_ars
  import fuzzy_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  logic                      clk,
  input  logic                      sup_we,
  input  logic [$clog2(N_IN)-1:0]   sup_var,
  input  fs_idx_t                   sup_fs,
  input  mf_support_t               sup_data,
  input  logic                      ld,
  input  val_t                      x    [N_IN],
  output fs_idx_t                   base_q [N_IN],
  output val_t                      x_q    [N_IN]
);

  mf_support_t sup_mem [N_IN][N_FS];

  always_ff @(posedge clk) begin
    if (sup_we) sup_mem[sup_var][sup_fs] <= sup_data;
  end

  fs_idx_t base_d [N_IN];

  always_comb begin
    for (int v = 0; v < N_IN; v++) begin
      logic found_in, found_end;
      fs_idx_t first_in, first_end;
      found_in  = 1'b0;
      found_end = 1'b0;
      first_in  = fs_idx_t'(N_FS - 2);
      first_end = fs_idx_t'(N_FS - 2);
      for (int f = N_FS - 1; f >= 0; f--) begin
        if (x[v] <= sup_mem[v][f].last) begin
          first_end = fs_idx_t'(f);
          found_end = 1'b1;
          if (x[v] >= sup_mem[v][f].first) begin
            first_in = fs_idx_t'(f);
            found_in = 1'b1;
          end
        end
      end
      if (found_in)       base_d[v] = first_in;
      else if (found_end) base_d[v] = first_end;
      else                base_d[v] = fs_idx_t'(N_FS - 2);
      if (base_d[v] > fs_idx_t'(N_FS - 2)) base_d[v] = fs_idx_t'(N_FS - 2);
    end
  end

  always_ff @(posedge clk) begin
    if (ld) begin
      base_q <= base_d;
      x_q    <= x;
    end
  end

endmodule
