// rule_addr_gen: active rule issue and address generation (pipeline stages 2
// and 3).
//
// While the stage 1 register holds a data set (busy high) this block issues
// one active rule per clock. Rule number r (0 .. 2^N_IN-1) takes, for input
// variable v, fuzzy set base[v] + r[N_IN-1-v], so all 2^N_IN combinations of
// the two involved fuzzy sets of every variable are visited. Stage 2
// registers these fuzzy set indices (the MF shape memory addresses) with the
// input values and first/last tags. Stage 3 turns the indices into the rule
// memory address: the rules of the full rule base are stored in mixed radix
// order, address = sum over v of fs[v] * N_FS^(N_IN-1-v), so address 0 is the
// rule "X0 is FS0 and ... and X3 is FS0" and address 1 changes only the last
// variable.
//
// Interface: release is high in the clock that issues the last active rule,
// so the stage 1 register may take the next data set in that clock. One rule
// leaves stage 2 per clock; the rule address follows one clock later.
//
// Visiting only the 2^N_IN active rules and storing the full rule base in
// premise order follow the processor description; the issue order and the
// address arithmetic are this design's own.
module rule_addr_gen
  import fuzzy_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 busy,
  input  fs_idx_t              base [N_IN],
  input  val_t                 x    [N_IN],
  output logic                 release_o,
  // stage 2 register
  output logic                 s2_valid,
  output logic                 s2_first,
  output logic                 s2_last,
  output fs_idx_t              s2_fs [N_IN],
  output val_t                 s2_x  [N_IN],
  // stage 3 register
  output logic [RADDR_W-1:0]   s3_raddr
);

  localparam int unsigned N_ACT = 1 << N_IN;

  logic [N_IN-1:0] cnt;

  assign release_o = busy && (cnt == N_IN'(N_ACT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      s2_valid <= 1'b0;
      s2_first <= 1'b0;
      s2_last  <= 1'b0;
    end else begin
      s2_valid <= busy;
      s2_first <= busy && (cnt == '0);
      s2_last  <= release_o;
      if (busy) cnt <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (busy) begin
      for (int v = 0; v < N_IN; v++) begin
        s2_fs[v] <= base[v] + fs_idx_t'(cnt[N_IN-1-v]);
        s2_x[v]  <= x[v];
      end
    end
  end

  logic [RADDR_W-1:0] raddr_d;
  always_comb begin
    raddr_d = '0;
    for (int v = 0; v < N_IN; v++)
      raddr_d = raddr_d * RADDR_W'(N_FS) + RADDR_W'(s2_fs[v]);
  end

  always_ff @(posedge clk) s3_raddr <= raddr_d;

endmodule
