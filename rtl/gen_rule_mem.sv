// gen_rule_mem: rule memory of the genetic fuzzy processor.
//
// One memory of G_N_RULES words; every word is a whole rule: the symmetric
// trapezoid of each of the ten inputs and the crisp consequent Z (see
// genetic_pkg). Several fuzzy systems share the memory, each in its own range
// of addresses. Write port wr_*; synchronous read, rdata one clock after
// raddr. Addresses at or above G_N_RULES read as zero.
//
// The single memory holding rules together with their membership functions
// and the 60 rule capacity follow the processor description; the port timing
// is this design's own.
module gen_rule_mem
  import genetic_pkg::*;
(
  input  logic     clk,
  input  logic     wr_en,
  input  g_raddr_t wr_addr,
  input  g_rule_t  wr_data,
  input  g_raddr_t raddr,
  output g_rule_t  rdata
);

  g_rule_t mem [G_N_RULES];

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < G_RA_W'(G_N_RULES)) mem[wr_addr] <= wr_data;
    rdata <= (raddr < G_RA_W'(G_N_RULES)) ? mem[raddr] : '0;
  end

endmodule
