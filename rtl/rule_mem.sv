// rule_mem: rule memory of the four input processor (pipeline stages 4 to 6).
//
// Holds one word per rule of the complete rule base, N_FS^N_IN words in
// premise order (see rule_addr_gen). A word carries the premise code, one bit
// per input variable that is 1 when that variable takes part in the original
// rule, and the 7 bit crisp consequent Z. A premise code of all zeros marks a
// rule that the original fuzzy system did not have; it contributes nothing.
//
// Interface: wr_en writes wr_data at wr_addr. The read is synchronous: the
// word addressed by raddr (stage 3) is registered in stage 4 and passed on
// through stages 5 and 6, so rdata is aligned with the alpha values.
//
// The content and size of the memory follow the processor description; the
// three clock read path is this design's alignment with the alpha pipeline.
module rule_mem
  import fuzzy_pkg::*;
#(
  parameter int unsigned DEPTH = 2401
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [RADDR_W-1:0] wr_addr,
  input  rule_word_t         wr_data,
  input  logic [RADDR_W-1:0] raddr,
  output rule_word_t         rdata
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  rule_word_t mem [DEPTH];
  rule_word_t s4_word, s5_word;

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < RADDR_W'(DEPTH)) mem[wr_addr[AW-1:0]] <= wr_data;
    s4_word <= (raddr < RADDR_W'(DEPTH)) ? mem[raddr[AW-1:0]] : '0;
    s5_word <= s4_word;
    rdata   <= s5_word;
  end

endmodule
