// seq_divider: output division Zo = sum(Z*theta) / sum(theta), computed beside
// the rule pipeline.
//
// A restoring divider that retires BPC quotient bits per clock. Because every
// Z is at most 2^Z_W-1, the quotient is below 2^Z_W, so Q_W = Z_W+1 quotient
// bits always suffice (the top one is only a guard). A start pulse loads the
// operands; Q_W/BPC clocks later the rounded-down quotient is registered on
// q with a one clock q_valid pulse. With the defaults (Q_W = 8, BPC = 2) the
// division takes 5 clocks from start to q_valid: load plus 4 steps, 100 ns at
// 50 MHz, against the 90 ns the processor description gives. A zero divisor
// (no rule fired) gives Zo = 0. A new start may come once q_valid is seen;
// the pipeline delivers one only every 16 clocks.
//
// Computing the division off the pipeline and its rough duration follow the
// processor description; the algorithm, the bits per clock and the zero
// divisor result are this design's own.
//
// An assertion checks that no division is started while one is running.
// Its disable iff samples rst_n at the clock, so lint reports rst_n as used
// both asynchronously and synchronously. The assertion is not part of the
// circuit, and the reset stays asynchronous.
module seq_divider #(
  parameter int unsigned NUM_W = 15,
  parameter int unsigned DEN_W = 8,
  parameter int unsigned Q_W   = 8,
  parameter int unsigned OUT_W = 7,
  parameter int unsigned BPC   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             q_valid,
  output logic [OUT_W-1:0] q
);

  localparam int unsigned STEPS = (Q_W + BPC - 1) / BPC;
  localparam int unsigned W     = NUM_W + 1;
  localparam int unsigned DW    = DEN_W + Q_W;

  logic [W-1:0]               rem;
  logic [DEN_W-1:0]           dsr;
  logic [Q_W-1:0]             quo;
  logic [$clog2(STEPS+1)-1:0] step;
  logic                       busy;

  // BPC quotient bits of one clock, highest first
  logic [W-1:0]   rem_n;
  logic [Q_W-1:0] quo_n;
  always_comb begin
    int unsigned   bitpos;
    logic [DW-1:0] trial;
    rem_n = rem;
    quo_n = quo;
    for (int k = 0; k < BPC; k++) begin
      bitpos = Q_W - 1 - (int'(step) * BPC + k);
      trial  = DW'(dsr) << bitpos;
      if (bitpos < Q_W) begin
        if (DW'(rem_n) >= trial) begin
          rem_n         = W'(DW'(rem_n) - trial);
          quo_n[bitpos] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      q_valid <= 1'b0;
      q       <= '0;
      step    <= '0;
    end else begin
      q_valid <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        step <= '0;
      end else if (busy) begin
        step <= step + 1'b1;
        if (step == ($bits(step))'(STEPS - 1)) begin
          busy    <= 1'b0;
          q_valid <= 1'b1;
          if (dsr == '0)                      q <= '0;
          else if (quo_n >= Q_W'(1 << OUT_W)) q <= '1;
          else                                q <= OUT_W'(quo_n);
        end
      end
    end
  end

  // the pipelines space their sums so that a division always ends first
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("seq_divider: start while a division is running");

  always_ff @(posedge clk) begin
    if (start) begin
      rem <= W'(num);
      dsr <= den;
      quo <= '0;
    end else if (busy) begin
      rem <= rem_n;
      quo <= quo_n;
    end
  end

endmodule
