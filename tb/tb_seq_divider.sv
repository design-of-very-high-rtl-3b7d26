// tb_seq_divider: divides random sums whose quotient fits 7 bits, as the
// Sugeno mean guarantees, plus the extremes and a zero divisor, and checks
// each quotient (rounded down, 0 for a zero divisor) and that q_valid comes
// five clocks after start.
module tb_seq_divider;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic        start, q_valid;
  logic [14:0] num;
  logic [7:0]  den;
  logic [6:0]  q;

  seq_divider dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; num = '0; den = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int d, n, e, wait_c;
      case (i)
        0: begin d = 0; n = 0; end
        1: begin d = 240; n = 240 * 127; end
        2: begin d = 1; n = 127; end
        3: begin d = 1; n = 0; end
        default: begin
          d = $urandom_range(0, 240);
          n = (d == 0) ? 0 : $urandom_range(0, d * 127);
        end
      endcase
      e = (d == 0) ? 0 : n / d;
      num = 15'(n); den = 8'(d); start = 1;
      @(negedge clk);
      start = 0;
      wait_c = 1;
      while (!q_valid && wait_c < 20) begin
        @(negedge clk);
        wait_c++;
      end
      checks++;
      if (int'(q) != e || wait_c != 5) begin
        failures++;
        $display("FAIL: %0d/%0d = %0d expected %0d after %0d clocks", n, d, q, e, wait_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
