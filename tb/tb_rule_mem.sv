// tb_rule_mem: fills all 2401 words of the rule memory with random words,
// then reads random addresses one per clock and checks each word arrives
// three clocks after its address.
module tb_rule_mem;
  import fuzzy_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;

  logic               wr_en;
  logic [RADDR_W-1:0] wr_addr, raddr;
  rule_word_t         wr_data, rdata;

  rule_mem dut (.*);

  int checks = 0, failures = 0;
  rule_word_t m [2401];
  rule_word_t exp_q [$];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; raddr = '0;
    for (int i = 0; i < 2401; i++) begin
      m[i] = rule_word_t'($urandom);
      @(negedge clk);
      wr_en = 1; wr_addr = RADDR_W'(i); wr_data = m[i];
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int a = (i < 2401) ? i : $urandom_range(0, 2400);
      raddr = RADDR_W'(a);
      exp_q.push_back(m[a]);
      @(negedge clk);
      if (exp_q.size() == 3) begin
        automatic rule_word_t e = exp_q.pop_front();
        checks++;
        if (rdata != e) begin
          failures++;
          $display("FAIL: read %h expected %h", rdata, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
