// tb_gen_rule_mem: writes all 60 rule words with random contents, reads them
// back in random order and checks each word one clock after its address and
// that addresses beyond the 60 words read as zero.
module tb_gen_rule_mem;
  import genetic_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;

  logic     wr_en;
  g_raddr_t wr_addr, raddr;
  g_rule_t  wr_data, rdata;

  gen_rule_mem dut (.*);

  int checks = 0, failures = 0;
  g_rule_t m [G_N_RULES];
  g_rule_t exp_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; raddr = '0;
    for (int i = 0; i < G_N_RULES; i++) begin
      for (int k = 0; k < $bits(g_rule_t); k += 32) m[i][k +: 32] = $urandom;
      @(negedge clk);
      wr_en = 1; wr_addr = g_raddr_t'(i); wr_data = m[i];
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      automatic int a = $urandom_range(0, 63);
      raddr = g_raddr_t'(a);
      exp_q.push_back((a < G_N_RULES) ? m[a] : '0);
      @(negedge clk);
      if (exp_q.size() == 1) begin
        automatic g_rule_t e = exp_q.pop_front();
        checks++;
        if (rdata != e) begin
          failures++;
          $display("FAIL: rule word mismatch");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
