// genetic_agent: stimulus and checking for the ten input genetic fuzzy
// processor, shared by its own testbench and the top level one.
//
// Fills the rule memory with random rules and splits it into four systems of
// 10, 20, 29 and 1 rules. Random data sets, isolated and back to back, go to
// every system, and a burst alternates between two systems; each output is
// compared with a reference computed here from the stored rules (symmetric
// trapezoids, minimum, Sugeno mean rounded down). Checks the latency of
// n + 12 clocks and the spacing of max(n, 6) clocks between back to back
// outputs, and counts every system, the zero divisor case, the back to back
// case and the system switch. Raises finished when done.
module genetic_agent
  import genetic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic       in_valid,
  input  logic       in_ready,
  output g_val_t     in_x [G_N_IN],
  output logic [1:0] in_sys,
  output logic       rule_we,
  output g_raddr_t   rule_addr,
  output g_rule_t    rule_data,
  output logic       sys_we,
  output logic [1:0] sys_idx,
  output g_sys_t     sys_data,
  input  logic       out_valid,
  input  g_val_t     out_z,
  output int         checks,
  output int         failures,
  output logic       finished
);

  initial begin
    checks = 0;
    failures = 0;
    finished = 0;
  end
  int n_sys [4] = '{0, 0, 0, 0};
  int n_zero = 0, n_b2b = 0, n_mix = 0;
  g_rule_t m_rule [G_N_RULES];
  int sys_first [4] = '{0, 10, 30, 59};
  int sys_count [4] = '{10, 20, 29, 1};

  int exp_q [$], lat_q [$], len_q [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic int ref_alpha(int x, g_mf_t m);
    automatic int d = (x > int'(m.centre)) ? x - int'(m.centre) : int'(m.centre) - x;
    if (d <= int'(m.top)) return 15;
    if (d >= int'(m.base)) return 0;
    return ((int'(m.base) - d) * 15) / (int'(m.base) - int'(m.top));
  endfunction

  function automatic int model(int x [G_N_IN], int s);
    automatic int st = 0, szt = 0;
    for (int r = sys_first[s]; r < sys_first[s] + sys_count[s]; r++) begin
      automatic int th = 15;
      for (int v = 0; v < G_N_IN; v++) begin
        automatic int a = ref_alpha(x[v], m_rule[r].mf[v]);
        if (a < th) th = a;
      end
      st += th;
      szt += th * int'(m_rule[r].z);
    end
    if (st == 0) begin
      n_zero++;
      return 0;
    end
    return szt / st;
  endfunction

  task automatic send(int x [G_N_IN], int s);
    for (int v = 0; v < G_N_IN; v++) in_x[v] = g_val_t'(x[v]);
    in_sys = 2'(s);
    in_valid = 1;
    exp_q.push_back(model(x, s));
    len_q.push_back(sys_count[s]);
    n_sys[s]++;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    lat_q.push_back(int'(cyc));
    @(negedge clk);
    in_valid = 0;
  endtask

  // the monitor samples out_valid one edge after the edge that set it
  bit b2b = 0;
  longint last_out = -1;
  int last_len = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, t0, n;
      e = exp_q.pop_front();
      t0 = lat_q.pop_front();
      n = len_q.pop_front();
      check(int'(out_z) == e, $sformatf("out %0d expected %0d", out_z, e));
      if (!b2b) begin
        if (lat_q.size() == 0)
          check(int'(cyc) - t0 == n + 12 + 1, $sformatf("latency %0d for %0d rules", int'(cyc) - t0, n));
      end else if (last_out >= 0) begin
        check(cyc - last_out == ((n < 6) ? 64'd6 : 64'(n)), $sformatf("spacing %0d for %0d rules", cyc - last_out, n));
        n_b2b++;
      end
      last_out = cyc;
    end
  end

  initial begin
    int x [G_N_IN];
    in_valid = 0; rule_we = 0; sys_we = 0; in_sys = 0;
    for (int v = 0; v < G_N_IN; v++) in_x[v] = '0;
    @(negedge clk);
    wait (rst_n);
    for (int r = 0; r < G_N_RULES; r++) begin
      for (int v = 0; v < G_N_IN; v++) begin
        automatic int t = $urandom_range(0, 80);
        m_rule[r].mf[v].centre = g_val_t'($urandom_range(0, 511));
        m_rule[r].mf[v].top    = g_val_t'(t);
        m_rule[r].mf[v].base   = g_val_t'(t + $urandom_range(1, 400));
      end
      m_rule[r].z = g_val_t'($urandom_range(0, 511));
      @(negedge clk);
      rule_we = 1; rule_addr = g_raddr_t'(r); rule_data = m_rule[r];
    end
    @(negedge clk);
    rule_we = 0;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      sys_we = 1; sys_idx = 2'(s);
      sys_data = '{first: g_raddr_t'(sys_first[s]), count: g_raddr_t'(sys_count[s])};
    end
    @(negedge clk);
    sys_we = 0;

    // isolated data sets: latency; inputs near the first rule's centres so
    // that rules fire
    for (int i = 0; i < 40; i++) begin
      automatic int s = i % 4;
      for (int v = 0; v < G_N_IN; v++)
        x[v] = (i % 8 < 4) ? int'(m_rule[sys_first[s]].mf[v].centre) : $urandom_range(0, 511);
      send(x, s);
      repeat (80) @(negedge clk);
    end

    // back to back data sets on each system
    b2b = 1;
    for (int s = 0; s < 4; s++) begin
      last_out = -1;
      for (int i = 0; i < 12; i++) begin
        for (int v = 0; v < G_N_IN; v++)
          x[v] = (i % 2 == 0) ? int'(m_rule[sys_first[s] + i % sys_count[s]].mf[v].centre) : $urandom_range(0, 511);
        send(x, s);
      end
      repeat (100) @(negedge clk);
      check(exp_q.size() == 0, "outputs missing after burst");
    end

    // back to back data sets alternating between systems 1 and 2
    b2b = 0;
    for (int i = 0; i < 16; i++) begin
      automatic int s = 1 + i % 2;
      for (int v = 0; v < G_N_IN; v++)
        x[v] = int'(m_rule[sys_first[s] + i % sys_count[s]].mf[v].centre);
      send(x, s);
      n_mix++;
    end
    repeat (100) @(negedge clk);
    check(exp_q.size() == 0, "outputs missing after mixed burst");

    for (int s = 0; s < 4; s++) check(n_sys[s] > 0, "a fuzzy system never selected");
    check(n_zero > 0, "zero divisor never seen");
    check(n_b2b > 0, "back to back outputs never seen");
    check(n_mix > 0, "system switch between back to back sets never seen");
    $display("mechanisms: sys=%0d/%0d/%0d/%0d zero=%0d b2b=%0d mix=%0d", n_sys[0], n_sys[1], n_sys[2], n_sys[3], n_zero, n_b2b, n_mix);
    finished = 1;
  end
endmodule
