// proc4_agent: stimulus and checking for the four input fuzzy processor,
// shared by its own testbench and the top level one.
//
// Loads a random fuzzy system (evenly spread trapezoids with random plateaus,
// random rules, about one in eight marked absent), then runs random data sets
// in MIN and Product mode, isolated and back to back, and compares every
// output with fuzzy_ref_pkg. It also checks that every non zero membership
// function lies in the selected pair, the latency (32 clocks for four inputs) of an isolated data
// set, the 2^N_IN clock spacing of back to back outputs, and a data set whose
// active rules are all absent (output 0). Each mechanism is counted and must
// occur at least once. Raises finished when done; checks and failures count
// the comparisons.
module proc4_agent
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;
#(
  parameter int N_IN = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               in_valid,
  input  logic               in_ready,
  output val_t               in_x [N_IN],
  output tnorm_e             tnorm,
  output logic               sup_we,
  output logic [$clog2(N_IN)-1:0] sup_var,
  output fs_idx_t            sup_fs,
  output mf_support_t        sup_data,
  output logic               shp_we,
  output logic [$clog2(N_IN)-1:0] shp_var,
  output fs_idx_t            shp_fs,
  output mf_shape_t          shp_data,
  output logic               rule_we,
  output logic [RADDR_W-1:0] rule_addr,
  output rule_word_t         rule_data,
  input  logic               out_valid,
  input  val_t               out_z,
  output int                 checks,
  output int                 failures,
  output logic               finished
);

  localparam int N_ACT = 1 << N_IN;
  localparam int N_RUL = N_FS ** N_IN;
  // input register + rules + stages 3..12 + divider (load and 4 or 2 steps)
  localparam int LAT   = 1 + N_ACT + 10 + ((N_ACT >= 5) ? 5 : 3);
  localparam logic [3:0] PMASK = 4'((16'hF << (4 - N_IN)) & 16'hF);

  initial begin
    checks = 0;
    failures = 0;
    finished = 0;
  end
  int n_min = 0, n_prod = 0, n_null = 0, n_reject = 0, n_stall = 0, n_zero = 0, n_b2b = 0;

  mf_support_t m_sup   [N_IN][N_FS];
  mf_shape_t   m_shape [N_IN][N_FS];
  rule_word_t  m_rule  [N_RUL];

  int exp_q [$];
  int lat_q [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // expected output, with coverage of the active pair and mechanism counts
  function automatic int model(int x [N_IN], bit product);
    int lo [N_IN];
    automatic int st = 0, szt = 0;
    for (int v = 0; v < N_IN; v++) begin
      lo[v] = ref_lo(x[v], m_sup[v]);
      for (int f = 0; f < N_FS; f++)
        if (ref_alpha(x[v], m_shape[v][f]) > 0)
          check(f == lo[v] || f == lo[v] + 1, $sformatf("alpha of fs %0d outside pair %0d", f, lo[v]));
    end
    for (int r = 0; r < N_ACT; r++) begin
      int al [4] = '{15, 15, 15, 15};
      automatic int addr = 0, th;
      for (int v = 0; v < N_IN; v++) begin
        automatic int f = lo[v] + ((r >> (N_IN - 1 - v)) & 1);
        addr = addr * 7 + f;
        al[v] = ref_alpha(x[v], m_shape[v][f]);
      end
      if (m_rule[addr].premise == 0) n_null++;
      else if (m_rule[addr].premise != PMASK) n_reject++;
      th = ref_theta(al, m_rule[addr].premise, product);
      st += th;
      szt += th * int'(m_rule[addr].z);
    end
    if (st == 0) begin
      n_zero++;
      return 0;
    end
    return szt / st;
  endfunction

  task automatic load_system();
    int p [N_FS];
    for (int k = 0; k < N_FS; k++) p[k] = (k * 127 + 3) / 6;
    for (int v = 0; v < N_IN; v++)
      for (int k = 0; k < N_FS; k++) begin
        int a, b, c, d, r;
        r = $urandom_range(0, 4);
        a = (k == 0) ? 0 : p[k-1] + $urandom_range(0, 2);
        d = (k == N_FS - 1) ? 127 : p[k+1] - $urandom_range(0, 2);
        b = (k == 0) ? 0 : p[k] - r;
        c = (k == N_FS - 1) ? 127 : p[k] + r;
        m_shape[v][k] = '{a: val_t'(a), b: val_t'(b), c: val_t'(c), d: val_t'(d)};
        m_sup[v][k]   = '{first: val_t'(a), last: val_t'(d)};
        @(negedge clk);
        sup_we = 1; sup_var = ($bits(sup_var))'(v); sup_fs = fs_idx_t'(k); sup_data = m_sup[v][k];
        shp_we = 1; shp_var = ($bits(shp_var))'(v); shp_fs = fs_idx_t'(k); shp_data = m_shape[v][k];
      end
    @(negedge clk);
    sup_we = 0; shp_we = 0;
    for (int i = 0; i < N_RUL; i++) begin
      m_rule[i].premise = ($urandom_range(0, 7) == 0) ? 4'b0 : 4'($urandom_range(1, 15)) & PMASK;
      m_rule[i].z = 7'($urandom_range(0, 127));
      @(negedge clk);
      rule_we = 1; rule_addr = RADDR_W'(i); rule_data = m_rule[i];
    end
    @(negedge clk);
    rule_we = 0;
  endtask

  task automatic write_rule(int addr, rule_word_t w);
    m_rule[addr] = w;
    @(negedge clk);
    rule_we = 1; rule_addr = RADDR_W'(addr); rule_data = w;
    @(negedge clk);
    rule_we = 0;
  endtask

  // offer one data set; holds in_valid until accepted
  task automatic send(int x [N_IN]);
    bit waited = 0;
    for (int v = 0; v < N_IN; v++) in_x[v] = val_t'(x[v]);
    in_valid = 1;
    exp_q.push_back(model(x, tnorm == TNORM_PRODUCT));
    if (tnorm == TNORM_PRODUCT) n_prod++; else n_min++;
    @(posedge clk);
    while (!in_ready) begin
      waited = 1;
      @(posedge clk);
    end
    lat_q.push_back(int'(cyc));
    if (waited) n_stall++;
    @(negedge clk);
    in_valid = 0;
  endtask

  // output monitor; it samples out_valid one edge after the edge that set it,
  // so an output LAT clocks after acceptance is seen at LAT + 1
  longint last_out = -1;
  bit check_spacing = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, t0;
      e = exp_q.pop_front();
      t0 = lat_q.pop_front();
      check(int'(out_z) == e, $sformatf("out %0d expected %0d", out_z, e));
      if (!check_spacing) check(int'(cyc) - t0 == LAT + 1, $sformatf("latency %0d", int'(cyc) - t0));
      else if (last_out >= 0) begin
        check(cyc - last_out == longint'(N_ACT), $sformatf("spacing %0d", cyc - last_out));
        n_b2b++;
      end
      last_out = cyc;
    end
  end

  initial begin
    int x [N_IN];
    in_valid = 0; sup_we = 0; shp_we = 0; rule_we = 0; tnorm = TNORM_MIN;
    for (int v = 0; v < N_IN; v++) in_x[v] = '0;
    @(negedge clk);
    wait (rst_n);
    load_system();

    // isolated data sets: latency
    for (int m = 0; m < 2; m++) begin
      tnorm = (m != 0) ? TNORM_PRODUCT : TNORM_MIN;
      for (int i = 0; i < 20; i++) begin
        for (int v = 0; v < N_IN; v++) x[v] = $urandom_range(0, 127);
        if (i == 0) for (int v = 0; v < N_IN; v++) x[v] = ((v & 1) != 0) ? 127 : 0;
        send(x);
        repeat (LAT + 4) @(negedge clk);
      end
    end

    // back to back data sets: throughput and input stall
    for (int m = 0; m < 2; m++) begin
      tnorm = (m != 0) ? TNORM_PRODUCT : TNORM_MIN;
      check_spacing = 1;
      last_out = -1;
      for (int i = 0; i < 30; i++) begin
        for (int v = 0; v < N_IN; v++) x[v] = $urandom_range(0, 127);
        send(x);
      end
      repeat (LAT + 64) @(negedge clk);
      check(exp_q.size() == 0, "outputs missing after burst");
    end
    check_spacing = 0;

    // all active rules absent: sum(theta) = 0, output 0
    for (int r = 0; r < N_ACT; r++) begin
      automatic int addr = 0;
      for (int v = 0; v < N_IN; v++) addr = addr * 7 + ((r >> (N_IN - 1 - v)) & 1);
      write_rule(addr, '{premise: 4'b0, z: 7'd99});
    end
    for (int v = 0; v < N_IN; v++) x[v] = 0;
    send(x);
    repeat (LAT + 4) @(negedge clk);

    check(exp_q.size() == 0, "outputs missing");
    check(n_min > 0, "MIN mode never used");
    check(n_prod > 0, "Product mode never used");
    check(n_null > 0, "absent rule never processed");
    check(n_reject > 0, "alpha rejection never used");
    check(n_stall > 0, "input never stalled");
    check(n_zero > 0, "zero divisor never seen");
    check(n_b2b > 0, "back to back outputs never seen");
    $display("mechanisms: min=%0d prod=%0d null=%0d reject=%0d stall=%0d zero=%0d b2b=%0d",
             n_min, n_prod, n_null, n_reject, n_stall, n_zero, n_b2b);
    finished = 1;
  end
endmodule
