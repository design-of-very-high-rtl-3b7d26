// tb_fuzzy_proc4_approx: function approximation workload of the four input
// fuzzy processor.
//
// Two surfaces of two inputs, f = x0*x1/127 and f = (x0+x1)/2, are loaded as
// fuzzy systems: 7 evenly spaced triangles per input (the outer two with a
// flat shoulder to the range end) and one rule per pair of fuzzy sets whose
// consequent is f at the two triangle peaks. Inputs 2 and 3 are absent from
// every rule (premise 1100), so the 16 active rules hold each pair four times.
// Every second value of x0 and x1 is run in MIN and Product mode, back to
// back. Each output must equal the reference model; the mean distance to the
// exact surface must stay below 1% of full scale. The largest distance is
// reported.
module tb_fuzzy_proc4_approx;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz

  logic        in_valid, in_ready;
  val_t        in_x [4];
  tnorm_e      tnorm;
  logic        sup_we, shp_we, rule_we;
  logic [1:0]  sup_var, shp_var;
  fs_idx_t     sup_fs, shp_fs;
  mf_support_t sup_data;
  mf_shape_t   shp_data;
  logic [RADDR_W-1:0] rule_addr;
  rule_word_t  rule_data;
  logic        out_valid;
  val_t        out_z;

  fuzzy_proc4 dut (.*);

  localparam int STEP  = 2;
  localparam int N_RUL = N_FS ** 4;

  int checks = 0, failures = 0;
  int n_out = 0;
  int err_max = 0;
  real err_sum = 0.0;
  bit done = 0;
  int fsel = 0;

  mf_support_t m_sup   [4][N_FS];
  mf_shape_t   m_shape [4][N_FS];
  rule_word_t  m_rule  [N_RUL];
  int          peak    [N_FS];

  int exp_q [$];
  real ideal_q [$];

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic real surface(int sel, real x0, real x1);
    if (sel == 0) return x0 * x1 / 127.0;
    return (x0 + x1) / 2.0;
  endfunction

  function automatic int model(int x [4], bit product);
    int lo [4];
    automatic int st = 0, szt = 0;
    for (int v = 0; v < 4; v++) lo[v] = ref_lo(x[v], m_sup[v]);
    for (int r = 0; r < 16; r++) begin
      automatic int addr = 0;
      int al [4];
      int th;
      for (int v = 0; v < 4; v++) begin
        automatic int f = lo[v] + ((r >> (3 - v)) & 1);
        addr = addr * N_FS + f;
        al[v] = ref_alpha(x[v], m_shape[v][f]);
      end
      th = ref_theta(al, m_rule[addr].premise, product);
      st += th;
      szt += th * int'(m_rule[addr].z);
    end
    if (st == 0) return 0;
    return (szt / st > 127) ? 127 : szt / st;
  endfunction

  task automatic load_system(int sel);
    for (int f = 0; f < N_FS; f++) peak[f] = (f * 127 + 3) / 6;
    for (int v = 0; v < 4; v++)
      for (int f = 0; f < N_FS; f++) begin
        automatic int a = (f > 0) ? peak[f-1] : 0;
        automatic int d = (f < N_FS - 1) ? peak[f+1] : 127;
        m_shape[v][f] = '{a: val_t'(a), b: val_t'((f == 0) ? 0 : peak[f]),
                          c: val_t'((f == N_FS - 1) ? 127 : peak[f]), d: val_t'(d)};
        m_sup[v][f] = '{first: val_t'(a), last: val_t'(d)};
        @(negedge clk);
        sup_we = 1; sup_var = 2'(v); sup_fs = fs_idx_t'(f); sup_data = m_sup[v][f];
        shp_we = 1; shp_var = 2'(v); shp_fs = fs_idx_t'(f); shp_data = m_shape[v][f];
      end
    @(negedge clk);
    sup_we = 0; shp_we = 0;
    for (int r = 0; r < N_RUL; r++) begin
      automatic int i = r / (N_FS ** 3);
      automatic int j = (r / (N_FS ** 2)) % N_FS;
      automatic int z = int'(surface(sel, real'(peak[i]), real'(peak[j])));  // rounds
      m_rule[r] = '{premise: 4'b1100, z: z_t'(z)};
      @(negedge clk);
      rule_we = 1; rule_addr = RADDR_W'(r); rule_data = m_rule[r];
    end
    @(negedge clk);
    rule_we = 0;
  endtask

  task automatic sweep(int sel, tnorm_e tn);
    automatic int sets = 0;
    real e_sum;
    err_max = 0; err_sum = 0.0; n_out = 0;
    @(negedge clk);
    tnorm = tn;
    for (int x0 = 0; x0 < 128; x0 += STEP)
      for (int x1 = 0; x1 < 128; x1 += STEP) begin
        int xs [4];
        xs = '{x0, x1, 0, 0};
        exp_q.push_back(model(xs, tn == TNORM_PRODUCT));
        ideal_q.push_back(surface(sel, real'(x0), real'(x1)));
        in_valid = 1;
        in_x = '{val_t'(x0), val_t'(x1), 7'd0, 7'd0};
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
        sets++;
      end
    wait (n_out == sets);
    e_sum = err_sum / real'(sets);
    $display("surface %0d %s: %0d points, mean error %.2f (%.2f%% of full scale), max error %0d",
             sel, tn == TNORM_PRODUCT ? "Product" : "MIN", sets, e_sum,
             100.0 * e_sum / 127.0, err_max);
    check(e_sum * 100.0 < 127.0, $sformatf("mean approximation error %.2f not below 1%%", e_sum));
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        check(0, "output without a data set");
      end else begin
        automatic int e = exp_q.pop_front();
        automatic real ideal = ideal_q.pop_front();
        automatic real diff = real'(int'(out_z)) - ideal;
        if (diff < 0.0) diff = -diff;
        check(int'(out_z) == e, $sformatf("out %0d, model %0d", out_z, e));
        err_sum = err_sum + diff;
        if (int'(diff) > err_max) err_max = int'(diff);
        n_out = n_out + 1;
      end
    end
  end

  initial begin
    in_valid = 0; in_x = '{default: '0}; tnorm = TNORM_MIN;
    sup_we = 0; shp_we = 0; rule_we = 0;
    sup_var = 0; shp_var = 0; sup_fs = 0; shp_fs = 0;
    sup_data = '0; shp_data = '0; rule_addr = '0; rule_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin
        for (fsel = 0; fsel < 2; fsel++) begin
          load_system(fsel);
          sweep(fsel, TNORM_MIN);
          sweep(fsel, TNORM_PRODUCT);
        end
        done = 1;
      end
      repeat (400_000) @(posedge clk);
    join_any
    if (!done) $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + (done ? 0 : 1));
    $finish;
  end
endmodule
