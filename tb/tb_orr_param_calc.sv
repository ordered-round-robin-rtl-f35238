// tb_orr_param_calc: self-checking test of the ORR parameter initialisation.
//
// Homogeneous cases are checked against the closed forms: alpha_i = 1/M, C = M, B = m*M*L,
// Q_i = m*L, Gap_d = max((w + 2z - zM)*m*L, 0) (w = 6, z = 1 gives the saturation point
// M = 8, so M = 4 has a gap and M = 8 has none). Heterogeneous cases (w_i = 4, 6, 8, 10, ...)
// and cases with unequal links z_r,i, z_s,i are checked against a floating-point
// evaluation of the same equations: C and B exactly,
// the quanta and flow shares within a few bytes, Gap_d within the rounding of the quanta,
// and the sequential-completion condition Q_i*(w_i+z_s,i) = Q_{i+1}*(z_r,i+1+w_{i+1}) within the
// same rounding. The number of cycles the computation takes is also bounded.
module tb_orr_param_calc;
  import orr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // two instances: the default size and a small one below the saturation point
  localparam int M8 = 8, F8 = 6, M4 = 4, F4 = 2;

  logic        start8, busy8, done8, start4, busy4, done4;
  logic [7:0]  w8 [M8], w4 [M4], zr8 [M8], zs8 [M8], zr4 [M4], zs4 [M4], m;
  len_t        maxlen;
  logic [16:0] r8 [F8], r4 [F4];
  bal_t        q8 [M8], fq8 [F8], q4 [M4], fq4 [F4];
  logic [31:0] gap8, batch8, gap4, batch4;
  logic [15:0] c8, c4;

  orr_param_calc #(.NUM_PROC(M8), .NUM_FLOWS(F8)) dut8 (
    .clk, .rst_n, .start(start8), .cfg_w(w8), .cfg_zr(zr8), .cfg_zs(zs8), .cfg_maxlen(maxlen),
    .cfg_m(m), .cfg_r(r8), .busy(busy8), .done(done8), .quantum(q8), .fquantum(fq8),
    .gap_d(gap8), .batch(batch8), .c_mult(c8));

  orr_param_calc #(.NUM_PROC(M4), .NUM_FLOWS(F4)) dut4 (
    .clk, .rst_n, .start(start4), .cfg_w(w4), .cfg_zr(zr4), .cfg_zs(zs4), .cfg_maxlen(maxlen),
    .cfg_m(m), .cfg_r(r4), .busy(busy4), .done(done4), .quantum(q4), .fquantum(fq4),
    .gap_d(gap4), .batch(batch4), .c_mult(c4));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // floating-point reference of eq. (2)-(5), (12), (20)-(22)
  task automatic reference(input int n, input int nf, input real w [], input real z_r [],
                           input real z_s [], input real rr [], input int len, input int mm,
                           output int c, output int b, output real q [], output real gap);
    real a [], s, amin, rmin, sd, st, mx, t;
    a = new[n];
    q = new[n];
    a[n-1] = 1.0;
    for (int i = n - 2; i >= 0; i--) a[i] = a[i+1] * (z_r[i+1] + w[i+1]) / (w[i] + z_s[i]);
    s = 0.0;
    amin = 1.0e30;
    foreach (a[i]) begin
      s += a[i];
      if (a[i] < amin) amin = a[i];
    end
    rmin = 1.0e30;
    for (int j = 0; j < nf; j++) if (rr[j] > 0.0 && rr[j] < rmin) rmin = rr[j];
    if (amin / s < rmin) rmin = amin / s;
    c = int'($ceil(1.0 / rmin - 1.0e-9));
    b = mm * c * len;
    sd = 0.0; st = 0.0; mx = 0.0;
    foreach (a[i]) begin
      q[i] = a[i] / s * b;
      sd += q[i] * z_r[i];
      st += q[i] * z_s[i];
      t = q[i] * (z_r[i] + w[i] + z_s[i]);
      if (t > mx) mx = t;
    end
    gap = mx - sd;
    if (st - sd > gap) gap = st - sd;
    if (gap < 0.0) gap = 0.0;
  endtask

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic run8(input int wk [M8], input int zri [M8], input int zsi [M8], input int mm,
                      input int len, input int res [F8]);
    real w [], zrr [], zsr [], rr [], q [], gap;
    int c, b, t0;
    w = new[M8];
    zrr = new[M8];
    zsr = new[M8];
    rr = new[F8];
    foreach (wk[i]) begin
      w8[i] = 8'(wk[i]); w[i] = real'(wk[i]);
      zr8[i] = 8'(zri[i]); zrr[i] = real'(zri[i]);
      zs8[i] = 8'(zsi[i]); zsr[i] = real'(zsi[i]);
    end
    foreach (res[j]) begin r8[j] = 17'(res[j]); rr[j] = real'(res[j]) / 65536.0; end
    m = 8'(mm); maxlen = len_t'(len);
    reference(M8, F8, w, zrr, zsr, rr, len, mm, c, b, q, gap);
    @(negedge clk) start8 = 1'b1;
    @(negedge clk) start8 = 1'b0;
    t0 = 0;
    while (!done8) begin
      @(negedge clk);
      t0++;
    end
    check(t0 < 66 * (2 * M8 + 3), "calculation time");
    check(int'(c8) == c, "C");
    check(int'(batch8) == b, "B");
    if (int'(batch8) != b) $display("  C %0d/%0d B %0d/%0d", c8, c, batch8, b);
    for (int i = 0; i < M8; i++) begin
      check(absr(real'(q8[i]) - q[i]) <= 2.0, "Q_i");
      if (i < M8 - 1)
        check(absr(real'(q8[i]) * (w[i] + zsr[i]) - real'(q8[i+1]) * (zrr[i+1] + w[i+1]))
              <= 40.0,
              "sequential completion");
    end
    for (int j = 0; j < F8; j++) check(absr(real'(fq8[j]) - rr[j] * b) <= 1.0, "F_j");
    check(absr(real'(gap8) - gap) <= 60.0, "Gap_d");
    $display("M=8 z_r1=%0d m=%0d L=%0d: C=%0d B=%0d Q1=%0d Gap_d=%0d (ref %0.1f)",
             zri[0], mm, len, c8, batch8, q8[0], gap8, gap);
  endtask

  localparam int Z1 [M8] = '{1, 1, 1, 1, 1, 1, 1, 1};
  localparam int Z2 [M8] = '{2, 2, 2, 2, 2, 2, 2, 2};

  initial begin
    int res6 [F8];
    start8 = 0; start4 = 0;
    foreach (w8[i]) w8[i] = 0;
    foreach (w4[i]) w4[i] = 0;
    foreach (r8[i]) r8[i] = 0;
    foreach (r4[i]) r4[i] = 0;
    foreach (zr8[i]) begin zr8[i] = 0; zs8[i] = 0; end
    foreach (zr4[i]) begin zr4[i] = 0; zs4[i] = 0; end
    m = 0; maxlen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // six flows (0.3, 0.3, 0.1, 0.1, 0.1, 0.1) in units of 2^-16
    res6 = '{19661, 19661, 6554, 6554, 6554, 6554};

    // homogeneous, w = 6, z = 1, M = 8: saturated, no gap; C = 10 from the 0.1 flows
    run8('{6, 6, 6, 6, 6, 6, 6, 6}, Z1, Z1, 1, 1500, '{65536, 0, 0, 0, 0, 0});
    check(c8 == 8 && batch8 == 12000 && q8[3] == 1500 && gap8 == 0, "homogeneous M=8");
    run8('{6, 6, 6, 6, 6, 6, 6, 6}, Z1, Z1, 1, 1500, res6);
    check(c8 == 10 && batch8 == 15000 && q8[0] == 1875, "six flows set C");
    // heterogeneous, w_i = 4, 6, 8, 10 repeated
    run8('{4, 6, 8, 10, 4, 6, 8, 10}, Z1, Z1, 1, 1500, '{65536, 0, 0, 0, 0, 0});
    run8('{4, 6, 8, 10, 4, 6, 8, 10}, Z1, Z1, 2, 5120, res6);
    run8('{10, 3, 7, 2, 9, 5, 12, 4}, Z2, Z2, 3, 1500, '{32768, 32768, 0, 0, 0, 0});
    // links of different speed per worker
    run8('{6, 6, 6, 6, 6, 6, 6, 6}, '{1, 2, 1, 3, 1, 2, 1, 3}, '{2, 1, 3, 1, 2, 1, 1, 2}, 1, 1500,
         '{65536, 0, 0, 0, 0, 0});
    run8('{4, 6, 8, 10, 4, 6, 8, 10}, '{3, 1, 2, 1, 1, 2, 1, 1}, '{1, 1, 2, 3, 1, 1, 2, 1}, 2,
         1500, res6);

    // homogeneous below saturation, M = 4: Gap_d = (w + 2z - zM) m L
    w4 = '{8'd6, 8'd6, 8'd6, 8'd6};
    r4 = '{17'd49152, 17'd16384};   // (0.75, 0.25)
    foreach (zr4[i]) begin zr4[i] = 1; zs4[i] = 1; end
    maxlen = 1500;
    for (int mm = 1; mm <= 3; mm++) begin
      m = 8'(mm);
      @(negedge clk) start4 = 1'b1;
      @(negedge clk) start4 = 1'b0;
      wait (done4);
      @(negedge clk);
      check(c4 == 4, "M=4 C");
      check(batch4 == 32'(mm * 4 * 1500), "M=4 B");
      check(q4[0] == bal_t'(mm * 1500) && q4[3] == bal_t'(mm * 1500), "M=4 Q");
      check(gap4 == 32'((6 + 2 - 4) * mm * 1500), "M=4 Gap_d eq. 15");
      check(fq4[0] == bal_t'(mm * 4500) && fq4[1] == bal_t'(mm * 1500), "M=4 F");
      $display("M=4 m=%0d: B=%0d Gap_d=%0d", mm, batch4, gap4);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
