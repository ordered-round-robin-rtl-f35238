// tb_orr_scaling: throughput of the P-ORR packet path against the number of workers.
//
// Processors with 4, 8, 9 and 10 identical workers (w = 6, z = 1 cycle/byte) carry one
// flow of 20..1500-byte packets side by side. With equal workers the output rate grows as
// M / (w + 2z) bytes per cycle until the dispatch link is full at M = (w + 2z)/z = 8; more
// workers then add nothing. The expected rates are 0.5 for M = 4 and 1 from M = 8 on,
// less the cycles the dispatcher spends on its decisions and the packet-size rounding of
// the shares. A fifth processor has eight workers of w = 4, 6, 8, 10 (repeating); its
// shares follow the workers' speeds (B = 18000, Gap_d = 1822 cycles), for an ideal rate
// of B / (B*z + Gap_d) = 0.908 bytes per cycle. Each bench also checks that the flow
// leaves in arrival order.
module tb_orr_scaling;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 5;
  logic done [N];
  int   chk [N], fail [N], rate [N];

  scaling_bench #(.NUM_PROC(4),  .NPKT(300), .LO_PPM(440000), .HI_PPM(500000)) u_m4
    (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .rate_ppm(rate[0]));
  scaling_bench #(.NUM_PROC(8),  .NPKT(400), .LO_PPM(850000), .HI_PPM(1000000)) u_m8
    (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .rate_ppm(rate[1]));
  scaling_bench #(.NUM_PROC(10), .NPKT(400), .LO_PPM(850000), .HI_PPM(1000000)) u_m10
    (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .rate_ppm(rate[2]));
  scaling_bench #(.NUM_PROC(9),  .NPKT(400), .LO_PPM(850000), .HI_PPM(1000000)) u_m9
    (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .rate_ppm(rate[3]));
  scaling_bench #(.NUM_PROC(8),  .NPKT(400), .LO_PPM(800000), .HI_PPM(908000), .HET(1'b1)) u_het
    (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]), .rate_ppm(rate[4]));

  int checks, failures;

  function automatic int sum(input int v [N]);
    int t;
    t = 0;
    foreach (v[k]) t += v[k];
    return t;
  endfunction

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fail) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks   = sum(chk) + 3;
    failures = sum(fail);
    // saturation: from M = 8 on, more workers do not raise the rate
    if (rate[2] > rate[1] + 30000) failures++;
    if (rate[3] > rate[1] + 30000) failures++;
    // below saturation the rate is close to proportional to M
    if (rate[0] * 2 > rate[1] + 100000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
