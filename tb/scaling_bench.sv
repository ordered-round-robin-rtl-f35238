// scaling_bench: one network processor of NUM_PROC workers, carrying a single flow of
// uniformly distributed packet lengths (20..1500 bytes), for the scaling test.
//
// The bench programs z_r = z_s = 1 cycle/byte, L = 1500, m = 1 and one flow with the whole
// bandwidth, and w = 6 for every worker, or, with HET set, w = 4, 6, 8, 10 repeating. It
// then feeds NPKT packets as fast as the flow queue accepts them. It checks that
//   - every packet leaves, in exactly the order it arrived (a single flow must never be
//     reordered, whatever the number of workers);
//   - every worker carried part of the traffic;
//   - for equal workers, the inter-round gap equals (w + 2z - zM) * Q below saturation and
//     is 0 from M = (w + 2z)/z on;
//   - the output rate, bytes per cycle from the first dispatch to the last output, lies in
//     [LO_PPM, HI_PPM] millionths of a byte per cycle.
// It raises done when finished and reports its checks, failures and the measured rate.
module scaling_bench
  import orr_pkg::*;
#(
  parameter int NUM_PROC = 4,
  parameter int NPKT     = 400,
  parameter int LO_PPM   = 0,
  parameter int HI_PPM   = 1000000,
  parameter bit HET      = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   rate_ppm
);
  localparam int PW = (NUM_PROC > 1) ? $clog2(NUM_PROC) : 1;
  localparam int F  = 6;
  localparam int W  = 6;

  logic          cfg_start;
  logic [7:0]    cfg_w [NUM_PROC];
  logic [7:0]    cfg_zr [NUM_PROC], cfg_zs [NUM_PROC], cfg_m;
  len_t          cfg_maxlen;
  logic [16:0]   cfg_r [F];
  logic          cfg_ready;
  logic [31:0]   cfg_batch, cfg_gap_d;
  logic          in_valid, in_ready;
  pkt_desc_t     in_desc;
  logic          wk_in_valid [NUM_PROC];
  pkt_desc_t     wk_in_desc [NUM_PROC];
  logic          wk_in_pop [NUM_PROC];
  logic          wk_out_push [NUM_PROC];
  pkt_desc_t     wk_out_desc [NUM_PROC];
  logic          wk_out_full [NUM_PROC];
  logic          wk_drop [NUM_PROC];
  logic          out_valid;
  pkt_desc_t     out_desc;
  logic [PW-1:0] out_proc;
  disp_events_t  disp_events;
  logic          tx_mismatch, tx_drain;

  orr_np_top #(.NUM_PROC(NUM_PROC)) dut (.*);

  for (genvar k = 0; k < NUM_PROC; k++) begin : g_wk
    worker_model u_wk (
      .clk, .rst_n, .cfg_w(cfg_w[k]), .hold(1'b0), .drop_mod(16'd0), .drop(wk_drop[k]),
      .in_valid(wk_in_valid[k]), .in_desc(wk_in_desc[k]), .in_pop(wk_in_pop[k]),
      .out_push(wk_out_push[k]), .out_desc(wk_out_desc[k]), .out_full(wk_out_full[k])
    );
  end

  // packet source: packet n has tag n and a length drawn at start
  len_t lens [NPKT];
  int   sent, n_out, bytes_out, cyc, first_cyc, last_cyc;
  int   per_proc [NUM_PROC];
  logic feeding;

  assign in_valid = feeding && (sent < NPKT);
  always_comb begin
    in_desc      = '0;
    in_desc.flow = '0;
    in_desc.len  = lens[(sent < NPKT) ? sent : 0];
    in_desc.tag  = tag_t'(sent);
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d %s at %0t", NUM_PROC, what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) sent++;
    if (disp_events.dispatch && first_cyc < 0) first_cyc = cyc;
    if (out_valid) begin
      check(out_desc.tag == tag_t'(n_out), "packet order of the flow");
      check(out_desc.len == lens[n_out % NPKT], "packet length");
      per_proc[out_proc]++;
      n_out++;
      bytes_out += int'(out_desc.len);
      last_cyc = cyc;
    end
  end

  initial begin
    done = 1'b0; checks = 0; failures = 0; rate_ppm = 0;
    sent = 0; n_out = 0; bytes_out = 0; cyc = 0; first_cyc = -1; last_cyc = 0;
    feeding = 1'b0;
    foreach (per_proc[k]) per_proc[k] = 0;
    foreach (lens[k]) lens[k] = len_t'($urandom_range(20, 1500));
    foreach (cfg_w[k]) cfg_w[k] = HET ? 8'(4 + 2 * (k % 4)) : 8'(W);
    foreach (cfg_zr[k]) cfg_zr[k] = 8'd1;
    foreach (cfg_zs[k]) cfg_zs[k] = 8'd1;
    cfg_m = 1; cfg_maxlen = 1500;
    cfg_r = '{17'd65536, 17'd0, 17'd0, 17'd0, 17'd0, 17'd0};
    cfg_start = 1'b0;
    wait (rst_n);
    @(negedge clk) cfg_start = 1'b1;
    @(negedge clk) cfg_start = 1'b0;
    feeding = 1'b1;
    wait (cfg_ready);
    if (!HET) begin
      check(dut.quantum[0] == 1500, "quantum of a worker is one maximal packet");
      if (NUM_PROC < W + 2) check(cfg_gap_d == 32'((W + 2 - NUM_PROC) * 1500), "inter-round gap");
      else check(cfg_gap_d == 0, "no inter-round gap at or past saturation");
    end
    wait (n_out == NPKT);
    repeat (100) @(negedge clk);
    check(n_out == NPKT, "no extra packets");
    foreach (per_proc[k]) check(per_proc[k] > 0, "every worker used");
    rate_ppm = int'(64'(bytes_out) * 1000000 / 64'(32'(last_cyc - first_cyc + 1)));
    $display("M=%0d%0s: B=%0d Gap_d=%0d packets %0d bytes %0d cycles %0d rate %0d.%06d",
             NUM_PROC, HET ? " (w = 4,6,8,10)" : "", cfg_batch, cfg_gap_d, n_out, bytes_out, last_cyc - first_cyc + 1,
             rate_ppm / 1000000, rate_ppm % 1000000);
    check(rate_ppm >= LO_PPM && rate_ppm <= HI_PPM, "output rate");
    done = 1'b1;
  end
endmodule
