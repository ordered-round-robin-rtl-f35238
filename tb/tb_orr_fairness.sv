// tb_orr_fairness: bandwidth sharing among flows with reservations, at the default size.
//
// Eight identical workers (w = 6, z = 1 cycle/byte) serve six flows that have reserved
// (0.3, 0.3, 0.1, 0.1, 0.1, 0.1) of the bandwidth. All flows offer traffic at the same rate
// and are kept backlogged, so the scheduler alone decides who is served. Packet lengths
// follow an exponential distribution of mean 512 bytes, cut to 20..1500 bytes.
//
// Over a long window each flow must receive its reserved fraction of the output bytes:
// bytes_j may differ from r_j * total by at most 2*F_j + L (the share of a flow in one
// round, F_j = r_j*B, at each end of the window, and the half-packet rounding). Each flow
// must also leave in the order it arrived (its tags count up by one), and the total rate
// must stay close to the dispatch rate of one byte per cycle.
module tb_orr_fairness;
  import orr_pkg::*;

  localparam int M      = 8;
  localparam int F      = 6;
  localparam int W      = 6;
  localparam int L      = 1500;
  localparam int WARMUP = 30000;     // cycles
  localparam int WINDOW = 1200000;   // cycles
  localparam int RES [F] = '{19661, 19661, 6554, 6554, 6554, 6554};  // 1.0 = 65536

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          cfg_start;
  logic [7:0]    cfg_w [M];
  logic [7:0]    cfg_zr [M], cfg_zs [M], cfg_m;
  len_t          cfg_maxlen;
  logic [16:0]   cfg_r [F];
  logic          cfg_ready;
  logic [31:0]   cfg_batch, cfg_gap_d;
  logic          in_valid, in_ready;
  pkt_desc_t     in_desc;
  logic          wk_in_valid [M];
  pkt_desc_t     wk_in_desc [M];
  logic          wk_in_pop [M];
  logic          wk_out_push [M];
  pkt_desc_t     wk_out_desc [M];
  logic          wk_out_full [M];
  logic          wk_drop [M];
  logic          out_valid;
  pkt_desc_t     out_desc;
  logic [2:0]    out_proc;
  disp_events_t  disp_events;
  logic          tx_mismatch, tx_drain;

  orr_np_top dut (.*);

  for (genvar k = 0; k < M; k++) begin : g_wk
    worker_model u_wk (
      .clk, .rst_n, .cfg_w(cfg_w[k]), .hold(1'b0), .drop_mod(16'd0), .drop(wk_drop[k]),
      .in_valid(wk_in_valid[k]), .in_desc(wk_in_desc[k]), .in_pop(wk_in_pop[k]),
      .out_push(wk_out_push[k]), .out_desc(wk_out_desc[k]), .out_full(wk_out_full[k])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // exponential length, mean 512 bytes, cut to the 20..1500 range
  function automatic len_t exp_len();
    real u, x;
    u = real'($urandom_range(1, 1 << 24)) / real'(1 << 24);
    x = -512.0 * $ln(u);
    if (x < 20.0) x = 20.0;
    if (x > 1500.0) x = 1500.0;
    return len_t'(int'(x));
  endfunction

  // source: the flows take turns offering a packet; a flow whose queue is full waits for
  // its next turn, so every flow is offered at the same rate and stays backlogged
  int        src_f = 0;
  tag_t      next_tag [F];
  len_t      next_len [F];
  logic      feeding = 1'b0;

  assign in_valid = feeding;
  always_comb begin
    in_desc      = '0;
    in_desc.flow = flow_t'(src_f);
    in_desc.len  = next_len[src_f];
    in_desc.tag  = next_tag[src_f];
  end

  always @(posedge clk) if (rst_n && feeding) begin
    if (in_ready) begin
      next_tag[src_f] <= next_tag[src_f] + 1'b1;
      next_len[src_f] <= exp_len();
    end
    src_f <= (src_f + 1) % F;
  end

  // observation
  int   cyc = 0, t0 = 0;
  logic measuring = 1'b0;
  tag_t exp_tag [F];
  longint bytes [F];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid) begin
      int f;
      f = int'(out_desc.flow);
      check(out_desc.tag == exp_tag[f], "order within the flow");
      exp_tag[f] = out_desc.tag + 1'b1;
      if (measuring) bytes[f] += longint'(out_desc.len);
    end
  end

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint total;
    real  rate;
    foreach (next_tag[k]) next_tag[k] = '0;
    foreach (next_len[k]) next_len[k] = exp_len();
    foreach (exp_tag[k]) exp_tag[k] = '0;
    foreach (bytes[k]) bytes[k] = 0;
    foreach (cfg_w[k]) cfg_w[k] = 8'(W);
    foreach (cfg_r[k]) cfg_r[k] = 17'(RES[k]);
    foreach (cfg_zr[k]) cfg_zr[k] = 8'd1;
    foreach (cfg_zs[k]) cfg_zs[k] = 8'd1;
    cfg_m = 1; cfg_maxlen = len_t'(L);
    cfg_start = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) cfg_start = 1'b1;
    @(negedge clk) cfg_start = 1'b0;
    feeding = 1'b1;
    wait (cfg_ready);
    check(cfg_batch == 32'd15000, "batch of eq. 22: C = 10, B = 10 * 1500");
    repeat (WARMUP) @(negedge clk);
    measuring = 1'b1;
    t0 = cyc;
    repeat (WINDOW) @(negedge clk);
    measuring = 1'b0;
    total = 0;
    foreach (bytes[k]) total += bytes[k];
    rate = real'(total) / real'(cyc - t0);
    $display("total %0d bytes in %0d cycles, rate %0.3f byte/cycle", total, cyc - t0, rate);
    check(rate >= 0.85 && rate <= 1.0, "total rate near the dispatch rate");
    for (int k = 0; k < F; k++) begin
      real    share;
      longint want, fj, tol;
      share = real'(bytes[k]) / real'(total);
      want  = (total * longint'(RES[k])) >>> 16;
      fj    = longint'(dut.fquantum[k]);
      tol   = 2 * fj + longint'(L);
      $display("  flow %0d reserved %0.3f got %0.4f (%0d bytes, F_j = %0d)",
               k, real'(RES[k]) / 65536.0, share, bytes[k], fj);
      check(bytes[k] - want <= tol && want - bytes[k] <= tol,
            "flow served at its reserved rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
