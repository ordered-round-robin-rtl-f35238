// tb_orr_transmitter: self-checking test of the round-ID collecting transmitter.
//
// Phase 1: the worker output queues are filled in advance with four rounds (as many as a
// 2-bit round ID can tell apart) of packets, 0 to 3 per worker and round, and the
// dispatcher position is set past them. The exact output order and the cycle of every
// output pulse (len*z_s,i cycles per packet from worker i, with z_s,i = 3 or 4
// alternating, one cycle per pointer move) are predicted by walking the rounds, and the end
// of the traffic must be drained through the empty-queue rule.
// Phase 2: a dispatcher process hands out rounds while four workers of different, random
// speeds return the packets; the output must be exactly the dispatch order. About one
// packet in eight is discarded by its worker, which reports it on wk_drop; the rest must
// still leave in order and the last rounds must still drain. Both pointer moves (round-ID
// mismatch and drain) must occur.
module tb_orr_transmitter;
  import orr_pkg::*;

  localparam int unsigned M  = 4;
  localparam int unsigned PW = 2;
  localparam int          ZS = 3;    // z_s,i = ZS + i % 2

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] cfg_zs [M];
  logic       wk_valid [M];
  pkt_desc_t  wk_desc [M];
  logic       wk_pop [M];
  logic       wk_drop [M];
  logic       disp_fire;
  logic [PW-1:0] disp_proc, disp_which, cur;
  rnd_t       disp_round, round;
  logic       tx_valid;
  pkt_desc_t  tx_desc;
  logic [PW-1:0] tx_proc;
  logic       ev_mismatch, ev_drain;

  orr_transmitter #(.NUM_PROC(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct { pkt_desc_t d; int t; } item_t;
  item_t wq [M][$];        // worker output queues: descriptor and arrival cycle
  item_t expq [$];         // expected output: descriptor and cycle (-1: not timed)
  int    dropt [M][$];     // cycles at which each worker reports a discarded packet
  int    n_drop = 0;
  int    proc_of [int];
  int    cyc = 0, go = 0, n_out = 0, n_mis = 0, n_drain = 0;

  always_comb
    for (int k = 0; k < M; k++) begin
      wk_valid[k] = (go != 0) && (wq[k].size() != 0) && (wq[k][0].t <= cyc);
      wk_desc[k]  = (wq[k].size() != 0) ? wq[k][0].d : '0;
      wk_drop[k]  = (go != 0) && (dropt[k].size() != 0) && (dropt[k][0] <= cyc);
    end

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < M; k++) if (wk_pop[k]) void'(wq[k].pop_front());
    for (int k = 0; k < M; k++) if (wk_drop[k]) begin
      void'(dropt[k].pop_front());
      n_drop++;
    end
    n_mis   += int'(ev_mismatch);
    n_drain += int'(ev_drain);
    if (tx_valid) begin
      item_t e;
      n_out++;
      if (expq.size() == 0) check(0, "unexpected output");
      else begin
        e = expq.pop_front();
        check(tx_desc == e.d, "output order");
        check(int'(tx_proc) == proc_of[int'(e.d.tag)], "output worker");
        if (e.t >= 0) begin
          check(cyc == e.t, "output cycle");
          if (cyc != e.t && failures < 10) $display("  got %0d expected %0d", cyc, e.t);
        end
      end
    end
    cyc++;
  end

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tag = 0;
  function automatic pkt_desc_t mk(input int r, input int k);
    pkt_desc_t d;
    d = '0;
    d.len = len_t'($urandom_range(20, 300));
    d.rid = rid_t'(r);
    d.tag = tag_t'(tag);
    proc_of[tag] = k;
    tag++;
    return d;
  endfunction

  task automatic fire(input int k);
    @(negedge clk);
    disp_fire = 1'b1;
    disp_proc = PW'(k);
    @(negedge clk);
    disp_fire = 1'b0;
  endtask

  initial begin
    foreach (cfg_zs[k]) cfg_zs[k] = 8'(ZS + k % 2);
    disp_fire = 0; disp_proc = 0; disp_which = 0; disp_round = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- phase 1: preloaded queues, exact timing
    begin
      pkt_desc_t rounds [4][M][$];
      int t;
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < M; k++) begin
          int n;
          n = $urandom_range(0, 3);
          for (int i = 0; i < n; i++) begin
            pkt_desc_t d;
            d = mk(r, k);
            rounds[r][k].push_back(d);
            wq[k].push_back('{d, 0});
            fire(k);
          end
        end
      @(negedge clk);
      t = cyc;   // first decision cycle after go
      go = 1;
      disp_round = 4;
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < M; k++) begin
          foreach (rounds[r][k][i]) begin
            t += int'(rounds[r][k][i].len) * (ZS + k % 2);
            expq.push_back('{rounds[r][k][i], t - 1});
          end
          t += 1;  // pointer move
        end
      wait (expq.size() == 0);
      repeat (M + 5) @(negedge clk);
      check(round == 4 && cur == 0, "drained to round 4");
    end
    check(n_drain > 0, "drain rule used");

    // ---------------- phase 2: dynamic dispatch, random worker speeds
    begin
      int r, last_t [M];
      foreach (last_t[k]) last_t[k] = 0;
      r = 4;
      for (int n = 0; n < 40; n++, r++) begin
        for (int k = 0; k < M; k++) begin
          int cnt;
          cnt = $urandom_range(0, 4);
          while (rnd_t'(r) - round >= rnd_t'(4)) @(negedge clk);
          disp_round = rnd_t'(r);
          disp_which = PW'(k);
          for (int i = 0; i < cnt; i++) begin
            pkt_desc_t d;
            int arr;
            d   = mk(r, k);
            arr = cyc + $urandom_range(10, 800 * (k + 1));
            if (arr <= last_t[k]) arr = last_t[k] + 1;
            last_t[k] = arr;
            if ($urandom_range(0, 7) == 0) dropt[k].push_back(arr);
            else begin
              wq[k].push_back('{d, arr});
              expq.push_back('{d, -1});
            end
            fire(k);
            repeat ($urandom_range(0, 40)) @(negedge clk);
          end
        end
      end
      disp_round = rnd_t'(r);
      disp_which = 0;
      wait (expq.size() == 0);
      repeat (M + 5) @(negedge clk);
    end

    check(n_drop > 0, "worker drops reported");
    check(n_mis > 0, "round-ID mismatch used");
    check(round == 44 && cur == 0, "drained to round 44");
    $display("outputs %0d drops %0d mismatch moves %0d drain moves %0d", n_out, n_drop, n_mis,
             n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
