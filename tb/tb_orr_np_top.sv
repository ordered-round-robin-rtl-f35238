// tb_orr_np_top: end-to-end test of the P-ORR packet path at its default size
// (8 workers, 6 flows), with behavioural worker processors.
//
// Each phase recomputes the parameters from the worker and link costs, fills the flow
// queues while the calculation runs, and lets the packets flow through dispatcher, workers
// and transmitter. A decision-level model of the multi-flow P-ORR algorithm, fed with the
// same packets and the computed quanta, predicts the exact order in which packets leave,
// with their worker and round ID; the output must match it packet for packet.
//   phase 1  homogeneous, w = 6, z = 1: the saturation point M = 8, no Gap_d; the output
//            rate must be close to the dispatch rate of one byte per cycle;
//   phase 2  homogeneous, w = 12: below saturation, Gap_d = (w + 2z - zM) * Q; the output
//            rate must be close to M / (w + 2z) bytes per cycle;
//   phase 3  heterogeneous, w_i = 4, 6, 8, 10, ..., links z_r,i / z_s,i of 1 and 2 cycles
//            per byte alternating, with worker 3 held for a while, so that its input
//            queue fills (dispatcher stall) and the transmitter falls behind by the
//            round-ID window (window stall);
//   phase 4  workers slower than the costs they were declared with, short packets: their
//            queues fill and the dispatcher waits for room;
//   phase 5  workers discard every packet whose tag is a multiple of 7 and report it; the
//            remaining packets must still leave in order and all rounds must drain.
// Every scheduling mechanism must occur at least once over the run.
module tb_orr_np_top;
  import orr_pkg::*;

  localparam int M = 8;
  localparam int F = 6;
  localparam int PHASE_MAX = 700000;  // cycles

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
  logic          hold [M];
  logic [7:0]    wk_w_i [M];
  logic [15:0]   drop_mod;

  orr_np_top dut (.*);

  for (genvar k = 0; k < M; k++) begin : g_wk
    worker_model u_wk (
      .clk, .rst_n, .cfg_w(wk_w_i[k]), .hold(hold[k]), .drop_mod, .drop(wk_drop[k]),
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

  // ---------------- decision-level model of the dispatcher
  typedef struct { pkt_desc_t d; int proc; } exp_t;
  pkt_desc_t mq [F][$];
  exp_t      expq [$];
  int m_which = 0, m_bal = 0, m_round = 0, m_active = 0, m_j = 0, m_fbal = 0;
  int m_carry [M];
  int m_fcarry [F];
  int mq_q [M];
  int mq_f [F];

  function automatic int all_empty();
    for (int k = 0; k < F; k++) if (mq[k].size() != 0) return 0;
    return 1;
  endfunction

  task automatic m_step();
    if (all_empty() != 0) begin
      foreach (m_carry[k]) m_carry[k] = 0;
      m_which = 0;
      m_bal   = mq_q[0];
      if (m_active != 0) m_round++;
      m_active = 0;
    end else if (mq[m_j].size() == 0) begin
      m_fcarry[m_j] = 0;
      m_j    = (m_j + 1) % F;
      m_fbal = mq_f[m_j] + m_fcarry[m_j];
    end else begin
      int size;
      logic pf, ff;
      size = int'(mq[m_j][0].len);
      pf = (2 * m_bal >= size);
      ff = (2 * m_fbal >= size);
      if (pf && ff) begin
        exp_t e;
        e.d     = mq[m_j].pop_front();
        e.d.rid = rid_t'(m_round);
        e.proc  = m_which;
        expq.push_back(e);
        m_bal  -= size;
        m_fbal -= size;
        m_active = 1;
      end else begin
        if (!pf) begin
          m_carry[m_which] = m_bal;
          if (m_which == M - 1) begin
            m_which  = 0;
            m_round++;
            m_active = 0;
          end else m_which++;
          m_bal = mq_q[m_which] + m_carry[m_which];
        end
        if (!ff) begin
          m_fcarry[m_j] = m_fbal;
          m_j    = (m_j + 1) % F;
          m_fbal = mq_f[m_j] + m_fcarry[m_j];
        end
      end
    end
  endtask

  // ---------------- observation
  int n_drop = 0;
  int cyc = 0, n_out = 0, bytes_out = 0, first_cyc = -1, last_cyc = 0;
  int ev [12];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    ev[0]  += int'(disp_events.dispatch);   ev[1] += int'(disp_events.proc_adv);
    ev[2]  += int'(disp_events.round_wrap); ev[3] += int'(disp_events.flow_adv);
    ev[4]  += int'(disp_events.flow_skip);  ev[5] += int'(disp_events.restart);
    ev[6]  += int'(disp_events.gap_start);  ev[7] += int'(disp_events.stall_full);
    ev[8]  += int'(disp_events.stall_window);
    ev[9]  += int'(tx_mismatch);            ev[10] += int'(tx_drain);
    // a discarded packet will not be output: take it out of the expected order
    for (int k = 0; k < M; k++) if (wk_drop[k]) begin
      int idx [$];
      ev[11]++;
      idx = expq.find_first_index(e) with (e.d.tag == wk_out_desc[k].tag);
      check(idx.size() == 1, "discarded packet was expected");
      if (idx.size() == 1) begin
        check(int'(expq[idx[0]].proc) == k, "discarded on its own worker");
        expq.delete(idx[0]);
        n_drop++;
      end
    end
    if (disp_events.dispatch && first_cyc < 0) first_cyc = cyc;
    if (out_valid) begin
      exp_t e;
      n_out++;
      bytes_out += int'(out_desc.len);
      last_cyc = cyc;
      if (expq.size() == 0) check(0, "unexpected output");
      else begin
        e = expq.pop_front();
        check(out_desc == e.d, "output order and round ID");
        check(int'(out_proc) == e.proc, "output worker");
        if (out_desc != e.d && failures < 10)
          $display("  got tag %0d expected %0d", out_desc.tag, e.d.tag);
      end
    end
  end

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- one phase
  // The packets of a phase are drawn in advance, one list per flow; a feeder keeps the flow
  // queues topped up (starting while the parameters are computed), so that a flow queue is
  // only empty once its list is used up and the model sees the same queue states.
  int tag = 0;
  logic [7:0] wk_w [M];
  assign wk_w_i = wk_w;

  task automatic phase(input int per_flow, input int minlen, input int maxlen_pkt,
                       input real lo, input real hi, input int hold_k, input int hold_cyc,
                       input string name);
    pkt_desc_t lists [F][$];
    int total;
    real rate;
    total = per_flow * F;
    first_cyc = -1;
    bytes_out = 0;
    n_out     = 0;
    n_drop    = 0;
    for (int f = 0; f < F; f++)
      for (int n = 0; n < per_flow; n++) begin
        pkt_desc_t d;
        d = '0;
        d.len  = len_t'($urandom_range(minlen, maxlen_pkt));
        d.flow = flow_t'(f);
        d.tag  = tag_t'(tag++);
        lists[f].push_back(d);
        mq[f].push_back(d);
      end
    @(negedge clk) cfg_start = 1'b1;
    @(negedge clk) cfg_start = 1'b0;
    fork
      begin : feeder
        int f;
        f = 0;
        while (1) begin
          int tries;
          tries = 0;
          in_valid = 1'b0;
          // next flow with packets left and room in its queue
          while (tries < F) begin
            if (lists[f].size() != 0 && !dut.fq_full[f]) break;
            f = (f + 1) % F;
            tries++;
          end
          if (tries < F) begin
            in_valid = 1'b1;
            in_desc  = lists[f][0];
            void'(lists[f].pop_front());
            f = (f + 1) % F;
          end
          @(negedge clk);
          if (tries == F && lists[0].size() + lists[1].size() + lists[2].size() +
              lists[3].size() + lists[4].size() + lists[5].size() == 0) break;
        end
        in_valid = 1'b0;
      end
      if (hold_cyc > 0) begin
        hold[hold_k] = 1'b1;
        repeat (hold_cyc) @(negedge clk);
        hold[hold_k] = 1'b0;
      end
    join_none
    wait (cfg_ready);
    // the new quanta apply at once, also to the turns in progress
    m_bal  += int'(dut.quantum[m_which]) - mq_q[m_which];
    m_fbal += int'(dut.fquantum[m_j]) - mq_f[m_j];
    foreach (mq_q[k]) mq_q[k] = int'(dut.quantum[k]);
    foreach (mq_f[k]) mq_f[k] = int'(dut.fquantum[k]);
    while (all_empty() == 0) m_step();
    m_step();
    // a phase that does not finish in time is a failure; end the run at once
    fork
      wait (expq.size() == 0);
      repeat (PHASE_MAX) @(negedge clk);
    join_any
    if (expq.size() != 0) begin
      failures++;
      $display("%s did not finish within %0d cycles", name, PHASE_MAX);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    disable fork;
    repeat (200) @(negedge clk);
    rate = real'(bytes_out) / real'(last_cyc - first_cyc + 1);
    $display("%s: B=%0d Gap_d=%0d packets %0d bytes %0d cycles %0d rate %0.3f byte/cycle",
             name, cfg_batch, cfg_gap_d, n_out, bytes_out, last_cyc - first_cyc + 1, rate);
    check(n_out + n_drop == total, "all packets delivered or discarded");
    check(rate >= lo && rate <= hi, "output rate");
  endtask

  localparam string ev_names [12] = '{"dispatch", "proc_adv", "round_wrap", "flow_adv",
    "flow_skip", "restart", "gap_start", "stall_full", "stall_window", "tx_mismatch",
    "tx_drain", "worker_drop"};

  initial begin
    foreach (ev[k]) ev[k] = 0;
    foreach (m_carry[k]) m_carry[k] = 0;
    foreach (m_fcarry[k]) m_fcarry[k] = 0;
    foreach (mq_q[k]) mq_q[k] = 0;
    foreach (mq_f[k]) mq_f[k] = 0;
    foreach (hold[k]) hold[k] = 1'b0;
    drop_mod = 16'd0;
    cfg_start = 0; in_valid = 0; in_desc = '0;
    foreach (cfg_zr[k]) cfg_zr[k] = 8'd1;
    foreach (cfg_zs[k]) cfg_zs[k] = 8'd1;
    cfg_m = 1; cfg_maxlen = 1500;
    cfg_r = '{17'd19661, 17'd19661, 17'd6554, 17'd6554, 17'd6554, 17'd6554};
    foreach (cfg_w[k]) cfg_w[k] = 8'd6;
    wk_w = cfg_w;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // saturated: one byte per cycle at the dispatcher; rounds follow without gap
    phase(50, 20, 1500, 0.85, 1.0, 0, 0, "phase 1, w=6");
    check(cfg_gap_d == 0, "no gap at saturation");

    // below saturation: M/(w+2z) = 8/14 bytes per cycle
    foreach (cfg_w[k]) cfg_w[k] = 8'd12;
    wk_w = cfg_w;
    phase(50, 20, 1500, 0.48, 0.60, 0, 0, "phase 2, w=12");
    check(cfg_gap_d == 32'((12 + 2 - 8) * dut.quantum[0]), "Gap_d of eq. 15");

    // heterogeneous workers, worker 4 held at the start: the transmitter waits on it and
    // the dispatcher runs into the round-ID window
    // with links of different speed: z_r,i = 1, 2, ... and z_s,i = 2, 1, ... alternating
    foreach (cfg_w[k]) cfg_w[k] = 8'(4 + 2 * (k % 4));
    foreach (cfg_zr[k]) cfg_zr[k] = 8'(1 + k % 2);
    foreach (cfg_zs[k]) cfg_zs[k] = 8'(2 - k % 2);
    wk_w = cfg_w;
    phase(20, 1000, 1500, 0.0, 1.0, 3, 150000, "phase 3, w=4..10, worker 4 held");
    foreach (cfg_zr[k]) cfg_zr[k] = 8'd1;
    foreach (cfg_zs[k]) cfg_zs[k] = 8'd1;

    // workers five times slower than the parameters assume, short packets: worker input
    // queues fill up and the dispatcher waits for room
    foreach (cfg_w[k]) cfg_w[k] = 8'd6;
    foreach (wk_w[k]) wk_w[k] = 8'd30;
    phase(250, 20, 30, 0.0, 1.0, 0, 0, "phase 4, workers slower than programmed");

    // workers that filter: every seventh tag is discarded and reported
    wk_w = cfg_w;
    drop_mod = 16'd7;
    phase(50, 20, 1500, 0.5, 1.0, 0, 0, "phase 5, one packet in seven discarded");
    drop_mod = 16'd0;

    for (int k = 0; k < 12; k++) begin
      $display("  %-12s %0d", ev_names[k], ev[k]);
      check(ev[k] > 0, "mechanism occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
