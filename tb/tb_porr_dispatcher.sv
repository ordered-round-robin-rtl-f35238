// tb_porr_dispatcher: self-checking test of the P-ORR dispatching processor.
//
// Three flow queues hold random packets (20..1500 bytes) and four workers have their own
// quanta. A decision-level model of the multi-flow P-ORR algorithm (one decision per cycle,
// len*z_r,i cycles per dispatch to worker i, with z_r,i = 2 or 3 alternating, Gap_d cycles
// after a round) predicts, for every packet, the
// worker, the round ID and the cycle in which it reaches the worker's queue.
// Phase A checks all of that exactly and ends in the non-backlog restart. Phase B adds random
// full worker queues and a lagging transmitter round, so that both kinds of stall occur; the
// predicted order, workers and round IDs must still hold. Every scheduling event must occur.
module tb_porr_dispatcher;
  import orr_pkg::*;

  localparam int unsigned M  = 4;
  localparam int unsigned F  = 3;
  localparam int unsigned PW = 2;
  localparam int unsigned FW = 2;
  localparam int          GAP = 700;
  localparam int          ZR  = 2;    // z_r,i = ZR + i % 2

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bal_t cfg_quantum [M];
  bal_t cfg_fquantum [F];
  logic [31:0] cfg_gap_d;
  logic [7:0]  cfg_zr [M];
  logic        flow_valid [F];
  pkt_desc_t   flow_desc [F];
  logic        flow_pop [F];
  logic        wk_push [M];
  pkt_desc_t   wk_desc;
  logic        wk_full [M];
  rnd_t        tx_round;
  logic        disp_fire;
  logic [PW-1:0] disp_proc, disp_which;
  rnd_t        disp_round;
  disp_events_t events;

  porr_dispatcher #(.NUM_PROC(M), .NUM_FLOWS(F)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- stimulus queues (what the DUT sees)
  pkt_desc_t q [F][$];
  always_comb
    for (int k = 0; k < F; k++) begin
      flow_valid[k] = (q[k].size() != 0);
      flow_desc[k]  = (q[k].size() != 0) ? q[k][0] : '0;
    end

  // ---------------- decision-level model
  typedef struct { pkt_desc_t d; int proc; int t; } exp_t;
  pkt_desc_t mq [F][$];
  exp_t      expq [$];
  int m_which, m_bal, m_round, m_active, m_j, m_fbal, m_time;
  int m_carry [M];
  int m_fcarry [F];

  function automatic int all_empty();
    for (int k = 0; k < F; k++) if (mq[k].size() != 0) return 0;
    return 1;
  endfunction

  task automatic m_step();
    if (all_empty() != 0) begin
      foreach (m_carry[k]) m_carry[k] = 0;
      m_which = 0;
      m_bal   = int'(cfg_quantum[0]);
      m_time += 1;
      if (m_active != 0) begin
        m_round++;
        m_time += GAP;
      end
      m_active = 0;
    end else if (mq[m_j].size() == 0) begin
      m_fcarry[m_j] = 0;
      m_j    = (m_j + 1) % F;
      m_fbal = int'(cfg_fquantum[m_j]) + m_fcarry[m_j];
      m_time += 1;
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
        e.t     = m_time + size * (ZR + m_which % 2) - 1;
        expq.push_back(e);
        m_bal  -= size;
        m_fbal -= size;
        m_active = 1;
        m_time += size * (ZR + m_which % 2);
      end else begin
        m_time += 1;
        if (!pf) begin
          m_carry[m_which] = m_bal;
          if (m_which == M - 1) begin
            m_which  = 0;
            m_round++;
            m_active = 0;
            m_time  += GAP;
          end else m_which++;
          m_bal = int'(cfg_quantum[m_which]) + m_carry[m_which];
        end
        if (!ff) begin
          m_fcarry[m_j] = m_fbal;
          m_j    = (m_j + 1) % F;
          m_fbal = int'(cfg_fquantum[m_j]) + m_fcarry[m_j];
        end
      end
    end
  endtask

  // ---------------- observation
  int cyc = 0, t0 = 0, check_time = 1, got = 0;
  int n_ev [10];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int k = 0; k < F; k++) if (flow_pop[k]) void'(q[k].pop_front());
    n_ev[0] += int'(events.dispatch);   n_ev[1] += int'(events.proc_adv);
    n_ev[2] += int'(events.round_wrap); n_ev[3] += int'(events.flow_adv);
    n_ev[4] += int'(events.flow_skip);  n_ev[5] += int'(events.restart);
    n_ev[6] += int'(events.gap_start);  n_ev[7] += int'(events.stall_full);
    n_ev[8] += int'(events.stall_window);
    for (int k = 0; k < M; k++) if (wk_push[k]) begin
      exp_t e;
      got++;
      if (expq.size() == 0) check(0, "unexpected push");
      else begin
        e = expq.pop_front();
        check(wk_desc == e.d, "descriptor/round ID");
        check(k == e.proc, "worker");
        if (check_time != 0) check(cyc - 1 == e.t, "push cycle");
        if (check_time != 0 && cyc - 1 != e.t && failures < 10)
          $display("  tag %0d got cycle %0d expected %0d", e.d.tag, cyc - 1, e.t);
      end
    end
  end

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tag = 0;
  int win_wait = 0;
  task automatic load(input int n);
    for (int i = 0; i < n; i++) begin
      pkt_desc_t d;
      int f;
      f = $urandom_range(0, F - 1);
      d = '0;
      d.len  = len_t'($urandom_range(20, 1500));
      d.flow = flow_t'(f);
      d.tag  = tag_t'(tag++);
      q[f].push_back(d);
      mq[f].push_back(d);
    end
  endtask

  initial begin
    cfg_quantum  = '{bal_t'(1500), bal_t'(2000), bal_t'(1000), bal_t'(2500)};
    cfg_fquantum = '{bal_t'(3000), bal_t'(1500), bal_t'(1000)};
    cfg_gap_d = GAP;
    foreach (cfg_zr[k]) cfg_zr[k] = 8'(ZR + k % 2);
    tx_round  = '0;
    foreach (wk_full[k]) wk_full[k] = 1'b0;
    foreach (n_ev[k]) n_ev[k] = 0;
    foreach (m_carry[k]) m_carry[k] = 0;
    foreach (m_fcarry[k]) m_fcarry[k] = 0;
    m_which = 0; m_round = 0; m_active = 0; m_j = 0; m_time = 0;
    m_bal  = int'(cfg_quantum[0]);
    m_fbal = int'(cfg_fquantum[0]);

    // phase A: exact timing, transmitter keeps up
    load(150);
    while (all_empty() == 0) m_step();
    m_step();  // final non-backlog restart
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      forever @(negedge clk) tx_round = disp_round;
    join_none
    wait (expq.size() == 0);
    repeat (GAP + 20) @(negedge clk);
    disable fork;

    // phase B: full worker queues and a transmitter that falls behind
    check_time = 0;
    load(150);
    while (all_empty() == 0) m_step();
    fork
      forever @(negedge clk) begin
        foreach (wk_full[k]) wk_full[k] = ($urandom_range(0, 99) < 30);
        // the transmitter catches up only after the dispatcher has waited for it a while
        if (events.stall_window) win_wait++;
        if (win_wait > 3000) begin
          tx_round = disp_round - 1'b1;
          win_wait = 0;
        end
      end
    join_none
    wait (expq.size() == 0);
    disable fork;
    repeat (10) @(negedge clk);

    check(got == 300, "all packets dispatched");
    for (int k = 0; k < 9; k++) begin
      check(n_ev[k] > 0, "event occurred");
      if (n_ev[k] == 0) $display("event %0d never happened", k);
    end
    $display("events: dispatch %0d proc_adv %0d wrap %0d flow_adv %0d skip %0d restart %0d gap %0d stall_full %0d stall_window %0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7], n_ev[8]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
