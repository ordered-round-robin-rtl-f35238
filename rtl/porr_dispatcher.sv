// porr_dispatcher: the dispatching processor p_d running multi-flow P-ORR.
//
// Packets wait in one queue per flow. Each decision cycle the dispatcher looks at the head
// packet of the flow under service j and at the processor under service p_which, and applies
// the P-ORR rule of both sides (eq. 23): the packet is dispatched only when
// min(Balance_which, FBalance_j) >= size/2. A side whose balance is too small for the packet
// ends its turn instead (porr_proc_balance / porr_flow_balance keep the books); both sides may
// end their turn in the same cycle, and the packet is then tried again in the next cycle. A
// flow with an empty queue is skipped, and when all queues are empty the processor side
// restarts at p_1 (the non-backlog branch). After the last processor's share, and after a
// non-backlog restart that closed a round in which packets went out, p_d waits Gap_d cycles
// before it starts the next round; this is what keeps rounds from overlapping on a worker or
// at the transmitter. With NUM_FLOWS = 1 and F_1 at least the batch size this reduces to the
// single-flow P-ORR.
//
// Moving a packet to worker i (the D-step) takes len * cfg_zr[i] cycles on the dispatch link,
// counted from the decision cycle; the descriptor, stamped with the current round ID, is
// pushed into the worker's input queue in the last cycle of the transfer, and the next
// decision follows in the cycle after. Every decision that does not dispatch (end of a turn,
// skip, restart) costs one cycle. If the chosen worker's input queue is full the dispatcher
// waits, decision by decision, until it has room. It also waits while the transmitter is
// 2^RID_W rounds behind (tx_round), since a packet of that round would carry the same round
// ID as the round the transmitter is collecting; the text notes this limit of an N-bit round
// ID, and the window stall is this design's way of keeping within it.
//
// Interface: flow_valid/flow_desc show the head of each flow queue, flow_pop removes it (in
// the decision cycle). wk_push[i] with wk_desc writes worker i's input queue; wk_full[i] is
// its full flag. disp_fire/disp_proc mark each dispatch decision and disp_round/disp_which
// give the scheduler's position; the transmitter uses them to know when a worker can have no
// more packets of a round. cfg_quantum (alpha_i*B), cfg_fquantum (r_j*B), cfg_gap_d and
// cfg_zr come from the parameter initialisation and are held stable while running.
// cfg_zr[i] = 0 is treated as 1 cycle per packet.
module porr_dispatcher
  import orr_pkg::*;
#(
  parameter int unsigned NUM_PROC  = 8,
  parameter int unsigned NUM_FLOWS = 6,
  localparam int unsigned PW = (NUM_PROC > 1) ? $clog2(NUM_PROC) : 1,
  localparam int unsigned FW = (NUM_FLOWS > 1) ? $clog2(NUM_FLOWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  bal_t          cfg_quantum  [NUM_PROC],
  input  bal_t          cfg_fquantum [NUM_FLOWS],
  input  logic [31:0]   cfg_gap_d,
  input  logic [7:0]    cfg_zr [NUM_PROC],
  // heads of the flow queues
  input  logic          flow_valid [NUM_FLOWS],
  input  pkt_desc_t     flow_desc  [NUM_FLOWS],
  output logic          flow_pop   [NUM_FLOWS],
  // worker input queues
  output logic          wk_push [NUM_PROC],
  output pkt_desc_t     wk_desc,
  input  logic          wk_full [NUM_PROC],
  input  rnd_t          tx_round,
  // position and monitoring
  output logic          disp_fire,
  output logic [PW-1:0] disp_proc,
  output rnd_t          disp_round,
  output logic [PW-1:0] disp_which,
  output disp_events_t  events
);

  typedef enum logic [1:0] {S_DECIDE, S_XFER, S_GAP} state_t;

  state_t        state;
  logic [31:0]   cnt;
  logic [PW-1:0] xfer_proc;
  pkt_desc_t     xfer_desc;

  // balance keepers
  logic          p_consume, p_advance, p_restart;
  logic          f_consume, f_advance, f_skip;
  logic [PW-1:0] which;
  logic [FW-1:0] j;
  bal_t          balance, fbalance;
  logic          p_fits, f_fits, p_last, round_active;
  rnd_t          round;
  rid_t          rid;

  logic          any_active, cur_active;
  pkt_desc_t     head;
  logic [31:0]   xfer_cycles;

  always_comb begin
    any_active = 1'b0;
    for (int k = 0; k < NUM_FLOWS; k++) any_active |= flow_valid[k];
  end
  assign cur_active  = flow_valid[j];
  assign head        = flow_desc[j];
  assign xfer_cycles = 32'(head.len) * ((cfg_zr[which] == '0) ? 32'd1 : 32'(cfg_zr[which]));

  porr_proc_balance #(.NUM_PROC(NUM_PROC)) u_proc (
    .clk, .rst_n, .cfg_quantum,
    .psize(head.len), .consume(p_consume), .advance(p_advance), .restart(p_restart),
    .which, .balance, .fits(p_fits), .last(p_last), .round_active, .round, .rid
  );

  porr_flow_balance #(.NUM_FLOWS(NUM_FLOWS)) u_flow (
    .clk, .rst_n, .cfg_fquantum,
    .psize(head.len), .skip(f_skip), .advance(f_advance), .consume(f_consume),
    .j, .fbalance, .fits(f_fits)
  );

  // decision logic, active in S_DECIDE only
  logic decide, dispatch_ok, stall, window_ok;
  rnd_t ahead;
  assign ahead     = round - tx_round;
  assign window_ok = (ahead < rnd_t'(2 ** RID_W));
  always_comb begin
    decide      = (state == S_DECIDE);
    p_restart   = decide && !any_active;
    f_skip      = decide && any_active && !cur_active;
    p_advance   = decide && any_active && cur_active && !p_fits;
    f_advance   = decide && any_active && cur_active && !f_fits;
    dispatch_ok = decide && any_active && cur_active && p_fits && f_fits;
    stall       = dispatch_ok && (wk_full[which] || !window_ok);
    p_consume   = dispatch_ok && !stall;
    f_consume   = p_consume;
  end

  always_comb begin
    for (int k = 0; k < NUM_FLOWS; k++) flow_pop[k] = p_consume && (j == FW'(k));
  end

  assign disp_fire  = p_consume;
  assign disp_proc  = which;
  assign disp_round = round;
  assign disp_which = which;

  // D-step transfer and Gap_d wait
  logic push_now;
  always_comb begin
    push_now = 1'b0;
    if (p_consume && xfer_cycles <= 32'd1) push_now = 1'b1;
    if (state == S_XFER && cnt == 32'd1)   push_now = 1'b1;
  end

  logic [PW-1:0] push_proc;
  assign push_proc = (state == S_XFER) ? xfer_proc : which;
  always_comb begin
    wk_desc = (state == S_XFER) ? xfer_desc : '{len: head.len, flow: head.flow, rid: rid, tag: head.tag};
    for (int k = 0; k < NUM_PROC; k++) wk_push[k] = push_now && (push_proc == PW'(k));
  end

  logic gap_after;  // this decision closes a round that must be followed by Gap_d
  assign gap_after = ((p_advance && p_last) || (p_restart && round_active)) && (cfg_gap_d != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_DECIDE;
      cnt       <= '0;
      xfer_proc <= '0;
      xfer_desc <= '0;
    end else begin
      unique case (state)
        S_DECIDE: begin
          if (p_consume && xfer_cycles > 32'd1) begin
            state     <= S_XFER;
            cnt       <= xfer_cycles - 32'd1;
            xfer_proc <= which;
            xfer_desc <= '{len: head.len, flow: head.flow, rid: rid, tag: head.tag};
          end else if (gap_after) begin
            state <= S_GAP;
            cnt   <= cfg_gap_d;
          end
        end
        S_XFER: begin
          if (cnt == 32'd1) state <= S_DECIDE;
          cnt <= cnt - 32'd1;
        end
        S_GAP: begin
          if (cnt == 32'd1) state <= S_DECIDE;
          cnt <= cnt - 32'd1;
        end
        default: state <= S_DECIDE;
      endcase
    end
  end

  always_comb begin
    events            = '0;
    events.dispatch   = p_consume;
    events.proc_adv   = p_advance;
    events.round_wrap = p_advance && p_last;
    events.flow_adv   = f_advance;
    events.flow_skip  = f_skip;
    events.restart    = p_restart && round_active;
    events.gap_start  = gap_after;
    events.stall_full   = dispatch_ok && wk_full[which];
    events.stall_window = dispatch_ok && !window_ok;
  end

endmodule
