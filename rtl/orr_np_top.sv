// orr_np_top: sequence-preserving packet path of a network processor, scheduled by P-ORR.
//
// Packets arrive on one input, each tagged with its flow, and wait in one queue per flow.
// The dispatcher (porr_dispatcher) hands them to M worker processors in ordered round-robin
// rounds: in every round p_1 receives its share of the batch first, then p_2, up to p_M, each
// share sized so that the workers finish one after another. Each worker has an input queue
// and an output queue; the workers themselves (the programmable engines that do the actual
// packet processing) are outside this design and connect through the wk_* ports. The
// transmitter (orr_transmitter) collects the processed packets in the same worker order, led
// by the round ID stamped on each packet, so that packets leave in exactly the order they
// were dispatched. The parameter initialisation (orr_param_calc) turns the costs of the
// workers and links into the quanta, flow shares and the inter-round gap the dispatcher uses.
//
// Operation: drive the cost inputs and pulse cfg_start; packets are held in their flow
// queues until cfg_ready is high. in_ready is low while the queue of in_desc.flow is full.
// Each worker pops wk_in (descriptor on wk_in_desc while wk_in_valid) and, after
// processing, pushes the descriptor to wk_out (only while wk_out_full is low), or pulses
// wk_drop if it discards the packet instead. out_valid pulses once per packet, in order,
// at the end of its transfer to the output link.
//
// All timing is in clock cycles: a packet of len bytes occupies the dispatch link for
// len*cfg_zr[i] cycles and the output link for len*cfg_zs[i] cycles, for worker i.
module orr_np_top
  import orr_pkg::*;
#(
  parameter int unsigned NUM_PROC     = 8,
  parameter int unsigned NUM_FLOWS    = 6,
  parameter int unsigned FLOW_Q_DEPTH = 64,
  parameter int unsigned WK_Q_DEPTH   = 128,
  localparam int unsigned PW = (NUM_PROC > 1) ? $clog2(NUM_PROC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // parameter initialisation
  input  logic          cfg_start,
  input  logic [7:0]    cfg_w  [NUM_PROC],
  input  logic [7:0]    cfg_zr [NUM_PROC],
  input  logic [7:0]    cfg_zs [NUM_PROC],
  input  len_t          cfg_maxlen,
  input  logic [7:0]    cfg_m,
  input  logic [16:0]   cfg_r  [NUM_FLOWS],
  output logic          cfg_ready,
  output logic [31:0]   cfg_batch,
  output logic [31:0]   cfg_gap_d,
  // incoming packets
  input  logic          in_valid,
  input  pkt_desc_t     in_desc,
  output logic          in_ready,
  // worker processors
  output logic          wk_in_valid [NUM_PROC],
  output pkt_desc_t     wk_in_desc  [NUM_PROC],
  input  logic          wk_in_pop   [NUM_PROC],
  input  logic          wk_out_push [NUM_PROC],
  input  pkt_desc_t     wk_out_desc [NUM_PROC],
  output logic          wk_out_full [NUM_PROC],
  input  logic          wk_drop     [NUM_PROC],
  // outgoing packets
  output logic          out_valid,
  output pkt_desc_t     out_desc,
  output logic [PW-1:0] out_proc,
  // monitoring
  output disp_events_t  disp_events,
  output logic          tx_mismatch,
  output logic          tx_drain
);

  localparam int unsigned FQW = $clog2(FLOW_Q_DEPTH + 1);
  localparam int unsigned WQW = $clog2(WK_Q_DEPTH + 1);

  // ---------------- parameter initialisation
  bal_t quantum  [NUM_PROC];
  bal_t fquantum [NUM_FLOWS];
  logic calc_busy, calc_done;
  logic [15:0] c_mult;

  orr_param_calc #(.NUM_PROC(NUM_PROC), .NUM_FLOWS(NUM_FLOWS)) u_calc (
    .clk, .rst_n, .start(cfg_start), .cfg_w, .cfg_zr, .cfg_zs, .cfg_maxlen, .cfg_m, .cfg_r,
    .busy(calc_busy), .done(calc_done), .quantum, .fquantum, .gap_d(cfg_gap_d),
    .batch(cfg_batch), .c_mult
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cfg_ready <= 1'b0;
    else if (cfg_start)  cfg_ready <= 1'b0;
    else if (calc_done)  cfg_ready <= 1'b1;
  end

  // ---------------- flow queues
  logic      fq_push  [NUM_FLOWS];
  logic      fq_pop   [NUM_FLOWS];
  logic      fq_empty [NUM_FLOWS];
  logic      fq_full  [NUM_FLOWS];
  logic      fq_valid [NUM_FLOWS];
  pkt_desc_t fq_head  [NUM_FLOWS];
  logic [FQW-1:0] fq_count [NUM_FLOWS];

  always_comb begin
    in_ready = 1'b0;
    for (int k = 0; k < NUM_FLOWS; k++) begin
      fq_push[k]  = in_valid && (32'(in_desc.flow) == k) && !fq_full[k];
      fq_valid[k] = !fq_empty[k] && cfg_ready;
      if (32'(in_desc.flow) == k) in_ready = !fq_full[k];
    end
  end

  for (genvar k = 0; k < NUM_FLOWS; k++) begin : g_flow_q
    orr_fifo #(.T(pkt_desc_t), .DEPTH(FLOW_Q_DEPTH)) u_fq (
      .clk, .rst_n, .push(fq_push[k]), .wr_data(in_desc), .pop(fq_pop[k]),
      .rd_data(fq_head[k]), .empty(fq_empty[k]), .full(fq_full[k]), .count(fq_count[k])
    );
  end

  // ---------------- dispatcher
  logic          wq_push [NUM_PROC];
  pkt_desc_t     wq_desc;
  logic          wq_full [NUM_PROC];
  logic          disp_fire;
  logic [PW-1:0] disp_proc, disp_which, tx_cur;
  rnd_t          disp_round, tx_round;

  porr_dispatcher #(.NUM_PROC(NUM_PROC), .NUM_FLOWS(NUM_FLOWS)) u_disp (
    .clk, .rst_n,
    .cfg_quantum(quantum), .cfg_fquantum(fquantum), .cfg_gap_d, .cfg_zr,
    .flow_valid(fq_valid), .flow_desc(fq_head), .flow_pop(fq_pop),
    .wk_push(wq_push), .wk_desc(wq_desc), .wk_full(wq_full), .tx_round,
    .disp_fire, .disp_proc, .disp_round, .disp_which, .events(disp_events)
  );

  // ---------------- worker input and output queues
  logic          oq_empty [NUM_PROC];
  logic          oq_valid [NUM_PROC];
  logic          oq_pop   [NUM_PROC];
  pkt_desc_t     oq_head  [NUM_PROC];
  logic          iq_empty [NUM_PROC];
  logic [WQW-1:0] iq_count [NUM_PROC];
  logic [WQW-1:0] oq_count [NUM_PROC];

  for (genvar k = 0; k < NUM_PROC; k++) begin : g_worker_q
    orr_fifo #(.T(pkt_desc_t), .DEPTH(WK_Q_DEPTH)) u_iq (
      .clk, .rst_n, .push(wq_push[k]), .wr_data(wq_desc), .pop(wk_in_pop[k]),
      .rd_data(wk_in_desc[k]), .empty(iq_empty[k]), .full(wq_full[k]), .count(iq_count[k])
    );
    assign wk_in_valid[k] = !iq_empty[k];

    orr_fifo #(.T(pkt_desc_t), .DEPTH(WK_Q_DEPTH)) u_oq (
      .clk, .rst_n, .push(wk_out_push[k]), .wr_data(wk_out_desc[k]), .pop(oq_pop[k]),
      .rd_data(oq_head[k]), .empty(oq_empty[k]), .full(wk_out_full[k]), .count(oq_count[k])
    );
    assign oq_valid[k] = !oq_empty[k];
  end

  // ---------------- transmitter
  orr_transmitter #(.NUM_PROC(NUM_PROC)) u_tx (
    .clk, .rst_n, .cfg_zs,
    .wk_valid(oq_valid), .wk_desc(oq_head), .wk_pop(oq_pop), .wk_drop,
    .disp_fire, .disp_proc, .disp_round, .disp_which,
    .tx_valid(out_valid), .tx_desc(out_desc), .tx_proc(out_proc),
    .cur(tx_cur), .round(tx_round), .ev_mismatch(tx_mismatch), .ev_drain(tx_drain)
  );

endmodule
