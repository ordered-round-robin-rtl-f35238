// orr_transmitter: the transmitting processor p_t with round-ID sequence control.
//
// The dispatcher sends the packets of a round to the workers in the order p_1, p_2, ..., p_M
// and stamps each with the low bits of the round number. The transmitter keeps its own
// round number and a pointer to a worker, starting at round 0 and p_1, and takes packets from
// that worker's output queue for as long as their round ID equals its own. The first packet
// with a different round ID shows that the worker has no more packets of this round, and the
// pointer moves to the next worker; after p_M the round number advances and the pointer
// returns to p_1. Merging the worker outputs this way restores exactly the order in which the
// dispatcher sent the packets, whatever the workers' speeds, without any per-packet sequence
// number.
//
// The round-ID rule alone cannot move on from a worker whose queue stays empty (at the end of
// the traffic, or when the worker got no packet in this round). This design adds a drain
// rule: the pointer also moves on when the worker's queue is empty, no packet sent to that
// worker is still on its way (a count of dispatched minus collected packets per worker), and
// the dispatcher's own position (disp_round, disp_which) is already past this worker in this
// round, so that no further packet of the round can reach it. A worker that discards a
// packet (a filter, an error) reports it on wk_drop, so that the count stays exact and the
// drain rule keeps working after a loss. A loss that is not reported leaves the count high;
// the transmitter then waits on that worker until a packet of a later round shows up there,
// which is the plain round-ID behaviour.
//
// Moving a packet from worker i to the output (the T-step) takes len * cfg_zs[i] cycles from
// the cycle it is taken off the worker queue; tx_valid pulses with the descriptor in the last
// of those cycles, and the next decision follows in the cycle after. Every pointer move costs one cycle.
// cfg_zs[i] = 0 is treated as 1 cycle per packet.
module orr_transmitter
  import orr_pkg::*;
#(
  parameter int unsigned NUM_PROC = 8,
  parameter int unsigned CNT_W    = 16,
  localparam int unsigned PW = (NUM_PROC > 1) ? $clog2(NUM_PROC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    cfg_zs [NUM_PROC],
  // worker output queues
  input  logic          wk_valid [NUM_PROC],
  input  pkt_desc_t     wk_desc  [NUM_PROC],
  output logic          wk_pop   [NUM_PROC],
  input  logic          wk_drop  [NUM_PROC],  // worker discarded one packet it was given
  // dispatcher position
  input  logic          disp_fire,
  input  logic [PW-1:0] disp_proc,
  input  rnd_t          disp_round,
  input  logic [PW-1:0] disp_which,
  // output link
  output logic          tx_valid,
  output pkt_desc_t     tx_desc,
  output logic [PW-1:0] tx_proc,
  // position and monitoring
  output logic [PW-1:0] cur,
  output rnd_t          round,
  output logic          ev_mismatch,  // pointer moved on a round-ID mismatch
  output logic          ev_drain      // pointer moved by the drain rule
);

  typedef enum logic {S_COLLECT, S_XFER} state_t;

  state_t             state;
  logic [31:0]        cnt;
  pkt_desc_t          xfer_desc;
  logic [PW-1:0]      xfer_proc;
  logic [CNT_W-1:0]   outstanding [NUM_PROC];

  pkt_desc_t          head;
  logic               head_valid, match, take, mismatch, drain, move;
  logic [31:0]        xfer_cycles;
  logic signed [RND_W-1:0] rdiff;
  logic               disp_past;

  assign head        = wk_desc[cur];
  assign head_valid  = wk_valid[cur];
  assign match       = (head.rid == round[RID_W-1:0]);
  assign xfer_cycles = 32'(head.len) * ((cfg_zs[cur] == '0) ? 32'd1 : 32'(cfg_zs[cur]));
  assign rdiff       = $signed(disp_round - round);
  assign disp_past   = (rdiff > 0) || ((rdiff == 0) && (disp_which > cur));

  always_comb begin
    take     = (state == S_COLLECT) && head_valid && match;
    mismatch = (state == S_COLLECT) && head_valid && !match;
    drain    = (state == S_COLLECT) && !head_valid && (outstanding[cur] == '0) && disp_past;
    move     = mismatch || drain;
    for (int k = 0; k < NUM_PROC; k++) wk_pop[k] = take && (cur == PW'(k));
  end

  assign ev_mismatch = mismatch;
  assign ev_drain    = drain;

  // output of the T-step
  always_comb begin
    tx_valid = 1'b0;
    tx_desc  = xfer_desc;
    tx_proc  = xfer_proc;
    if (take && xfer_cycles <= 32'd1) begin
      tx_valid = 1'b1;
      tx_desc  = head;
      tx_proc  = cur;
    end else if (state == S_XFER && cnt == 32'd1) begin
      tx_valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_COLLECT;
      cnt       <= '0;
      cur       <= '0;
      round     <= '0;
      xfer_desc <= '0;
      xfer_proc <= '0;
    end else begin
      unique case (state)
        S_COLLECT: begin
          if (take && xfer_cycles > 32'd1) begin
            state     <= S_XFER;
            cnt       <= xfer_cycles - 32'd1;
            xfer_desc <= head;
            xfer_proc <= cur;
          end else if (move) begin
            if (cur == PW'(NUM_PROC - 1)) begin
              cur   <= '0;
              round <= round + 1'b1;
            end else begin
              cur <= cur + 1'b1;
            end
          end
        end
        S_XFER: begin
          if (cnt == 32'd1) state <= S_COLLECT;
          cnt <= cnt - 32'd1;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  // packets sent to each worker and neither collected nor reported dropped
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_PROC; k++) outstanding[k] <= '0;
    end else begin
      for (int k = 0; k < NUM_PROC; k++) begin
        outstanding[k] <= outstanding[k]
                          + CNT_W'(disp_fire && (disp_proc == PW'(k)))
                          - CNT_W'(wk_pop[k]) - CNT_W'(wk_drop[k]);
      end
    end
  end

  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n)
                                    take |-> (outstanding[cur] != '0))
    else $error("orr_transmitter: collected a packet that was never dispatched");

  for (genvar k = 0; k < NUM_PROC; k++) begin : g_drop_chk
    a_drop_known : assert property (@(posedge clk) disable iff (!rst_n)
                                    wk_drop[k] |-> (outstanding[k] != '0))
      else $error("orr_transmitter: worker %0d dropped a packet it was never given", k);
  end

endmodule
