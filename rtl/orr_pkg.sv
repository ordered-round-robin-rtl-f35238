// orr_pkg: types and widths shared by the Ordered Round-Robin (P-ORR) packet path.
//
// A packet travels through the scheduler as a descriptor: its length in bytes, the flow it
// belongs to, the round ID stamped on it by the dispatcher, and an opaque tag that the
// surrounding system uses to find the packet body (buffer handle, sequence number, ...).
// The packet body itself never passes through this logic; only the timing of moving it
// (bytes times the link cost) is modelled by the dispatcher and the transmitter.
//
// The length width covers the largest packet the evaluation uses (5 Kbyte); balances are
// signed and wide enough for a whole batch plus carry-over. The round ID width is this
// design's choice: the scheme works with any width of at least one bit.
package orr_pkg;

  localparam int unsigned LEN_W  = 16;  // packet length in bytes
  localparam int unsigned FLOW_W = 3;   // flow index, up to 8 flows
  localparam int unsigned RID_W  = 2;   // round ID carried by each packet (N in the text)
  localparam int unsigned TAG_W  = 16;  // opaque packet handle
  localparam int unsigned BAL_W  = 24;  // signed byte balances and quanta
  localparam int unsigned RND_W  = 16;  // full-width round counter kept inside the design

  typedef logic [LEN_W-1:0]  len_t;
  typedef logic [FLOW_W-1:0] flow_t;
  typedef logic [RID_W-1:0]  rid_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic signed [BAL_W-1:0] bal_t;
  typedef logic [RND_W-1:0]  rnd_t;

  typedef struct packed {
    len_t  len;
    flow_t flow;
    rid_t  rid;
    tag_t  tag;
  } pkt_desc_t;


  // One-cycle pulses from the dispatcher, one per scheduling mechanism, for monitoring.
  typedef struct packed {
    logic dispatch;    // a packet was sent to a worker processor
    logic proc_adv;    // Balance_i < size/2: share of p_i closed, pointer moved on
    logic round_wrap;  // pointer wrapped from p_M to p_1: a round ended
    logic flow_adv;    // FBalance_j < size/2: turn of flow j closed
    logic flow_skip;   // flow j had no packet and was skipped
    logic restart;     // no flow had a packet: non-backlog restart at p_1
    logic gap_start;   // a Gap_d wait began
    logic stall_full;  // the chosen worker's input queue was full
    logic stall_window;// the transmitter is too many rounds behind for the round ID width
  } disp_events_t;

  // P-ORR dispatching rule, eq. (19): dispatch when balance >= size/2, evaluated exactly
  // as 2*balance >= size so that odd sizes are not rounded.
  function automatic logic fits_half(input bal_t balance, input len_t size);
    logic signed [BAL_W:0] twice;
    twice = {balance, 1'b0};
    return twice >= $signed({{(BAL_W + 1 - LEN_W) {1'b0}}, size});
  endfunction

endpackage
