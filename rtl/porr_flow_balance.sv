// porr_flow_balance: the flow side of P-ORR with several reserved flows.
//
// When packets belong to N flows with reservations r_j, every batch of B bytes gives flow
// f_j a share F_j = r_j * B. The dispatcher serves the flows in turn, just as it serves the
// processors in turn; this block keeps the flow pointer j, the remaining FBalance of the flow
// being served and the leftover that flow carries into its next turn. A packet of flow f_j is
// only dispatched when FBalance_j >= size/2 (and the processor side agrees), so each flow's
// service follows its reservation within half a packet per turn.
//
// FBalance is computed each cycle as flow_quantum + carry - spent. Commands from the
// dispatcher, acting at the next rising edge, in priority order:
//   skip    - the current flow has no packet: its carry is dropped (it restarts from its
//             nominal share, as the skip loop of the algorithm does) and j moves on;
//   advance - the current flow's share is used up: the leftover FBalance is kept as carry
//             and j moves on (j wraps from N-1 to 0);
//   consume - a packet of psize bytes of flow j went out.
// cfg_fquantum[j] is r_j*B in bytes. As on the processor side, the carry is added to the
// nominal share r_j*B rather than to the previous F_j, so that the long-run service of each
// flow stays at its reservation; this is this design's reading of the carry-over rule.
module porr_flow_balance
  import orr_pkg::*;
#(
  parameter int unsigned NUM_FLOWS = 6,
  localparam int unsigned FW = (NUM_FLOWS > 1) ? $clog2(NUM_FLOWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bal_t          cfg_fquantum [NUM_FLOWS],
  input  len_t          psize,
  input  logic          skip,
  input  logic          advance,
  input  logic          consume,
  output logic [FW-1:0] j,
  output bal_t          fbalance,
  output logic          fits
);

  bal_t carry [NUM_FLOWS];
  bal_t spent;
  logic [FW-1:0] j_next;

  assign fbalance = cfg_fquantum[j] + carry[j] - spent;
  assign fits     = fits_half(fbalance, psize);
  assign j_next   = (j == FW'(NUM_FLOWS - 1)) ? '0 : j + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j     <= '0;
      spent <= '0;
      for (int k = 0; k < NUM_FLOWS; k++) carry[k] <= '0;
    end else if (skip) begin
      carry[j] <= '0;
      spent    <= '0;
      j        <= j_next;
    end else if (advance) begin
      carry[j] <= fbalance;
      spent    <= '0;
      j        <= j_next;
    end else if (consume) begin
      spent <= spent + bal_t'(psize);
    end
  end

  a_one_command : assert property (@(posedge clk) disable iff (!rst_n)
                                   !(advance && consume && !skip))
    else $error("porr_flow_balance: advance and consume in the same cycle");

endmodule
