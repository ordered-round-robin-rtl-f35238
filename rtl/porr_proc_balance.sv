// porr_proc_balance: the processor side of Packetized Ordered Round-Robin (P-ORR).
//
// The dispatcher hands its load to the worker processors p_1..p_M strictly in turn, and each
// processor gets its share of a batch, the quantum Q_i = alpha_i * B bytes, before the pointer
// moves on. This block keeps that bookkeeping: the pointer 'which', the remaining Balance of
// the processor being served, the leftover carried into the next round, and the round
// counter whose low bits are stamped on every packet for the in-order collection at the
// transmitting processor.
//
// Balance is not stored; it is computed each cycle as quantum + carry - spent, so the
// quanta may be reprogrammed between rounds. 'fits' reports the P-ORR rule for the packet
// size on psize: the packet goes to p_which if Balance >= psize/2, which keeps the deviation
// from the ideal share within half a maximal packet. When the rule fails, the caller ends
// the share with 'advance'; the leftover Balance (positive or negative) is kept as carry and
// added to that processor's quantum in the next round, so the deviation does not grow over
// rounds. A wrap from the last processor to the first closes the round and advances the
// round counter. 'restart' is the non-backlog case: carries are dropped, the pointer returns
// to the first processor, and, if any packet went out in the current round, the round
// counter advances so that the transmitter can tell the rounds apart.
//
// Interface: cfg_quantum[i] is alpha_i*B in bytes, held stable by the host. The commands
// consume (dispatch psize bytes to p_which), advance and restart act at the next rising
// edge; restart has priority over advance, which has priority over consume. Outputs are
// valid in the same cycle as psize (combinational from registers and psize).
//
// The carry into the next round is written as Q_i <- alpha_i*B + leftover; the pseudo-code
// of the algorithm adds the leftover to the previous Q_i instead, which would let a single
// early deviation persist in every later round. This design follows the stated intent of the
// carry-over (keeping the long-run load at alpha_i*B) rather than that literal update.
module porr_proc_balance
  import orr_pkg::*;
#(
  parameter int unsigned NUM_PROC = 8,
  localparam int unsigned PW = (NUM_PROC > 1) ? $clog2(NUM_PROC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bal_t          cfg_quantum [NUM_PROC],
  input  len_t          psize,
  input  logic          consume,
  input  logic          advance,
  input  logic          restart,
  output logic [PW-1:0] which,
  output bal_t          balance,
  output logic          fits,
  output logic          last,          // p_which is the last processor of the round
  output logic          round_active,  // a packet has been dispatched in this round
  output rnd_t          round,
  output rid_t          rid
);

  bal_t carry [NUM_PROC];
  bal_t spent;

  assign balance = cfg_quantum[which] + carry[which] - spent;
  assign fits    = fits_half(balance, psize);
  assign last    = (which == PW'(NUM_PROC - 1));
  assign rid     = round[RID_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      which        <= '0;
      spent        <= '0;
      round        <= '0;
      round_active <= 1'b0;
      for (int i = 0; i < NUM_PROC; i++) carry[i] <= '0;
    end else if (restart) begin
      which <= '0;
      spent <= '0;
      for (int i = 0; i < NUM_PROC; i++) carry[i] <= '0;
      if (round_active) round <= round + 1'b1;
      round_active <= 1'b0;
    end else if (advance) begin
      carry[which] <= balance;
      spent        <= '0;
      if (last) begin
        which        <= '0;
        round        <= round + 1'b1;
        round_active <= 1'b0;
      end else begin
        which <= which + 1'b1;
      end
    end else if (consume) begin
      spent        <= spent + bal_t'(psize);
      round_active <= 1'b1;
    end
  end

  a_one_command : assert property (@(posedge clk) disable iff (!rst_n)
                                   !(advance && consume && !restart))
    else $error("porr_proc_balance: advance and consume in the same cycle");

endmodule
