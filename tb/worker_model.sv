// worker_model: behavioural model of one worker processor, for testbenches only.
//
// The worker takes the head packet of its input queue, spends len * cfg_w clock cycles on
// it (processing time proportional to packet length, w_i cycles per byte) and then writes
// it to its output queue, waiting while that queue is full. One packet at a time. While
// hold is high it takes no new packet, which lets a testbench stall one worker on purpose.
// The packet body is not modelled; the descriptor passes through unchanged. If drop_mod is
// not 0, a packet whose tag is a multiple of drop_mod is discarded once processed instead
// of written out, and drop pulses for one cycle with the descriptor on out_desc (a worker
// that filters packets).
module worker_model
  import orr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] cfg_w,
  input  logic       hold,
  input  logic [15:0] drop_mod,
  input  logic       in_valid,
  input  pkt_desc_t  in_desc,
  output logic       in_pop,
  output logic       out_push,
  output logic       drop,
  output pkt_desc_t  out_desc,
  input  logic       out_full
);
  logic        busy, ready, discard;
  logic [31:0] cnt;

  assign discard  = (drop_mod != '0) && ((out_desc.tag % drop_mod) == '0);
  assign in_pop   = !busy && in_valid && !hold;
  assign out_push = busy && ready && !out_full && !discard;
  assign drop     = busy && ready && discard;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      ready    <= 1'b0;
      cnt      <= '0;
      out_desc <= '0;
    end else if (in_pop) begin
      busy     <= 1'b1;
      out_desc <= in_desc;
      cnt      <= 32'(in_desc.len) * 32'(cfg_w);
      ready    <= (32'(in_desc.len) * 32'(cfg_w) <= 32'd1);
    end else if (busy) begin
      if (!ready) begin
        cnt <= cnt - 1'b1;
        if (cnt <= 32'd2) ready <= 1'b1;
      end else if (!out_full || discard) begin
        busy  <= 1'b0;
        ready <= 1'b0;
      end
    end
  end
endmodule
