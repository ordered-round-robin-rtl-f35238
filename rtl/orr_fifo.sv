// orr_fifo: synchronous first-in first-out queue of packet descriptors.
//
// The network processor model places a queue in front of the dispatcher for each incoming
// flow, and a queue on each side of every worker processor for rate adaptation between the
// worker and the dispatching/transmitting processors. All of them are this module.
//
// Interface: push with wr_data when push is high (ignored when full); the head entry is
// always visible on rd_data while empty is low, and pop removes it (ignored when empty).
// A push and a pop in the same cycle are both accepted, also when the queue is full.
// count gives the number of stored entries. Everything is registered on the rising clock
// edge; the storage is a plain array that synthesis can map to a memory. The depth is a
// parameter of this design's choosing (the text only says the queues have a limited depth,
// for example one batch of a processor).
module orr_fifo #(
  parameter type         T     = orr_pkg::pkt_desc_t,
  parameter int unsigned DEPTH = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  T                           wr_data,
  input  logic                       pop,
  output T                           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                            mem [DEPTH];
  logic [AW-1:0]               rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0]  cnt;
  logic                        do_push, do_pop;

  assign empty   = (cnt == '0);
  assign full    = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count   = cnt;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

endmodule
