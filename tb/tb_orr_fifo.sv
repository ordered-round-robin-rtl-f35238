// tb_orr_fifo: self-checking test of orr_fifo against a SystemVerilog queue.
// Random pushes and pops (also simultaneous, also on a full or empty queue) over a small
// depth; the head, empty, full and count outputs are compared every cycle.
module tb_orr_fifo;
  import orr_pkg::*;

  localparam int unsigned DEPTH = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic push, pop, empty, full;
  pkt_desc_t wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  pkt_desc_t model [$];

  orr_fifo #(.T(pkt_desc_t), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // compare outputs with the model
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(rd_data == model[0], "head");
      // phases: fill-biased, drain-biased, balanced
      push    = ($urandom_range(0, 99) < ((n / 500) % 2 == 0 ? 70 : 30));
      pop     = ($urandom_range(0, 99) < ((n / 500) % 2 == 0 ? 30 : 70));
      wr_data = pkt_desc_t'($urandom);
      @(posedge clk);
      #1;
      begin
        logic did_pop, did_push;
        did_pop  = pop && (model.size() != 0);
        did_push = push && (model.size() != DEPTH || did_pop);
        if (did_pop)  void'(model.pop_front());
        if (did_push) model.push_back(wr_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
