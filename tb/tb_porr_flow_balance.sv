// tb_porr_flow_balance: self-checking test of the flow-side P-ORR bookkeeping.
// Directed checks of the (0.75, 0.25) two-flow example in shares of 3000 and 1000 bytes,
// then random skip/advance/consume commands compared with a model that keeps an explicit
// balance register per turn.
module tb_porr_flow_balance;
  import orr_pkg::*;

  localparam int unsigned N  = 3;
  localparam int unsigned FW = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bal_t cfg_fquantum [N];
  len_t psize;
  logic skip, advance, consume;
  logic [FW-1:0] j;
  bal_t fbalance;
  logic fits;
  int checks = 0, failures = 0;

  porr_flow_balance #(.NUM_FLOWS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int m_j, m_bal;
  int m_carry [N];

  task automatic m_enter(input int f);
    m_j   = f;
    m_bal = int'(cfg_fquantum[f]) + m_carry[f];
  endtask

  task automatic cmd(input logic s, input logic a, input logic c, input int size);
    @(negedge clk);
    skip = s; advance = a; consume = c; psize = len_t'(size);
    #1;
    check(j == FW'(m_j), "j");
    check(int'(fbalance) == m_bal, "fbalance");
    check(fits == (2 * m_bal >= size), "fits");
    @(posedge clk);
    #1;
    if (s) begin
      m_carry[m_j] = 0;
      m_enter((m_j + 1) % N);
    end else if (a) begin
      m_carry[m_j] = m_bal;
      m_enter((m_j + 1) % N);
    end else if (c) m_bal -= size;
    skip = 0; advance = 0; consume = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_fquantum = '{bal_t'(3000), bal_t'(1000), bal_t'(0)};
    skip = 0; advance = 0; consume = 0; psize = '0;
    foreach (m_carry[k]) m_carry[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    m_enter(0);

    // flow 1: three 1000-byte packets exhaust 3000; the fourth does not fit
    repeat (3) cmd(0, 0, 1, 1000);
    @(negedge clk); psize = 1000; #1 check(!fits && fbalance == 0, "dir f1 used up");
    cmd(0, 1, 0, 1000);
    // flow 2: 1000 bytes, a 1400-byte packet fits (1000 >= 700) and leaves -400
    @(negedge clk); psize = 1400; #1 check(j == 1 && fits, "dir f2 fits");
    cmd(0, 0, 1, 1400);
    cmd(0, 1, 0, 100);
    // flow 3 has no reservation: nothing fits, it is passed over
    @(negedge clk); psize = 20; #1 check(j == 2 && !fits, "dir f3 zero share");
    cmd(0, 1, 0, 20);
    cmd(0, 1, 0, 20);
    // flow 2's next turn starts from 1000 - 400 = 600; a skip drops that carry
    @(negedge clk); #1 check(j == 1 && fbalance == 600, "dir f2 carry");
    cmd(1, 0, 0, 20);
    cmd(0, 1, 0, 20);
    cmd(0, 1, 0, 20);
    @(negedge clk); #1 check(j == 1 && fbalance == 1000, "dir f2 skip clears carry");

    cfg_fquantum = '{bal_t'(4000), bal_t'(2500), bal_t'(1500)};
    m_enter(m_j);
    for (int n = 0; n < 20000; n++) begin
      int sel, size;
      sel  = $urandom_range(0, 99);
      size = $urandom_range(20, 1500);
      if (sel < 5)       cmd(1, 0, 0, size);
      else if (sel < 25) cmd(0, 1, 0, size);
      else               cmd(0, 0, 1, size);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
