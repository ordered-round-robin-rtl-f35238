// tb_porr_proc_balance: self-checking test of the processor-side P-ORR bookkeeping.
// A directed part checks the half-packet rule and the carry of a negative leftover into the
// next round with hand-computed numbers; a random part drives consume/advance/restart and
// compares pointer, balance, fit decision, round number and round ID with a model that keeps
// an explicit balance register per turn.
module tb_porr_proc_balance;
  import orr_pkg::*;

  localparam int unsigned M  = 4;
  localparam int unsigned PW = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bal_t cfg_quantum [M];
  len_t psize;
  logic consume, advance, restart;
  logic [PW-1:0] which;
  bal_t balance;
  logic fits, last, round_active;
  rnd_t round;
  rid_t rid;
  int checks = 0, failures = 0;

  porr_proc_balance #(.NUM_PROC(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state
  int m_which, m_bal, m_round, m_active;
  int m_carry [M];

  task automatic m_enter(input int p);
    m_which = p;
    m_bal   = int'(cfg_quantum[p]) + m_carry[p];
  endtask

  task automatic compare();
    check(which == PW'(m_which), "which");
    check(int'(balance) == m_bal, "balance");
    check(fits == (2 * m_bal >= int'(psize)), "fits");
    check(last == (m_which == M - 1), "last");
    check(round == rnd_t'(m_round), "round");
    check(rid == rid_t'(m_round), "rid");
    check(round_active == (m_active != 0), "round_active");
  endtask

  task automatic cmd(input logic c, input logic a, input logic r, input int size);
    @(negedge clk);
    consume = c; advance = a; restart = r; psize = len_t'(size);
    #1 compare();
    @(posedge clk);
    #1;
    if (r) begin
      foreach (m_carry[k]) m_carry[k] = 0;
      if (m_active != 0) m_round++;
      m_active = 0;
      m_enter(0);
    end else if (a) begin
      m_carry[m_which] = m_bal;
      if (m_which == M - 1) begin
        m_round++;
        m_active = 0;
        m_enter(0);
      end else m_enter(m_which + 1);
    end else if (c) begin
      m_bal -= size;
      m_active = 1;
    end
    consume = 0; advance = 0; restart = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_quantum = '{bal_t'(1000), bal_t'(800), bal_t'(1200), bal_t'(500)};
    consume = 0; advance = 0; restart = 0; psize = '0;
    foreach (m_carry[k]) m_carry[k] = 0;
    m_round = 0; m_active = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    m_enter(0);

    // directed: 1000-byte share, packets 600 and 500 fit (balance 1000, 400 >= 250)
    @(negedge clk); psize = 600; #1 check(fits && balance == 1000, "dir fit 600");
    cmd(1, 0, 0, 600);
    @(negedge clk); psize = 500; #1 check(fits && balance == 400, "dir fit 500 on 400");
    cmd(1, 0, 0, 500);
    // balance is now -100: a 100-byte packet does not fit (2*-100 < 100)
    @(negedge clk); psize = 100; #1 check(!fits && balance == -100, "dir no fit");
    // 801 bytes on the second processor's 800: 800 >= 400.5 fits; 802 on 400 does not
    cmd(0, 1, 0, 100);
    @(negedge clk); psize = 801; #1 check(which == 1 && fits, "dir next proc");
    cmd(1, 0, 0, 801);
    @(negedge clk); psize = 2; #1 check(balance == -1 && !fits, "dir -1");
    cmd(0, 1, 0, 2);
    cmd(0, 1, 0, 2);
    cmd(0, 1, 0, 2);
    // new round: p_1 starts from 1000 + (-100) = 900, p_2 from 800 - 1 = 799
    @(negedge clk); #1 check(which == 0 && balance == 900 && round == 1, "dir carry p1");
    cmd(0, 1, 0, 2);
    @(negedge clk); #1 check(which == 1 && balance == 799, "dir carry p2");
    // restart clears the carries and, as this round had no dispatch, keeps the round number
    cmd(0, 0, 1, 2);
    @(negedge clk); #1 check(which == 0 && balance == 1000 && round == 1, "dir restart");

    // random commands
    for (int n = 0; n < 20000; n++) begin
      int sel, size;
      sel  = $urandom_range(0, 99);
      size = $urandom_range(20, 1500);
      if (sel < 3)       cmd(0, 0, 1, size);
      else if (sel < 30) cmd(0, 1, 0, size);
      else               cmd(1, 0, 0, size);
      if (n == 10000) begin
        // reprogrammed quanta apply at once, also to the turn in progress
        int old_q;
        old_q = int'(cfg_quantum[m_which]);
        cfg_quantum = '{bal_t'(3000), bal_t'(1500), bal_t'(2000), bal_t'(2500)};
        m_bal += int'(cfg_quantum[m_which]) - old_q;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
