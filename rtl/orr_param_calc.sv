// orr_param_calc: parameter initialisation of ORR / P-ORR.
//
// Before scheduling starts the dispatcher needs, from the processing cost w_i of each worker
// and the costs z_r,i / z_s,i of moving a byte to worker i and from it to the transmitter
// (all in clock cycles per byte):
//   - the load fractions alpha_i that make the workers finish one after another, each
//     starting its output exactly when the previous one has finished (eq. 1-3):
//     alpha_i * (w_i + z_s,i) = alpha_{i+1} * (z_r,i+1 + w_{i+1});
//   - the minimal batch I = C*L with C = ceil(1 / min(min_i alpha_i, min_j r_j)), so that
//     every worker's and every flow's share holds a maximal packet of L bytes (eq. 4, 5, 22),
//     and the batch B = m*I for the batch granularity m (eq. 6);
//   - the quanta Q_i = alpha_i*B and the flow shares F_j = r_j*B (eq. 20);
//   - the dispatcher gap Gap_d, the smallest idle time between two rounds for which no
//     worker and no transmitter slot is claimed by two rounds at once (eq. 10-12):
//     Gap_d = max(0, max_i(D_i+P_i+T_i) - sum D, P_M+T_M-D_1-P_1, sum T - sum D)
//     with D_i = Q_i*z_r,i, P_i = Q_i*w_i, T_i = Q_i*z_s,i. The last term is the same bound as
//     the one before it in exact arithmetic; it is kept so that the bound also holds for
//     the rounded integer quanta.
//
// How it works: unnormalised weights a_i are formed from a_M = 2^16 downwards,
// a_i = a_{i+1} * (z_r,i+1 + w_{i+1}) / (w_i + z_s,i), with a sequential divider (one
// division per processor). Then S = sum a_i, C = max(ceil(S / min a_i), ceil(2^16 / min r_j)),
// B = m*C*L, Q_i = floor(a_i*B/S), F_j = floor(r_j*B / 2^16) and Gap_d follow. Reservations
// are fractions in units of 2^-16 (65536 is 1.0); flows with r_j = 0 do not enter the
// minimum. Every worker has its own pair of link costs. The weights must stay below 2^40
// and B below 2^23: the product of the ratios (z_r,i+1 + w_{i+1}) / (w_i + z_s,i) along
// the chain must stay below 2^24, which holds for up to 8 workers whenever the sums
// z_r,i + w_i and w_i + z_s,i of all workers lie within a factor of eight of each other.
//
// Interface: pulse start with the inputs stable; busy is high while computing (about
// 65 cycles per division, 2*M+1 divisions), then done pulses for one cycle and the outputs
// hold their values until the next start.
module orr_param_calc
  import orr_pkg::*;
#(
  parameter int unsigned NUM_PROC  = 8,
  parameter int unsigned NUM_FLOWS = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  cfg_w  [NUM_PROC],
  input  logic [7:0]  cfg_zr [NUM_PROC],      // link p_d -> p_i, cycles per byte
  input  logic [7:0]  cfg_zs [NUM_PROC],      // link p_i -> p_t, cycles per byte
  input  len_t        cfg_maxlen,              // L
  input  logic [7:0]  cfg_m,                   // batch granularity m
  input  logic [16:0] cfg_r  [NUM_FLOWS],      // reservations, 1.0 = 65536
  output logic        busy,
  output logic        done,
  output bal_t        quantum  [NUM_PROC],
  output bal_t        fquantum [NUM_FLOWS],
  output logic [31:0] gap_d,
  output logic [31:0] batch,
  output logic [15:0] c_mult
);

  localparam int unsigned AW = 48;
  localparam logic [AW-1:0] A_ONE = AW'(1) << 16;
  localparam int unsigned IW = (NUM_PROC > 1) ? $clog2(NUM_PROC) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_W_ISSUE, S_W_WAIT, S_SUM, S_C_ISSUE, S_C_WAIT, S_CR_ISSUE, S_CR_WAIT,
    S_B, S_Q_ISSUE, S_Q_WAIT, S_F, S_GAP
  } state_t;

  state_t        state;
  logic [AW-1:0] a [NUM_PROC];
  logic [AW-1:0] s_sum, a_min;
  logic [16:0]   r_min;
  logic [IW-1:0] i;

  // divider
  logic        div_start, div_busy, div_done;
  logic [63:0] div_n, div_d, div_q, div_r;

  orr_div #(.W(64)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_n), .divisor(div_d),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r)
  );

  // operands of the division issued in each state
  always_comb begin
    div_start = 1'b0;
    div_n     = '0;
    div_d     = 64'd1;
    unique case (state)
      S_W_ISSUE: begin
        div_start = 1'b1;
        div_n     = 64'(a[i + 1'b1]) * 64'(32'(cfg_zr[i + 1'b1]) + 32'(cfg_w[i + 1'b1]));
        div_d     = 64'(32'(cfg_w[i]) + 32'(cfg_zs[i]));
      end
      S_C_ISSUE: begin
        div_start = 1'b1;
        div_n     = 64'(s_sum) + 64'(a_min) - 64'd1;
        div_d     = 64'(a_min);
      end
      S_CR_ISSUE: begin
        div_start = 1'b1;
        div_n     = 64'd65536 + 64'(r_min) - 64'd1;
        div_d     = 64'(r_min);
      end
      S_Q_ISSUE: begin
        div_start = 1'b1;
        div_n     = 64'(a[i]) * 64'(batch);
        div_d     = 64'(s_sum);
      end
      default: ;
    endcase
  end

  // sums and minima over the weights and reservations
  logic [AW-1:0] sum_c, min_c;
  logic [16:0]   rmin_c;
  always_comb begin
    sum_c  = '0;
    min_c  = '1;
    rmin_c = '0;
    for (int k = 0; k < NUM_PROC; k++) begin
      sum_c += a[k];
      if (a[k] < min_c) min_c = a[k];
    end
    for (int k = 0; k < NUM_FLOWS; k++) begin
      if (cfg_r[k] != '0 && (rmin_c == '0 || cfg_r[k] < rmin_c)) rmin_c = cfg_r[k];
    end
  end

  // Gap_d from the final quanta, eq. (10)-(12)
  logic signed [47:0] gap_c;
  always_comb begin
    logic signed [47:0] sum_d, sum_t, max_dpt, dpt, t_a, t_b, t_c;
    sum_d   = '0;
    sum_t   = '0;
    max_dpt = '0;
    for (int k = 0; k < NUM_PROC; k++) begin
      sum_d += 48'(quantum[k]) * 48'(cfg_zr[k]);
      sum_t += 48'(quantum[k]) * 48'(cfg_zs[k]);
      dpt    = 48'(quantum[k]) * (48'(cfg_zr[k]) + 48'(cfg_w[k]) + 48'(cfg_zs[k]));
      if (dpt > max_dpt) max_dpt = dpt;
    end
    t_a = max_dpt - sum_d;
    t_b = 48'(quantum[NUM_PROC-1]) * (48'(cfg_w[NUM_PROC-1]) + 48'(cfg_zs[NUM_PROC-1]))
        - 48'(quantum[0]) * (48'(cfg_zr[0]) + 48'(cfg_w[0]));
    t_c = sum_t - sum_d;
    gap_c = 0;
    if (t_a > gap_c) gap_c = t_a;
    if (t_b > gap_c) gap_c = t_b;
    if (t_c > gap_c) gap_c = t_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      busy   <= 1'b0;
      done   <= 1'b0;
      i      <= '0;
      s_sum  <= '0;
      a_min  <= '0;
      r_min  <= '0;
      gap_d  <= '0;
      batch  <= '0;
      c_mult <= '0;
      for (int k = 0; k < NUM_PROC; k++) begin
        a[k]       <= '0;
        quantum[k] <= '0;
      end
      for (int k = 0; k < NUM_FLOWS; k++) fquantum[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          busy              <= 1'b1;
          a[NUM_PROC-1]     <= A_ONE;
          i                 <= IW'(NUM_PROC >= 2 ? NUM_PROC - 2 : 0);
          state             <= (NUM_PROC >= 2) ? S_W_ISSUE : S_SUM;
        end
        S_W_ISSUE: state <= S_W_WAIT;
        S_W_WAIT: if (div_done) begin
          a[i] <= div_q[AW-1:0];
          if (i == '0) state <= S_SUM;
          else begin
            i     <= i - 1'b1;
            state <= S_W_ISSUE;
          end
        end
        S_SUM: begin
          s_sum <= sum_c;
          a_min <= (min_c == '0) ? AW'(1) : min_c;
          r_min <= rmin_c;
          state <= S_C_ISSUE;
        end
        S_C_ISSUE: state <= S_C_WAIT;
        S_C_WAIT: if (div_done) begin
          c_mult <= div_q[15:0];
          state  <= (r_min == '0) ? S_B : S_CR_ISSUE;
        end
        S_CR_ISSUE: state <= S_CR_WAIT;
        S_CR_WAIT: if (div_done) begin
          if (div_q[15:0] > c_mult) c_mult <= div_q[15:0];
          state <= S_B;
        end
        S_B: begin
          batch <= 32'(cfg_m) * 32'(c_mult) * 32'(cfg_maxlen);
          i     <= '0;
          state <= S_Q_ISSUE;
        end
        S_Q_ISSUE: state <= S_Q_WAIT;
        S_Q_WAIT: if (div_done) begin
          quantum[i] <= bal_t'(div_q);
          if (i == IW'(NUM_PROC - 1)) state <= S_F;
          else begin
            i     <= i + 1'b1;
            state <= S_Q_ISSUE;
          end
        end
        S_F: begin
          for (int k = 0; k < NUM_FLOWS; k++)
            fquantum[k] <= bal_t'((64'(cfg_r[k]) * 64'(batch)) >> 16);
          state <= S_GAP;
        end
        S_GAP: begin
          gap_d <= 32'(gap_c);
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
