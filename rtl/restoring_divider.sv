// restoring_divider: sequential unsigned N-bit divider, restoring algorithm.
//
// Registers as in the classic shift/subtract datapath: accumulator A (starts
// at 0), dividend/quotient Q, divisor M, and an iteration counter COUNT.
// Each iteration shifts A and Q left together as one word, subtracts M from
// the new A with an (N+1)-bit adder, and looks at the sign of the result:
// negative means M did not fit, so the shifted A is kept (the restore step)
// and quotient bit Q[0] becomes 0; otherwise the difference replaces A and
// Q[0] becomes 1. After N iterations (COUNT = N-1 is the last) Q holds the
// quotient and A the remainder. Doing the subtract and the conditional
// restore in one clock (by keeping the un-subtracted value) is this
// design's choice; the result is the same as subtracting and adding M back.
// A zero divisor yields an all-ones quotient and raises div_by_zero.
//
// Interface: start (one-cycle request, ignored while busy) with dividend and
// divisor; busy (high while iterating); done (one-cycle pulse), quotient,
// remainder, div_by_zero (held until the next start).
// Timing: done rises N clocks after the clock edge that accepted start; one
// division every N+1 clocks when start is re-issued as soon as done is seen.
module restoring_divider #(
  parameter int unsigned N = sincos_pkg::OUT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quotient,
  output logic [N-1:0] remainder,
  output logic         div_by_zero
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic {IDLE, RUN} state_t;

  state_t        state;
  logic [N-1:0]  a_q;     // accumulator A (remainder)
  logic [N-1:0]  q_q;     // dividend, becomes the quotient
  logic [N-1:0]  m_q;     // divisor M
  logic [CW-1:0] count;

  logic [N:0]    a_shift; // {A, Q[N-1]}: A after the left shift
  logic [N:0]    diff;    // A - M in N+1 bits
  logic          neg;     // sign of A - M

  assign a_shift = {a_q, q_q[N-1]};
  assign diff    = a_shift - {1'b0, m_q};
  assign neg     = diff[N];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= IDLE;
      a_q         <= '0;
      q_q         <= '0;
      m_q         <= '0;
      count       <= '0;
      done        <= 1'b0;
      div_by_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            a_q         <= '0;
            q_q         <= dividend;
            m_q         <= divisor;
            count       <= '0;
            div_by_zero <= (divisor == '0);
            state       <= RUN;
          end
        end
        RUN: begin
          a_q <= neg ? a_shift[N-1:0] : diff[N-1:0];
          q_q <= {q_q[N-2:0], ~neg};
          if (count == CW'(N - 1)) begin
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            count <= count + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy      = (state == RUN);
  assign quotient  = q_q;
  assign remainder = a_q;

  // The remainder is always smaller than a non-zero divisor.
  a_rem_lt_div: assert property (@(posedge clk) disable iff (rst)
    (done && !div_by_zero) |-> (a_q < m_q));
endmodule
