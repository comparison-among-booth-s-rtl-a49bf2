// booth_step: one iteration of Booth's radix-2 multiplication algorithm, as
// pure combinational logic.
//
// The step looks at the two lowest bits of the multiplier register pair
// (q_in[0], qprev_in). For 01 it adds the multiplicand M to the accumulator A,
// for 10 it subtracts M, and for 00 or 11 it leaves A alone. The concatenation
// {A, Q, q_prev} is then shifted right by one place arithmetically: the sign of
// A is copied in at the top, the low bit of A moves into the top of Q, and the
// low bit of Q becomes the new q_prev. Chaining N of these steps, starting from
// A = 0, Q = multiplier, q_prev = 0, leaves the 2N-bit product in {A, Q}.
//
// Interface: m is the N-bit two's complement multiplicand; a_in/a_out,
// q_in/q_out and qprev_in/qprev_out are the register contents before and after
// the step; op reports which of the three actions the step took. There is no
// clock: the output follows the inputs after the add/subtract delay.
//
// The recoding table and the shift follow the algorithm as published. The
// accumulator is one bit wider (N+1 bits) than the operands here, a choice of
// this design: with only N bits, subtracting the most negative multiplicand
// (-2^(N-1)) overflows and the product comes out wrong.
module booth_step
  import mult_pkg::*;
#(
  parameter int unsigned N = mult_pkg::WIDTH
) (
  input  logic [N-1:0] m,          // multiplicand M, two's complement
  input  logic [N:0]   a_in,       // accumulator A before the step (guard bit on top)
  input  logic [N-1:0] q_in,       // multiplier register Q before the step
  input  logic         qprev_in,   // bit shifted out of Q by the previous step
  output logic [N:0]   a_out,      // accumulator after add/subtract and shift
  output logic [N-1:0] q_out,      // multiplier register after the shift
  output logic         qprev_out,  // new q_prev (old q_in[0])
  output booth_op_e    op          // action taken in this step
);

  logic [N:0] m_ext;   // multiplicand sign-extended to the accumulator width
  logic [N:0] a_sum;   // accumulator after the add or subtract

  assign m_ext = {m[N-1], m};

  always_comb begin
    unique case ({q_in[0], qprev_in})
      2'b01:   begin op = BOOTH_ADD; a_sum = a_in + m_ext; end
      2'b10:   begin op = BOOTH_SUB; a_sum = a_in - m_ext; end
      default: begin op = BOOTH_SHIFT; a_sum = a_in; end
    endcase
  end

  // Arithmetic right shift of {A, Q, q_prev}
  assign a_out     = {a_sum[N], a_sum[N:1]};
  assign q_out     = {a_sum[0], q_in[N-1:1]};
  assign qprev_out = q_in[0];

endmodule
