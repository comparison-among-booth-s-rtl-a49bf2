// booth_mult: combinational N x N two's complement multiplier built from N
// unrolled Booth steps.
//
// Booth's algorithm recodes the multiplier so that a run of ones costs one
// subtraction at its low end and one addition above its high end instead of one
// addition per bit. Each booth_step instance performs one iteration (look at
// q0 and q_prev, add or subtract the multiplicand or do nothing, shift the
// {A, Q, q_prev} register pair right by one); N instances are chained so that
// the whole multiplication settles in a single combinational pass with no
// storage, as in the original FPGA realisation. Stage 0 starts from A = 0,
// Q = multiplier, q_prev = 0.
//
// Interface: m (multiplicand) and q (multiplier) are N-bit two's complement
// numbers; a non-negative value below 2^(N-1) is therefore also an ordinary
// positive number, so the one circuit covers both the positive and the signed
// cases. The product is delivered in two halves, p_hi (final A) and p_lo
// (final Q), which the user concatenates as {p_hi, p_lo}; that split output is
// how the published design presents it. ops[k] is the action taken by step k,
// for observation only. Timing: purely combinational, zero cycles of latency.
//
// The accumulator carries one guard bit beyond N (see booth_step); only its
// low N bits are brought out, which is exact because the product of two
// N-bit numbers always fits in 2N bits.
module booth_mult
  import mult_pkg::*;
#(
  parameter int unsigned N = mult_pkg::WIDTH
) (
  input  logic [N-1:0]            m,     // multiplicand
  input  logic [N-1:0]            q,     // multiplier
  output logic [N-1:0]            p_hi,  // high half of the product (register A)
  output logic [N-1:0]            p_lo,  // low half of the product (register Q)
  output booth_op_e [N-1:0]       ops    // per-step action, step 0 in ops[0]
);

  // Register contents between the steps: index k holds the values entering step k
  logic [N:0]   a_chain [N+1];
  logic [N-1:0] q_chain [N+1];
  logic         qp_chain[N+1];

  assign a_chain[0]  = '0;
  assign q_chain[0]  = q;
  assign qp_chain[0] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_step
    booth_step #(.N(N)) u_step (
      .m        (m),
      .a_in     (a_chain[k]),
      .q_in     (q_chain[k]),
      .qprev_in (qp_chain[k]),
      .a_out    (a_chain[k+1]),
      .q_out    (q_chain[k+1]),
      .qprev_out(qp_chain[k+1]),
      .op       (ops[k])
    );
  end

  assign p_hi = a_chain[N][N-1:0];
  assign p_lo = q_chain[N];

  // The guard bit must only ever repeat the sign of the N-bit high half
  always_comb assert (a_chain[N][N] == a_chain[N][N-1])
    else $error("booth_mult: accumulator guard bit disagrees with sign");

endmodule
