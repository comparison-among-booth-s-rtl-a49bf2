// tb_booth_step: exhaustive self-check of one Booth step at N = 4.
//
// Every multiplicand, accumulator, Q register and q_prev value is applied; the
// expected outputs are computed here from integer arithmetic (the signed
// accumulator value plus, minus or unchanged by M, then an arithmetic halving
// with the dropped bit entering the top of Q). A watchdog ends the run with a
// failure if it does not finish in time.
module tb_booth_step;
  import mult_pkg::*;

  localparam int unsigned N = 4;

  logic [N-1:0] m, q_in, q_out;
  logic [N:0]   a_in, a_out;
  logic         qprev_in, qprev_out;
  booth_op_e    op;

  int checks = 0;
  int failures = 0;

  booth_step #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: m=%0d a=%0d q=%b qp=%b -> a=%b q=%b qp=%b op=%s",
                 what, m, a_in, q_in, qprev_in, a_out, q_out, qprev_out, op.name());
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mi = 0; mi < (1 << N); mi++)
      for (int ai = -(1 << (N - 1)); ai < (1 << (N - 1)); ai++)  // A stays in N-bit range in a real run
        for (int qi = 0; qi < (1 << N); qi++)
          for (int pi = 0; pi < 2; pi++) begin
            int mv, av, bit0;
            booth_op_e exp_op;
            m        = N'(mi);
            a_in     = (N+1)'(ai);
            q_in     = N'(qi);
            qprev_in = pi[0];
            #1;
            mv = (mi >= (1 << (N - 1))) ? mi - (1 << N) : mi;
            case ({qi[0], pi[0]})
              2'b01:   begin av = ai + mv; exp_op = BOOTH_ADD; end
              2'b10:   begin av = ai - mv; exp_op = BOOTH_SUB; end
              default: begin av = ai;      exp_op = BOOTH_SHIFT; end
            endcase
            bit0 = av & 1;
            check(op == exp_op, "op");
            check($signed(a_out) == (av >>> 1), "a_out");
            check(q_out == N'((bit0 << (N - 1)) | (qi >> 1)), "q_out");
            check(qprev_out == qi[0], "qprev_out");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
