// tb_booth_mult: self-check of the combinational Booth multiplier.
//
// Part 1 (N = 8): all 65536 operand pairs; {p_hi, p_lo} must equal the signed
// integer product, and each step's reported action must match the recoding of
// the multiplier bits (q_k, q_(k-1)). The two's complement example
// -19 * 22 = -418 (0xFE5E) is checked by name.
// Part 2 (N = 5): the two worked examples of the algorithm, 9 * 14 = 126 and
// 2 * -3 = -6, including their step-by-step action sequences.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_booth_mult;
  import mult_pkg::*;

  localparam int unsigned N = 8;

  logic [N-1:0]      m, q, p_hi, p_lo;
  booth_op_e [N-1:0] ops;

  logic [4:0]        m5, q5, p5_hi, p5_lo;
  booth_op_e [4:0]   ops5;

  int checks = 0;
  int failures = 0;

  booth_mult #(.N(N)) dut (.m, .q, .p_hi, .p_lo, .ops);
  booth_mult #(.N(5)) dut5 (.m(m5), .q(q5), .p_hi(p5_hi), .p_lo(p5_lo), .ops(ops5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic booth_op_e recode(input logic cur, input logic prev);
    case ({cur, prev})
      2'b01:   return BOOTH_ADD;
      2'b10:   return BOOTH_SUB;
      default: return BOOTH_SHIFT;
    endcase
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m5 = '0; q5 = '0;
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        int prod;
        bit ops_ok;
        m = 8'(a);
        q = 8'(b);
        #1;
        prod = a * b;
        if ($signed({p_hi, p_lo}) != 16'(prod))
          $display("FAIL %0d * %0d: got %h%h", a, b, p_hi, p_lo);
        check($signed({p_hi, p_lo}) == 16'(prod), "product");
        ops_ok = 1'b1;
        for (int k = 0; k < int'(N); k++)
          if (ops[k] != recode(q[k], (k == 0) ? 1'b0 : q[k-1])) ops_ok = 1'b0;
        check(ops_ok, "step actions");
      end

    // Two's complement example: -19 * 22
    m = 8'b1110_1101; q = 8'b0001_0110; #1;
    check(p_hi == 8'hFE && p_lo == 8'h5E, "-19 * 22 = 0xFE5E");

    // Worked example 9 * 14 with 5-bit registers: shift, sub, shift, shift, add
    m5 = 5'b01001; q5 = 5'b01110; #1;
    check({p5_hi, p5_lo} == 10'b00011_11110, "9 * 14 = 126");
    check(ops5 == {BOOTH_ADD, BOOTH_SHIFT, BOOTH_SHIFT, BOOTH_SUB, BOOTH_SHIFT}, "9 * 14 steps");

    // Worked example 2 * -3: sub, add, sub, shift, shift
    m5 = 5'b00010; q5 = 5'b11101; #1;
    check({p5_hi, p5_lo} == 10'b11111_11010, "2 * -3 = -6");
    check(ops5 == {BOOTH_SHIFT, BOOTH_SHIFT, BOOTH_SUB, BOOTH_ADD, BOOTH_SUB}, "2 * -3 steps");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
