// tb_mult_compare_top: end-to-end check of all three multipliers in the top,
// at the top's default operand width (8 bits), with no parameter overrides.
//
// Every operand pair is applied to all three multipliers at once: the Booth
// and the two's complement array read the pair as signed numbers, the unsigned
// array reads it as unsigned numbers. Each result is compared with the integer
// product, and the two signed results with each other. The run counts how
// often each mechanism of the designs is exercised and fails if any never is:
// the three Booth step actions (shift only, add, subtract), a product that
// needs the Booth accumulator's guard bit (multiplicand -128), the four row
// cases of the multiplexer arrays ((x_j, y_j) = 00, 01, 10, 11) and a
// subtracted last row in the two's complement array. The examples
// -19 * 22 = 0xFE5E and 9 * 14 = 126 are also checked by name. A watchdog ends
// a stuck run with a failure.
module tb_mult_compare_top;
  import mult_pkg::*;

  localparam int unsigned N = mult_pkg::WIDTH;

  logic [N-1:0]      booth_m, booth_q, booth_p_hi, booth_p_lo;
  booth_op_e [N-1:0] booth_ops;
  logic [N-1:0]      pu_x, pu_y, ps_x, ps_y;
  logic [2*N-1:0]    pu_p, ps_p;

  int checks = 0;
  int failures = 0;

  int n_shift = 0, n_add = 0, n_sub = 0, n_guard = 0;
  int n_row[4] = '{0, 0, 0, 0};
  int n_last_sub = 0;

  mult_compare_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (m/x=%h q/y=%h)", what, booth_m, booth_q);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << N); a++)
      for (int b = 0; b < (1 << N); b++) begin
        int sa, sb;
        booth_m = N'(a); booth_q = N'(b);
        pu_x    = N'(a); pu_y    = N'(b);
        ps_x    = N'(a); ps_y    = N'(b);
        #1;
        sa = (a >= (1 << (N - 1))) ? a - (1 << N) : a;
        sb = (b >= (1 << (N - 1))) ? b - (1 << N) : b;
        check($signed({booth_p_hi, booth_p_lo}) == (2*N)'(sa * sb), "Booth product");
        check(int'(pu_p) == a * b, "unsigned array product");
        check($signed(ps_p) == (2*N)'(sa * sb), "two's complement array product");
        check(ps_p == {booth_p_hi, booth_p_lo}, "Booth and array agree");

        // Mechanism coverage
        for (int k = 0; k < int'(N); k++)
          case (booth_ops[k])
            BOOTH_ADD: n_add++;
            BOOTH_SUB: n_sub++;
            default:   n_shift++;
          endcase
        if (sa == -(1 << (N - 1)) && sb != 0) n_guard++;
        for (int j = 1; j < int'(N); j++) n_row[{pu_x[j], pu_y[j]}]++;
        if ((ps_x[N-1] | ps_y[N-1]) && (ps_x[N-2:0] != 0 || ps_y[N-2:0] != 0)) n_last_sub++;
      end

    booth_m = 8'b1110_1101; booth_q = 8'b0001_0110;
    ps_x    = 8'b1110_1101; ps_y    = 8'b0001_0110;
    pu_x    = 8'd9;         pu_y    = 8'd14;
    #1;
    check({booth_p_hi, booth_p_lo} == 16'hFE5E, "Booth -19 * 22");
    check(ps_p == 16'hFE5E, "array -19 * 22");
    check(pu_p == 16'd126, "array 9 * 14");

    $display("coverage: booth shift=%0d add=%0d sub=%0d guard=%0d", n_shift, n_add, n_sub, n_guard);
    $display("coverage: rows 00=%0d 01=%0d 10=%0d 11=%0d, subtracted last row=%0d",
             n_row[0], n_row[1], n_row[2], n_row[3], n_last_sub);
    check(n_shift > 0, "Booth shift-only step exercised");
    check(n_add > 0, "Booth add step exercised");
    check(n_sub > 0, "Booth subtract step exercised");
    check(n_guard > 0, "Booth guard bit exercised");
    for (int r = 0; r < 4; r++) check(n_row[r] > 0, "array row case exercised");
    check(n_last_sub > 0, "two's complement last-row subtraction exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
