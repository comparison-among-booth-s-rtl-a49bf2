// tb_pek_mult_unsigned: exhaustive self-check of the unsigned multiplexer-based
// array at N = 8 (all 65536 operand pairs against the integer product), plus
// a spot check that swapping the operands gives the same product. Also runs a
// 3-bit instance exhaustively to cover the smallest rows. A watchdog ends a
// stuck run.
module tb_pek_mult_unsigned;
  logic [7:0]  x, y;
  logic [15:0] p;
  logic [2:0]  x3, y3;
  logic [5:0]  p3;
  int checks = 0;
  int failures = 0;

  pek_mult_unsigned #(.N(8)) dut (.x, .y, .p);
  pek_mult_unsigned #(.N(3)) dut3 (.x(x3), .y(y3), .p(p3));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x3 = '0; y3 = '0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        x = 8'(a); y = 8'(b);
        #1;
        checks++;
        if (int'(p) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d (got %0d)", a, b, a * b, p);
        end
      end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        x3 = 3'(a); y3 = 3'(b);
        #1;
        checks++;
        if (int'(p3) != a * b) begin
          failures++;
          $display("FAIL 3-bit %0d * %0d (got %0d)", a, b, p3);
        end
      end
    // The algorithm is symmetric in its operands
    x = 8'd201; y = 8'd77; #1;
    begin
      logic [15:0] p_fwd;
      p_fwd = p;
      x = 8'd77; y = 8'd201; #1;
      checks++;
      if (p != p_fwd || p != 16'd15477) begin
        failures++;
        $display("FAIL operand swap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
