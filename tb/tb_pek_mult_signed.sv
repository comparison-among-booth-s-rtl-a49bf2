// tb_pek_mult_signed: exhaustive self-check of the two's complement
// multiplexer-based array at N = 8 (all 65536 operand pairs against the signed
// integer product), the example -19 * 22 = -418 = 0xFE5E by name, and a 3-bit
// instance exhaustively. A watchdog ends a stuck run.
module tb_pek_mult_signed;
  logic [7:0]  x, y;
  logic [15:0] p;
  logic [2:0]  x3, y3;
  logic [5:0]  p3;
  int checks = 0;
  int failures = 0;

  pek_mult_signed #(.N(8)) dut (.x, .y, .p);
  pek_mult_signed #(.N(3)) dut3 (.x(x3), .y(y3), .p(p3));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x3 = '0; y3 = '0;
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        x = 8'(a); y = 8'(b);
        #1;
        checks++;
        if ($signed(p) != 16'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d (got %0d)", a, b, a * b, $signed(p));
        end
      end
    for (int a = -4; a < 4; a++)
      for (int b = -4; b < 4; b++) begin
        x3 = 3'(a); y3 = 3'(b);
        #1;
        checks++;
        if ($signed(p3) != 6'(a * b)) begin
          failures++;
          $display("FAIL 3-bit %0d * %0d (got %0d)", a, b, $signed(p3));
        end
      end
    x = 8'b1110_1101; y = 8'b0001_0110; #1;
    checks++;
    if (p != 16'hFE5E) begin
      failures++;
      $display("FAIL -19 * 22: got %h", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
