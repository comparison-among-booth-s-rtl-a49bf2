// tb_pek_sum_cell: exhaustive check of the operand-sum cell against the
// integer sum x + y + c_in = 2 * c_out + s. A watchdog ends a stuck run.
module tb_pek_sum_cell;
  logic x, y, c_in, s, c_out;
  int checks = 0;
  int failures = 0;

  pek_sum_cell dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, c_in} = 3'(v);
      #1;
      checks++;
      if (2 * int'(c_out) + int'(s) != int'(x) + int'(y) + int'(c_in)) begin
        failures++;
        $display("FAIL x=%b y=%b c=%b -> s=%b c_out=%b", x, y, c_in, s, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
