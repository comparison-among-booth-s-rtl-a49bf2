// tb_pek_diag_cell: exhaustive check of the boundary cell. Plain variant:
// sum_out = x_j y_j (1 + c_j) + c_in. Last-row two's complement variant:
// sum_out = (1 - x_j y_j c_j) + x_j y_j + 2 + c_in, modulo 4. A watchdog ends
// a stuck run.
module tb_pek_diag_cell;
  logic       xj, yj, cj, c_in;
  logic [1:0] sum_out, sum_out_s;
  int checks = 0;
  int failures = 0;

  pek_diag_cell #(.LAST_SIGNED(1'b0)) dut (.*);
  pek_diag_cell #(.LAST_SIGNED(1'b1)) dut_s (.xj, .yj, .cj, .c_in, .sum_out(sum_out_s));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int both, exp_u, exp_s;
      {xj, yj, cj, c_in} = 4'(v);
      #1;
      both  = int'(xj & yj);
      exp_u = both * (1 + int'(cj)) + int'(c_in);
      exp_s = ((1 - both * int'(cj)) + both + 2 + int'(c_in)) % 4;
      checks++;
      if (int'(sum_out) != exp_u) begin
        failures++;
        $display("FAIL plain v=%b -> %0d (exp %0d)", 4'(v), sum_out, exp_u);
      end
      checks++;
      if (int'(sum_out_s) != exp_s) begin
        failures++;
        $display("FAIL last-row v=%b -> %0d (exp %0d)", 4'(v), sum_out_s, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
