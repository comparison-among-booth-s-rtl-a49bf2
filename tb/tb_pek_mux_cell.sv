// tb_pek_mux_cell: exhaustive check of the multiplexer/full-adder cell, both
// the plain variant and the complementing variant used in the last row of the
// two's complement array. The selected bit follows the table
// (x_j, y_j) = 00 -> 0, 01 -> x_i, 10 -> y_i, 11 -> s_i; the outputs must
// satisfy 2 * c_out + sum_out = sum_in + selected + c_in. A watchdog ends a
// stuck run.
module tb_pek_mux_cell;
  logic xj, yj, xi, yi, si, sum_in, c_in;
  logic sum_out, c_out, sum_out_n, c_out_n;
  int checks = 0;
  int failures = 0;

  pek_mux_cell #(.INVERT(1'b0)) dut (.*);
  pek_mux_cell #(.INVERT(1'b1)) dut_n (.xj, .yj, .xi, .yi, .si, .sum_in, .c_in,
                                       .sum_out(sum_out_n), .c_out(c_out_n));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int z;
      {xj, yj, xi, yi, si, sum_in, c_in} = 7'(v);
      #1;
      case ({xj, yj})
        2'b00: z = 0;
        2'b01: z = int'(xi);
        2'b10: z = int'(yi);
        default: z = int'(si);
      endcase
      checks++;
      if (2 * int'(c_out) + int'(sum_out) != int'(sum_in) + z + int'(c_in)) begin
        failures++;
        $display("FAIL plain v=%b -> %b%b", 7'(v), c_out, sum_out);
      end
      checks++;
      if (2 * int'(c_out_n) + int'(sum_out_n) != int'(sum_in) + (1 - z) + int'(c_in)) begin
        failures++;
        $display("FAIL inverting v=%b -> %b%b", 7'(v), c_out_n, sum_out_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
