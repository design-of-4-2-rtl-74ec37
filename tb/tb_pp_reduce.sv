// Self-checking testbench for pp_reduce.
//
// Drives all 2**16 partial product matrices (not only those an AND array
// can produce) and checks that the reduction preserves the weighted value:
//   sum_i,j pp[i][j] * 2**(i+j) = sum_k (sum_row[k] + carry_row[k]) * 2**k.
// It also checks that the full-adder carry out of column 5 never occurs when
// columns 4 and 5 are both empty, a cross-check that no carry appears from
// nowhere.
module tb_pp_reduce;
  import mult_pkg::*;

  pp_matrix_t pp;
  reduced_t   red;
  int checks = 0, failures = 0;

  pp_reduce dut (.pp(pp), .red(red));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int in_val, out_val;
      pp = pp_matrix_t'(v);
      #1;
      in_val = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          in_val += int'(pp[i][j]) << (i + j);
      out_val = 0;
      for (int k = 0; k <= 6; k++) out_val += int'(red.sum_row[k]) << k;
      for (int k = 3; k <= 6; k++) out_val += int'(red.carry_row[k]) << k;
      checks++;
      if (out_val != in_val) begin
        failures++;
        if (failures < 10)
          $display("FAIL pp=%h in=%0d out=%0d", v, in_val, out_val);
      end
      if (pp[1][3] == 0 && pp[2][2] == 0 && pp[3][1] == 0 &&
          pp[2][3] == 0 && pp[3][2] == 0) begin
        checks++;
        if (red.carry_row[6] !== 1'b0 || red.sum_row[5] !== 1'b0) begin
          failures++;
          if (failures < 10) $display("FAIL spurious column 5 output pp=%h", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
