// Self-checking testbench for final_adder: drives all 2**11 values of the
// two reduced rows and compares p with the integer sum of the rows.
module tb_final_adder;
  import mult_pkg::*;

  reduced_t red;
  product_t p;
  int checks = 0, failures = 0;

  final_adder dut (.red(red), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      int expected;
      red = reduced_t'(v);
      #1;
      expected = int'(red.sum_row) + (int'(red.carry_row) << 3);
      checks++;
      if (int'(p) != expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL sum_row=%b carry_row=%b p=%0d expected %0d",
                   red.sum_row, red.carry_row, p, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
