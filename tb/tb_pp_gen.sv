// Self-checking testbench for pp_gen: for all 256 operand pairs, checks
// every partial product bit, and checks that the weighted sum of the matrix
// equals a * b.
module tb_pp_gen;
  import mult_pkg::*;

  operand_t   a, b;
  pp_matrix_t pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++) begin
      for (int vb = 0; vb < 16; vb++) begin
        int weighted;
        a = operand_t'(va);
        b = operand_t'(vb);
        #1;
        weighted = 0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (pp[i][j] !== (((va >> i) % 2 == 1) && ((vb >> j) % 2 == 1))) begin
              failures++;
              $display("FAIL pp[%0d][%0d] a=%0d b=%0d", i, j, va, vb);
            end
            weighted += int'(pp[i][j]) << (i + j);
          end
        checks++;
        if (weighted != va * vb) begin
          failures++;
          $display("FAIL weighted sum a=%0d b=%0d got %0d", va, vb, weighted);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
