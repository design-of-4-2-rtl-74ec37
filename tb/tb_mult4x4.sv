// End-to-end testbench for the 4x4 compressor-based multiplier, at the
// design's only size.
//
// Multiplies every pair of 4-bit operands, first in order and then 512
// random pairs, and compares p with a * b. It also counts how often each
// mechanism of the datapath is exercised and fails if one never is. The
// counts are derived from the operand bits and the column assignment of the
// reduction level (a compressor's cout is the majority of its x1..x3), so
// the testbench needs no access to the multiplier's internals:
//   - the half adder of column 1 producing a carry,
//   - each compressor passing cout into the next column's cin
//     (columns 2->3, 3->4, 4->5),
//   - the column-3 compressor adding all five of its inputs as ones,
//   - the final carry-propagating adder carrying out into p[7].
module tb_mult4x4;
  import mult_pkg::*;

  operand_t a, b;
  product_t p;
  int checks = 0, failures = 0;

  int n_ha_carry = 0, n_cout_c2 = 0, n_cout_c3 = 0, n_cout_c4 = 0;
  int n_full_c3 = 0, n_p7 = 0;

  mult4x4 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic maj3(input logic x, input logic y, input logic z);
    return int'(x) + int'(y) + int'(z) >= 2;
  endfunction

  task automatic apply(input int va, input int vb);
    a = operand_t'(va);
    b = operand_t'(vb);
    #1;
    checks++;
    if (int'(p) != va * vb) begin
      failures++;
      $display("FAIL %0d * %0d gave %0d", va, vb, p);
    end
    // Which internal events these operands trigger follows from the column
    // assignment of the reduction level: a cout leaves a compressor when at
    // least two of its x1..x3 partial products are set.
    begin
      logic [3:0][3:0] m;   // m[i][j] = a[i] & b[j], independent of the DUT
      logic cout2;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          m[i][j] = a[i] & b[j];
      cout2 = maj3(m[0][2], m[1][1], m[2][0]);
      if (m[0][1] & m[1][0])               n_ha_carry++;
      if (cout2)                           n_cout_c2++;
      if (maj3(m[0][3], m[1][2], m[2][1])) n_cout_c3++;
      if (maj3(m[1][3], m[2][2], m[3][1])) n_cout_c4++;
      if (m[0][3] & m[1][2] & m[2][1] & m[3][0] & cout2) n_full_c3++;
    end
    if (p[7]) n_p7++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++)
        apply(va, vb);
    for (int n = 0; n < 512; n++)
      apply(int'($urandom_range(15)), int'($urandom_range(15)));

    $display("mechanism counts:");
    require("half adder carry (col 1)", n_ha_carry);
    require("cout col 2 -> cin col 3", n_cout_c2);
    require("cout col 3 -> cin col 4", n_cout_c3);
    require("cout col 4 -> cin col 5", n_cout_c4);
    require("compressor with five ones (col 3)", n_full_c3);
    require("final carry into p[7]", n_p7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
