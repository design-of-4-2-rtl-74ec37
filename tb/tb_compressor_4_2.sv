// Self-checking testbench for compressor_4_2.
//
// Applies all 32 combinations of x1..x4 and cin and checks
//   - the arithmetic identity x1+x2+x3+x4+cin = sum + 2*(carry + cout);
//   - that cout does not depend on cin (same x1..x4, cin flipped, same cout);
//   - cout against an independent reference: it is set exactly when at
//     least two of x1, x2, x3 are set (majority of the first full adder).
module tb_compressor_4_2;

  logic x1, x2, x3, x4, cin;
  logic sum, carry, cout;
  int checks = 0, failures = 0;
  logic [15:0] cout_at_cin0;

  compressor_4_2 dut (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
    .sum(sum), .carry(carry), .cout(cout)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cout_at_cin0 = '0;
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < 16; v++) begin
        int total;
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(c);
        #1;
        total = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != total) begin
          failures++;
          $display("FAIL value x=%b%b%b%b cin=%b -> sum=%b carry=%b cout=%b",
                   x1, x2, x3, x4, cin, sum, carry, cout);
        end
        checks++;
        if (cout !== ((int'(x1) + int'(x2) + int'(x3)) >= 2)) begin
          failures++;
          $display("FAIL cout x=%b%b%b%b cin=%b cout=%b", x1, x2, x3, x4, cin, cout);
        end
        if (c == 0) cout_at_cin0[v] = cout;
        else begin
          checks++;
          if (cout !== cout_at_cin0[v]) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b%b%b%b", x1, x2, x3, x4);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
