// Self-checking testbench for xor_xnor: applies all four input pairs and
// compares both outputs with the parity of the inputs computed by addition.
module tb_xor_xnor;

  logic x1, x2, xo_r, xn_or;
  int checks = 0, failures = 0;

  xor_xnor dut (.x1(x1), .x2(x2), .xo_r(xo_r), .xn_or(xn_or));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int odd;
      {x1, x2} = 2'(v);
      #1;
      odd = (int'(x1) + int'(x2)) % 2;
      checks += 2;
      if (xo_r !== 1'(odd)) begin
        failures++;
        $display("FAIL xor x1=%b x2=%b got %b", x1, x2, xo_r);
      end
      if (xn_or !== 1'(1 - odd)) begin
        failures++;
        $display("FAIL xnor x1=%b x2=%b got %b", x1, x2, xn_or);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
