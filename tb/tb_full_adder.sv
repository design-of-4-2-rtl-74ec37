// Self-checking testbench for full_adder: all eight input combinations,
// output {cout, s} compared with the integer sum a + b + cin.
module tb_full_adder;

  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks += 2;
      if (s !== 1'(total % 2)) begin
        failures++;
        $display("FAIL sum a=%b b=%b cin=%b s=%b", a, b, cin, s);
      end
      if (cout !== 1'(total / 2)) begin
        failures++;
        $display("FAIL carry a=%b b=%b cin=%b cout=%b", a, b, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
