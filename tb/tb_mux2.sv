// Self-checking testbench for mux2: all eight input combinations.
module tb_mux2;

  logic sel, d0, d1, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] data;
      {sel, d1, d0} = 3'(v);
      data = {d1, d0};
      #1;
      checks++;
      if (y !== data[int'(sel)]) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b y=%b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
