// tb_mux1: exhaustive check of the 2:1 multiplexer. All eight input
// combinations are applied and y is compared with the truth table
// (sel = 0 -> a, sel = 1 -> b). A watchdog ends the run if it stalls.
module tb_mux1;
  logic a, b, sel, y;
  int checks = 0, failures = 0;

  mux1 dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, b, a} = 3'(i);
      #1;
      checks++;
      if (y !== (i[2] ? i[1] : i[0])) begin
        failures++;
        $display("FAIL sel=%0b b=%0b a=%0b y=%0b", sel, b, a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
