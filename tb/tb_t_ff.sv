// tb_t_ff: checks the toggle flip-flop. t changes just after each rising
// edge; on the following falling edge q must invert when t = 1 and hold when
// t = 0. q is also checked before the falling edge (no change on the rising
// edge) and after random active-low clears, which force q to 0 at once.
module tb_t_ff;
  logic clk = 1'b0, clr, t, q;
  logic exp_q;
  int checks = 0, failures = 0, cycles = 0, toggles = 0;

  t_ff dut (.clk(clk), .clr(clr), .t(t), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s t=%0t q=%0b exp=%0b", what, $time, q, exp_q);
    end
  endtask

  initial begin
    clr = 1'b0; t = 1'b1;
    #1; exp_q = 1'b0; check("clear");
    @(posedge clk); #1; clr = 1'b1;
    for (int i = 0; i < 300; i++) begin
      t = 1'($urandom);
      if ($urandom_range(0, 15) == 0) begin
        clr = 1'b0; #1; exp_q = 1'b0; check("async clear");
        @(negedge clk); #1; check("held in clear");
        @(posedge clk); #1; clr = 1'b1;
      end else begin
        #2; check("before falling edge");
        @(negedge clk);
        if (t) begin exp_q = ~exp_q; toggles++; end
        #1; check("after falling edge");
        @(posedge clk); #1; check("after rising edge");
      end
    end
    if (toggles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
