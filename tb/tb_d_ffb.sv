// tb_d_ffb: checks the D flip-flop with active-low asynchronous clear.
// Random d is applied between rising edges and q is compared after each edge
// with the value sampled at that edge; clr is dropped at random points
// between edges and q must go to 0 at once and stay 0 across an edge.
module tb_d_ffb;
  logic clk = 1'b0, clr, d, q;
  logic exp_q;
  int checks = 0, failures = 0, cycles = 0;

  d_ffb dut (.clk(clk), .clr(clr), .d(d), .q(q));

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
    clr = 1'b0; d = 1'b1;
    #2; exp_q = 1'b0; check("clear");
    clr = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      if ($urandom_range(0, 9) == 0) begin
        clr = 1'b0; #1; exp_q = 1'b0; check("async clear");
        @(posedge clk); #1; check("held in clear");
        @(negedge clk); clr = 1'b1;
      end else begin
        @(posedge clk); exp_q = d; #1; check("capture");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
