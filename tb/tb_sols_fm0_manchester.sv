// tb_sols_fm0_manchester: checks the reused FM0/Manchester datapath against
// the code definitions, half-cell by half-cell.
// Reference (independent of the datapath's gates): FM0 keeps the level B of
// the last half-cell; a new cell starts at ~B and, for a 0, inverts again at
// mid-bit. Manchester sends ~x then x. Random bits are applied just after each
// rising edge, in runs of FM0 and Manchester with mode switches in between;
// y is sampled in the middle of each half-cell, so each bit yields two
// checks, one per half of the clock period (two code symbols per clock).
module tb_sols_fm0_manchester;
  import sols_pkg::*;

  logic clk = 1'b0, x_in, mode1, clr, y, q;
  sols_ctrl_t ctrl;
  int checks = 0, failures = 0, cycles = 0;
  int fm0_bits = 0, man_bits = 0, switches = 0;
  logic b_ref;  // FM0 level of the last half-cell
  logic [9:0] obs;  // last ten half-cell samples

  sols_fm0_manchester dut (
    .x_in(x_in), .clk(clk), .gclk(clk), .mode1(mode1), .clr(clr), .y(y), .q(q)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic expect_y(logic exp, string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s t=%0t x=%0b y=%0b exp=%0b", what, $time, x_in, y, exp);
    end
  endtask

  // One bit cell: drive after the rising edge, check both halves.
  task automatic send(code_e code, logic bit_v);
    logic first, second;
    ctrl = ctrl_for(code);
    mode1 = ctrl.mode1; clr = ctrl.clr; x_in = bit_v;
    if (code == CODE_FM0) begin
      first  = ~b_ref;
      second = bit_v ? first : ~first;
      b_ref  = second;
      fm0_bits++;
    end else begin
      first  = ~bit_v;
      second = bit_v;
      b_ref  = 1'b0;       // state is held cleared
      man_bits++;
    end
    #3 expect_y(first, "first half");
    obs = {obs[8:0], y};
    @(negedge clk);
    #3 expect_y(second, "second half");
    obs = {obs[8:0], y};
    @(posedge clk); #1;
  endtask

  initial begin
    code_e code;
    x_in = 1'b0; mode1 = 1'b0; clr = 1'b0;   // clear the state flip-flop
    @(posedge clk); #1;
    b_ref = 1'b0;
    code = CODE_FM0;
    for (int run = 0; run < 40; run++) begin
      int len;
      len = $urandom_range(1, 12);
      for (int i = 0; i < len; i++) send(code, 1'($urandom));
      code = (code == CODE_FM0) ? CODE_MANCHESTER : CODE_FM0;
      switches++;
    end
    // Fixed FM0 pattern: after a clear, 1 1 0 0 1 gives half-cells
    // 11 00 10 10 11 (the level starts high after the cleared state 0).
    mode1 = 1'b0; clr = 1'b0; @(posedge clk); #1; b_ref = 1'b0;
    foreach (pat[i]) send(CODE_FM0, pat[i]);
    checks++;
    if (obs !== 10'b11_00_10_10_11) begin
      failures++;
      $display("FAIL fixed FM0 pattern %b", obs);
    end
    // Fixed Manchester pattern: 1 0 0 1 1 gives 01 10 10 01 01.
    foreach (pat2[i]) send(CODE_MANCHESTER, pat2[i]);
    checks++;
    if (obs !== 10'b01_10_10_01_01) begin
      failures++;
      $display("FAIL fixed Manchester pattern %b", obs);
    end
    checks++;
    if (fm0_bits == 0 || man_bits == 0 || switches == 0) failures++;
    $display("fm0 bits %0d, manchester bits %0d, mode switches %0d",
             fm0_bits, man_bits, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic pat  [5] = '{1'b1, 1'b1, 1'b0, 1'b0, 1'b1};
  logic pat2 [5] = '{1'b1, 1'b0, 1'b0, 1'b1, 1'b1};

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
