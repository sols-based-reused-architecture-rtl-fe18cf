// tb_sols_encoder: end-to-end test of the combined encoder at its default
// (and only) configuration.
// Random data is sent in runs of FM0, Manchester and Miller cells, the code
// changing at random between runs. enc_out is sampled in the middle of both
// halves of every bit cell and compared with reference models written from
// the code definitions:
//   FM0        cell starts at ~B (B = last half-cell level); a 0 inverts mid-bit
//   Manchester ~x then x; clears both state bits
//   Miller     (toggle branch) level M; a 1 inverts M mid-bit
// The branch that is not selected must keep its state, because its clock is
// gated: the models freeze it and the checks after each switch back catch any
// change. The gated clocks are counted per cell: the FM0/Manchester flip-flop
// must get exactly one rising edge in an FM0/Manchester cell and none in a
// Miller cell; the toggle flip-flop one falling edge in a Miller cell and
// none otherwise. Each mechanism (each code, each kind of mode switch, each
// gated-off branch, the clear) is counted and must occur at least once.
// Fixed patterns at the end check the models themselves against hand-worked
// sequences.
module tb_sols_encoder;
  import sols_pkg::*;

  logic clk = 1'b0, x_in, mode1, clr, mode2, enc_out;
  sols_ctrl_t ctrl;
  int checks = 0, failures = 0, cycles = 0;
  int bits_of [3];
  int switch_into [3];
  int gated_d_cells = 0, gated_t_cells = 0, clears = 0;
  int edges_d = 0, edges_t = 0;
  logic b_ref, m_ref;
  logic [9:0] obs;

  sols_encoder dut (
    .x_in(x_in), .clk(clk), .mode1(mode1), .clr(clr), .mode2(mode2),
    .enc_out(enc_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge dut.gclk_d) edges_d++;
  always @(negedge dut.gclk_t) edges_t++;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t x=%0b mode1=%0b clr=%0b mode2=%0b out=%0b",
               what, $time, x_in, mode1, clr, mode2, enc_out);
    end
  endtask

  // One bit cell, driven just after a rising edge and ending just after the
  // next one.
  task automatic send(code_e code, logic bit_v);
    logic first, second;
    int d0, t0;
    ctrl = ctrl_for(code);
    mode1 = ctrl.mode1; clr = ctrl.clr; mode2 = ctrl.mode2; x_in = bit_v;
    unique case (code)
      CODE_FM0: begin
        first = ~b_ref; second = bit_v ? first : ~first; b_ref = second;
      end
      CODE_MANCHESTER: begin
        first = ~bit_v; second = bit_v; b_ref = 1'b0; m_ref = 1'b0;
        clears++;
      end
      default: begin
        first = m_ref; m_ref = m_ref ^ bit_v; second = m_ref;
      end
    endcase
    bits_of[code]++;
    d0 = edges_d; t0 = edges_t;
    #3 check(enc_out === first, "first half");
    obs = {obs[8:0], enc_out};
    @(negedge clk);
    #3 check(enc_out === second, "second half");
    obs = {obs[8:0], enc_out};
    @(posedge clk); #1;
    if (code == CODE_MILLER) begin
      check(edges_d == d0 && edges_t == t0 + 1, "gated clocks, Miller cell");
      gated_d_cells++;
    end else begin
      check(edges_d == d0 + 1 && edges_t == t0, "gated clocks, FM0/Manchester cell");
      gated_t_cells++;
    end
  endtask

  logic pat_fm0 [5] = '{1'b1, 1'b1, 1'b0, 1'b0, 1'b1};
  logic pat_man [5] = '{1'b1, 1'b0, 1'b0, 1'b1, 1'b1};
  logic pat_mil [5] = '{1'b1, 1'b0, 1'b1, 1'b1, 1'b0};

  initial begin
    code_e code, next;
    // Clear both flip-flops with the Manchester setting (clr = 0).
    x_in = 1'b0;
    ctrl = ctrl_for(CODE_MANCHESTER);
    mode1 = ctrl.mode1; clr = ctrl.clr; mode2 = ctrl.mode2;
    repeat (2) @(posedge clk);
    #1;
    b_ref = 1'b0; m_ref = 1'b0; clears++;
    code = CODE_FM0;
    for (int run = 0; run < 60; run++) begin
      int len;
      len = $urandom_range(1, 10);
      for (int i = 0; i < len; i++) send(code, 1'($urandom));
      do next = code_e'($urandom_range(0, 2)); while (next == code);
      code = next;
      switch_into[code]++;
    end

    // Hand-worked sequences. A Manchester cell first clears both states.
    send(CODE_MANCHESTER, 1'b0);
    foreach (pat_fm0[i]) send(CODE_FM0, pat_fm0[i]);
    check(obs === 10'b11_00_10_10_11, "fixed FM0 pattern 11001");
    foreach (pat_man[i]) send(CODE_MANCHESTER, pat_man[i]);
    check(obs === 10'b01_10_10_01_01, "fixed Manchester pattern 10011");
    foreach (pat_mil[i]) send(CODE_MILLER, pat_mil[i]);
    check(obs === 10'b01_11_10_01_11, "fixed Miller pattern 10110");

    // Every mechanism must have happened.
    for (int c = 0; c < 3; c++) begin
      check(bits_of[c] > 0, "code never used");
      check(switch_into[c] > 0, "never switched into code");
    end
    check(gated_d_cells > 0, "FM0/Manchester flip-flop never gated off");
    check(gated_t_cells > 0, "toggle flip-flop never gated off");
    check(clears > 0, "clear never applied");
    $display("bits: fm0 %0d manchester %0d miller %0d; switches into: %0d %0d %0d",
             bits_of[0], bits_of[1], bits_of[2],
             switch_into[0], switch_into[1], switch_into[2]);
    $display("cells with d_ffb gated %0d, with t_ff gated %0d, clears %0d, clock cycles %0d",
             gated_d_cells, gated_t_cells, clears, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
