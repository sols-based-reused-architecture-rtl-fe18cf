// tb_dsrc_rates: runs the encoder at the three DSRC data rates, 500 kb/s,
// 4 Mb/s and 27 Mb/s, one bit per clock period (clock periods 2000 ns,
// 250 ns and 37.037 ns).
// At each rate it sends random bits in FM0, then Manchester, then Miller.
// Data and mode bits are driven like the outputs of a register clocked by
// clk (non-blocking, at the rising edge). The output is sampled in the middle
// of both halves of every bit and compared with reference models of the
// codes, and the sampled waveform is checked for the properties the codes
// promise:
//   - FM0: a level change at the start of every bit;
//   - FM0 and Manchester: no level lasts more than two half-bits, so every
//     interval between transitions is T/2 or T (T = bit period);
//   - the N bits of a run take exactly N bit periods of simulated time.
// This is a zero-delay simulation: it checks the encoding at each rate, not
// whether a particular implementation meets the timing.
module tb_dsrc_rates;
  import sols_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NRATES = 3;
  localparam int NBITS  = 200;          // bits per code and rate
  localparam realtime HALF [NRATES] = '{1000.0, 125.0, 18.5185};
  localparam string   NAME [NRATES] = '{"500 kb/s", "4 Mb/s", "27 Mb/s"};

  logic clk = 1'b0, x_in = 1'b0, mode1 = 1'b1, clr = 1'b0, mode2 = 1'b1, enc_out;
  realtime half = 1000.0;
  int checks = 0, failures = 0;
  logic b_ref, m_ref;
  logic prev_half;   // last sampled half-cell
  int   run_len;     // half-cells at the same level so far

  sols_encoder dut (
    .x_in(x_in), .clk(clk), .mode1(mode1), .clr(clr), .mode2(mode2),
    .enc_out(enc_out)
  );

  initial forever #(half) clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $realtime);
    end
  endtask

  task automatic sample(logic expected, code_e code, bit boundary, bit track);
    check(enc_out === expected, "coded level");
    if (track) begin
      if (code == CODE_FM0 && boundary) check(enc_out !== prev_half, "FM0 bit without a start transition");
      run_len = (enc_out === prev_half) ? run_len + 1 : 1;
      if (code != CODE_MILLER) check(run_len <= 2, "level held longer than one bit period");
    end
    prev_half = enc_out;
  endtask

  // One bit cell: registered at the rising edge, both halves sampled.
  task automatic send(code_e code, logic bit_v, bit track);
    sols_ctrl_t ctrl;
    logic first, second;
    ctrl = ctrl_for(code);
    @(posedge clk);
    mode1 <= ctrl.mode1; clr <= ctrl.clr; mode2 <= ctrl.mode2; x_in <= bit_v;
    unique case (code)
      CODE_FM0:        begin first = ~b_ref; second = bit_v ? first : ~first; b_ref = second; end
      CODE_MANCHESTER: begin first = ~bit_v; second = bit_v; b_ref = 1'b0; m_ref = 1'b0; end
      default:         begin first = m_ref; m_ref = m_ref ^ bit_v; second = m_ref; end
    endcase
    #(half / 2) sample(first, code, 1'b1, track);
    @(negedge clk);
    #(half / 2) sample(second, code, 1'b0, track);
  endtask

  initial begin
    for (int r = 0; r < NRATES; r++) begin
      half = HALF[r];
      // Clear both flip-flops with two Manchester cells.
      send(CODE_MANCHESTER, 1'b1, 1'b0);
      send(CODE_MANCHESTER, 1'b0, 1'b0);
      for (int c = 0; c < 3; c++) begin
        code_e code;
        realtime t0;
        real bits;
        code = code_e'(c);
        // First cell after a switch joins an arbitrary level: not tracked.
        send(code, 1'($urandom), 1'b0);
        run_len = 1;
        t0 = $realtime + half / 2;     // rising edge that starts the run
        for (int i = 0; i < NBITS; i++) send(code, 1'($urandom), 1'b1);
        bits = ($realtime + half / 2 - t0) / (2.0 * half);
        check(bits > NBITS - 0.01 && bits < NBITS + 0.01, "bit rate");
      end
      $display("%s: bit period %0.4f ns, %0d bits per code checked", NAME[r], 2.0 * half, NBITS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
