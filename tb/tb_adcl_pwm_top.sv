// tb_adcl_pwm_top: end-to-end test of the low-power 3-bit PWM at its
// default size (no parameter overrides).
//
// It first plays the reference sequence of the design, the codes 000, 001,
// 011, 111 (written LD0 LD1 LD2, i.e. 0 %, 33.3 %, 66.6 %, 100 % dimming),
// then every ordered pair of those four codes, then a few random codes
// including ones outside that set. Each code is loaded by holding load high
// across one rising clk edge; between loads ld is scrambled to show it is
// ignored. After each load the output is checked in every cycle against an
// independent expectation:
//   toggling code : cycle j after the load edge -> ld[2 - (j mod 3)]
//   000 / 111     : constant 0 / 1
// together with sw (1 only for toggling codes), the high count per 3-cycle
// period (duty = ones/3) and the number of rising edges the ring's flops
// see (none for 000/111, one per cycle otherwise).
// Mechanisms counted, each must happen at least once: parallel load,
// clock cut-off at 0 %, clock cut-off at 100 % (output from PO), wake-up
// from cut-off into PWM operation, 1/3 duty period, 2/3 duty period.
`timescale 1ns/1ps
module tb_adcl_pwm_top;
  logic       clk = 1'b0;
  logic       load = 1'b0;
  logic [2:0] ld = '0;
  logic       sw, pwm_out;
  int         checks = 0;
  int         failures = 0;
  int         ring_edges = 0;

  // mechanism counters
  int n_load = 0, n_cut0 = 0, n_cut100 = 0, n_wake = 0, n_duty13 = 0, n_duty23 = 0;

  adcl_pwm_top dut (.clk(clk), .load(load), .ld(ld), .sw(sw), .pwm_out(pwm_out));

  always #5 clk = ~clk;
  always @(posedge dut.ring_clk) ring_edges++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Convert a code written "LD0 LD1 LD2" to the ld vector (bit i = LDi).
  function automatic logic [2:0] from_string_order(input logic [2:0] ld012);
    return {ld012[0], ld012[1], ld012[2]};
  endfunction

  logic prev_static = 1'b1;

  task automatic run_code(input logic [2:0] code, input int periods);
    logic is_static;
    logic expected;
    int   highs;
    is_static = (code == 3'b000) || (code == 3'b111);
    @(negedge clk);
    ld   = code;
    load = 1'b1;
    n_load++;
    #1;
    // The control block is transparent during load: sw reacts at once.
    checks++;
    if (sw !== !is_static) begin
      failures++;
      $display("FAIL: code=%b sw=%b during load", code, sw);
    end
    @(negedge clk);           // one rising edge has passed with load high
    load = 1'b0;
    ring_edges = 0;
    highs = 0;
    for (int j = 0; j < 3 * periods; j++) begin
      if (j > 0) @(negedge clk);
      if (j > 0) ld = 3'($urandom);   // ignored while load is low
      expected = is_static ? code[0] : code[2 - (j % 3)];
      checks++;
      if (pwm_out !== expected || sw !== !is_static) begin
        failures++;
        $display("FAIL: code=%b cycle %0d out=%b exp %b sw=%b", code, j, pwm_out, expected, sw);
      end
      highs += int'(pwm_out);
      if (j % 3 == 2) begin
        checks++;
        if (highs != $countones(code)) begin
          failures++;
          $display("FAIL: code=%b period high count %0d exp %0d", code, highs, $countones(code));
        end
        if (!is_static && highs == 1) n_duty13++;
        if (!is_static && highs == 2) n_duty23++;
        highs = 0;
      end
    end
    // Rising edges seen by the ring after the load edge: the load edge
    // itself is excluded, 3*periods-1 edges follow it up to this point.
    checks++;
    if (is_static ? (ring_edges != 0) : (ring_edges != 3 * periods - 1)) begin
      failures++;
      $display("FAIL: code=%b ring clock edges %0d", code, ring_edges);
    end
    if (code == 3'b000) n_cut0++;
    if (code == 3'b111) n_cut100++;
    if (prev_static && !is_static) n_wake++;
    prev_static = is_static;
  endtask

  logic [2:0] seq [4];

  initial begin
    seq = '{from_string_order(3'b000), from_string_order(3'b001),
            from_string_order(3'b011), from_string_order(3'b111)};
    // reference sequence
    foreach (seq[i]) run_code(seq[i], 4);
    // every ordered pair of the four codes
    foreach (seq[a]) foreach (seq[b]) begin
      run_code(seq[a], 2);
      run_code(seq[b], 2);
    end
    // random codes, including the ones outside the four above
    repeat (20) run_code(3'($urandom), 2);

    $display("mechanisms: load=%0d cut0=%0d cut100=%0d wake=%0d duty1/3=%0d duty2/3=%0d",
             n_load, n_cut0, n_cut100, n_wake, n_duty13, n_duty23);
    checks++;
    if (n_load == 0 || n_cut0 == 0 || n_cut100 == 0 || n_wake == 0 ||
        n_duty13 == 0 || n_duty23 == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
