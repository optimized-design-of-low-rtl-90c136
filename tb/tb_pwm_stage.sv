// tb_pwm_stage: test of one PWM stage (selector plus flip-flop).
// Random ld, load and prev are applied on the falling edge; after each
// rising edge q must equal load ? ld : prev as sampled at that edge.
`timescale 1ns/1ps
module tb_pwm_stage;
  logic clk = 1'b0;
  logic ld = 1'b0, load = 1'b0, prev = 1'b0;
  logic load_n;
  logic q;
  int   checks = 0;
  int   failures = 0;

  assign load_n = ~load;

  pwm_stage dut (.clk(clk), .ld(ld), .load(load), .load_n(load_n), .prev(prev), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    int   n_load = 0, n_shift = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      {ld, load, prev} = 3'($urandom);
      expected = load ? ld : prev;
      if (load) n_load++; else n_shift++;
      @(posedge clk);
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL: ld=%b load=%b prev=%b q=%b expected %b", ld, load, prev, q, expected);
      end
    end
    checks++;
    if (n_load == 0 || n_shift == 0) begin
      failures++;
      $display("FAIL: load or shift never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
