// tb_adcl_dff: self-checking test of the stage flip-flop.
// Drives random data, changing it on the falling edge, and checks after
// every rising edge that q equals the value d had at that edge. It also
// checks that q does not move on the falling edge.
`timescale 1ns/1ps
module tb_adcl_dff;
  logic clk = 1'b0;
  logic d   = 1'b0;
  logic q;
  int   checks = 0;
  int   failures = 0;

  adcl_dff dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sampled;
    logic q_prev;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      q_prev = q;
      d = 1'($urandom);
      #1;
      checks++;
      if (q !== q_prev) begin
        failures++;
        $display("FAIL: q moved without a rising edge");
      end
      sampled = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== sampled) begin
        failures++;
        $display("FAIL: cycle %0d q=%b expected %b", n, q, sampled);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
