// tb_pwm3: test of the miniaturized PWM ring on its own (clock always on).
// Every code 0..2^N-1 is loaded by holding load high across one rising
// edge; then for 4 periods of N cycles the output is compared, cycle by
// cycle, with the expected rotation: in cycle j after the load edge the
// output is ld[N-1 - (j mod N)]. It also counts the high cycles in each
// period (must equal the number of ones in the code, i.e. duty = ones/N)
// and checks that ld changes while load is low have no effect. Run for the
// 3-bit default and for a 4-stage ring.
`timescale 1ns/1ps
module tb_pwm3;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic       load3 = 1'b0, load4 = 1'b0;
  logic [2:0] ld3 = '0;
  logic [3:0] ld4 = '0;
  logic       out3, out4;

  pwm3                 dut3 (.clk(clk), .load(load3), .ld(ld3), .out(out3));
  pwm3 #(.N_BITS(4))   dut4 (.clk(clk), .load(load4), .ld(ld4), .out(out4));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int highs;
    // 3-stage ring
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      ld3 = 3'(c); load3 = 1'b1;
      for (int j = 0; j < 12; j++) begin
        @(negedge clk);
        load3 = 1'b0;
        ld3   = 3'($urandom);   // must be ignored while load is low
        if (j % 3 == 0) highs = 0;
        highs += int'(out3);
        checks++;
        if (out3 !== 1'(c >> (2 - (j % 3)))) begin
          failures++;
          $display("FAIL: N=3 code=%b cycle %0d out=%b", 3'(c), j, out3);
        end
        if (j % 3 == 2) begin
          checks++;
          if (highs != $countones(3'(c))) begin
            failures++;
            $display("FAIL: N=3 code=%b period high count %0d", 3'(c), highs);
          end
        end
      end
    end
    // 4-stage ring
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      ld4 = 4'(c); load4 = 1'b1;
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        load4 = 1'b0;
        ld4   = 4'($urandom);
        checks++;
        if (out4 !== 1'(c >> (3 - (j % 4)))) begin
          failures++;
          $display("FAIL: N=4 code=%b cycle %0d out=%b", 4'(c), j, out4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
