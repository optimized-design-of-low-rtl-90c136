// tb_clock_cutoff: test of the clock cut-off circuit with a stand-in ring
// output. For each code it loads the code, then for several cycles drives
// random ring_out values and checks:
//   sw       = 0 for 000/111, 1 otherwise;
//   ring_clk = clk while sw is 1, constantly 0 while sw is 0 (its rising
//              edges are counted: none may appear for 000/111);
//   pwm_out  = ring_out while sw is 1, po (1 only for 111) while sw is 0.
`timescale 1ns/1ps
module tb_clock_cutoff;
  logic       clk = 1'b0;
  logic       load = 1'b0;
  logic [2:0] ld = '0;
  logic       ring_out = 1'b0;
  logic       ring_clk, sw, pwm_out;
  int         checks = 0;
  int         failures = 0;
  int         ring_edges = 0;

  clock_cutoff dut (
    .clk(clk), .load(load), .ld(ld), .ring_clk(ring_clk),
    .ring_out(ring_out), .sw(sw), .pwm_out(pwm_out)
  );

  always #5 clk = ~clk;
  always @(posedge ring_clk) ring_edges++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic static_code, epo, eout;
    int   cut_windows = 0, run_windows = 0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        ld = 3'(c); load = 1'b1;
        static_code = (c == 0 || c == 7);
        epo = (c == 7);
        @(negedge clk);
        load = 1'b0;
        ld = 3'($urandom);
        ring_edges = 0;
        repeat (8) begin
          ring_out = 1'($urandom);
          #1;
          eout = static_code ? epo : ring_out;
          checks++;
          if (sw !== !static_code || pwm_out !== eout || ring_clk !== 1'b0) begin
            failures++;
            $display("FAIL low phase: code=%b sw=%b out=%b exp %b ring_clk=%b", 3'(c), sw, pwm_out, eout, ring_clk);
          end
          @(posedge clk);
          #1;
          checks++;
          if (ring_clk !== !static_code || pwm_out !== eout) begin
            failures++;
            $display("FAIL high phase: code=%b ring_clk=%b out=%b exp %b", 3'(c), ring_clk, pwm_out, eout);
          end
          @(negedge clk);
        end
        checks++;
        if (static_code ? (ring_edges != 0) : (ring_edges != 8)) begin
          failures++;
          $display("FAIL: code=%b ring clock edges %0d", 3'(c), ring_edges);
        end
        if (static_code) cut_windows++; else run_windows++;
      end
    end
    checks++;
    if (cut_windows == 0 || run_windows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
