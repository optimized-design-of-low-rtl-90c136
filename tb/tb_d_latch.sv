// tb_d_latch: test of the up-level D latch.
// While en is high q must follow every change of d; after en falls q must
// keep the last value while d keeps changing.
`timescale 1ns/1ps
module tb_d_latch;
  logic en = 1'b0, d = 1'b0, q;
  int   checks = 0;
  int   failures = 0;

  d_latch dut (.en(en), .d(d), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    for (int n = 0; n < 50; n++) begin
      en = 1'b1;
      repeat (4) begin
        d = 1'($urandom);
        #1;
        checks++;
        if (q !== d) begin
          failures++;
          $display("FAIL: transparent q=%b d=%b", q, d);
        end
      end
      held = d;
      en = 1'b0;
      #1;
      repeat (4) begin
        d = ~d;
        #1;
        checks++;
        if (q !== held) begin
          failures++;
          $display("FAIL: hold q=%b expected %b", q, held);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
