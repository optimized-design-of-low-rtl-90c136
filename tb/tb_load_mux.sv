// tb_load_mux: exhaustive test of the three-NAND input-bit selector.
// For every combination of ld, load and prev (with load_n = ~load, as in
// the PWM) it checks sel = load ? ld : prev.
`timescale 1ns/1ps
module tb_load_mux;
  logic ld, load, load_n, prev, sel;
  int   checks = 0;
  int   failures = 0;

  load_mux dut (.ld(ld), .load(load), .load_n(load_n), .prev(prev), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {ld, load, prev} = 3'(v);
        load_n = ~load;
        #1;
        expected = load ? ld : prev;
        checks++;
        if (sel !== expected) begin
          failures++;
          $display("FAIL: ld=%b load=%b prev=%b sel=%b expected %b", ld, load, prev, sel, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
