// tb_cutoff_control: test of the clock cut-off control block.
// First the four codes of the block's truth table are applied with load
// high and sw/po are compared with the table's values (000 -> 0 0,
// 001 -> 1 0, 011 -> 1 0, 111 -> 0 1; codes written LD0 LD1 LD2). Then,
// for every one of the eight codes, load is dropped and ld is changed to
// random values: sw and po must hold. Codes outside the table expect
// sw = 1, po = 0.
`timescale 1ns/1ps
module tb_cutoff_control;
  localparam int N = 3;
  logic         load = 1'b0;
  logic [N-1:0] ld = '0;
  logic         sw, po;
  int           checks = 0;
  int           failures = 0;

  cutoff_control #(.N_BITS(N)) dut (.load(load), .ld(ld), .sw(sw), .po(po));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Truth table rows: {ld[0], ld[1], ld[2]} as printed, then sw, po.
  typedef struct packed { logic [2:0] ld012; logic sw; logic po; } row_t;
  row_t table_rows [4] = '{
    '{3'b000, 1'b0, 1'b0},
    '{3'b001, 1'b1, 1'b0},
    '{3'b011, 1'b1, 1'b0},
    '{3'b111, 1'b0, 1'b1}
  };

  task automatic check(input logic esw, input logic epo, input string what);
    checks++;
    if (sw !== esw || po !== epo) begin
      failures++;
      $display("FAIL: %s ld=%b sw=%b po=%b expected %b %b", what, ld, sw, po, esw, epo);
    end
  endtask

  initial begin
    logic esw, epo;
    foreach (table_rows[r]) begin
      load = 1'b1;
      ld   = {table_rows[r].ld012[0], table_rows[r].ld012[1], table_rows[r].ld012[2]};
      #1;
      check(table_rows[r].sw, table_rows[r].po, "table");
      load = 1'b0;
      #1;
      repeat (6) begin
        ld = 3'($urandom);
        #1;
        check(table_rows[r].sw, table_rows[r].po, "hold");
      end
    end
    for (int c = 0; c < 8; c++) begin
      load = 1'b1;
      ld   = 3'(c);
      esw  = !(c == 0 || c == 7);
      epo  = (c == 7);
      #1;
      check(esw, epo, "load");
      load = 1'b0;
      #1;
      repeat (6) begin
        ld = 3'($urandom);
        #1;
        check(esw, epo, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
