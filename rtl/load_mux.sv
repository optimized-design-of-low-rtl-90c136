// load_mux: the input-bit selector of a PWM stage, block (a) of the
// miniaturized PWM.
//
// The source design builds it from three NAND gates (an earlier version used
// two AND gates and an OR gate). The three-NAND form is kept literally:
//   sel = NAND( NAND(ld, load), NAND(load_n, prev) )
// which gives ld while load is high and prev while load is low, provided
// load_n is the complement of load (the design distributes both rails).
//
// Ports: ld (code bit of this stage), load, load_n, prev (output of the
// preceding stage in the ring), sel.  Purely combinational.
module load_mux (
  input  logic ld,
  input  logic load,
  input  logic load_n,
  input  logic prev,
  output logic sel
);

  logic nand_ld;
  logic nand_prev;

  always_comb begin
    nand_ld   = ~(ld & load);
    nand_prev = ~(load_n & prev);
    sel       = ~(nand_ld & nand_prev);
  end

endmodule
