// d_latch: level-sensitive ("up-level") D latch.
//
// While en is high the latch is transparent and q follows d; while en is
// low q holds the value it had when en fell. The cut-off control block uses
// one per code bit, enabled by load, so SW and PO follow the code during a
// load and keep their value between loads.
//
// This module infers a latch on purpose: the source design specifies a
// level-sensitive D latch here, not a flip-flop. When the latch is inlined
// into a larger design a linter may report that no latch was found; the
// storage is nevertheless real, as the testbench shows by checking the hold.
//
// Ports: en, d, q.  Timing: transparent, no clock.
module d_latch (
  input  logic en,
  input  logic d,
  output logic q
);

  always_latch begin
    if (en) q = d;
  end

endmodule
