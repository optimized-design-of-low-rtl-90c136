// cutoff_control: control block of the clock cut-off circuit.
//
// Each code bit LDi passes through a d_latch enabled by load, so the block
// follows the code while load is high and holds it between loads. From the
// latched code it decodes two signals:
//   sw : 1 while the code makes the PWM toggle (normal operation, the clock
//        is passed to the ring); 0 for the all-zero and all-one codes, whose
//        output is constant, so the ring's clock can be cut off.
//   po : 1 only for the all-one code; it is the constant output used while
//        sw is 0 (0 % dimming -> 0, 100 % dimming -> 1).
// For three bits this reproduces the block's truth table: 000 -> sw 0 po 0,
// 001 -> 1 0, 011 -> 1 0, 111 -> 0 1, and load low -> hold.
//
// sw is formed as a ring of AND terms, q[i] & ~q[i+1] (indices modulo
// N_BITS), OR-ed together: it is 1 exactly when not all latched bits are
// equal. With three bits that is three AND gates and one OR gate, the gate
// count of the source design's block; po is one AND of all latched bits.
// The codes outside 000/001/011/111 (e.g. 010) are not defined by the
// source design; here they count as toggling codes (sw = 1).
//
// Ports: load (latch enable), ld[N_BITS-1:0], sw, po.
// Timing: transparent while load is high, no clock; holds while load is low.
// The latches are intended (see d_latch).
module cutoff_control #(
  parameter int unsigned N_BITS = adcl_pwm_pkg::PWM_BITS
) (
  input  logic              load,
  input  logic [N_BITS-1:0] ld,
  output logic              sw,
  output logic              po
);

  logic [N_BITS-1:0] q;
  logic [N_BITS-1:0] q_n;
  logic [N_BITS-1:0] term;

  for (genvar i = 0; i < N_BITS; i++) begin : g_latch
    d_latch u_latch (
      .en(load),
      .d (ld[i]),
      .q (q[i])
    );
  end

  always_comb begin
    q_n = ~q;
    for (int i = 0; i < N_BITS; i++) begin
      term[i] = q[i] & q_n[(i + 1) % N_BITS];
    end
    sw = |term;
    po = &q;
  end

endmodule
