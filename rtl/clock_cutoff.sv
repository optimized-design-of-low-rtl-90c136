// clock_cutoff: the clock cut-off circuit around the PWM ring.
//
// It holds the cutoff_control block and two switch pairs. The clock pair
// passes clk to the ring while sw is 1 and ties the ring's clock to ground
// while sw is 0. The output pair selects the ring's output while sw is 1 and
// the constant po while sw is 0. For the codes 000 (0 % dimming) and 111
// (100 % dimming) the ring's flip-flops therefore receive no clock edges,
// which is where the source design saves its power, while the output is
// still correct.
//
// The switches are modelled as an AND gate on the clock and a 2:1 selector
// on the output. ring_clk is a gated clock: sw changes only while load is
// high, so load should be raised while clk is low, as the source design's
// timing does; a change of sw while clk is high shortens or stretches that
// clock pulse.
//
// Ports: clk, load, ld[N_BITS-1:0] in; ring_clk out to the PWM ring;
// ring_out in from the PWM ring; sw, pwm_out out.
// Timing: combinational apart from the latches of cutoff_control.
module clock_cutoff #(
  parameter int unsigned N_BITS = adcl_pwm_pkg::PWM_BITS
) (
  input  logic              clk,
  input  logic              load,
  input  logic [N_BITS-1:0] ld,
  output logic              ring_clk,
  input  logic              ring_out,
  output logic              sw,
  output logic              pwm_out
);

  logic po;

  cutoff_control #(.N_BITS(N_BITS)) u_ctrl (
    .load(load),
    .ld  (ld),
    .sw  (sw),
    .po  (po)
  );

  assign ring_clk = clk & sw;
  assign pwm_out  = sw ? ring_out : po;

endmodule
