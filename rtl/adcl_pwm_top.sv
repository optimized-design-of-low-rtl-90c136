// adcl_pwm_top: low-power 3-bit digital PWM for dimming a solid-state lamp.
//
// A duty code ld (bit i = input LDi) is captured while load is high. The
// miniaturized PWM ring (pwm3) turns a toggling code into a pulse train of
// period N_BITS clock cycles whose high time is the number of ones in the
// code (001 -> 1/3, 011 -> 2/3). The clock cut-off circuit (clock_cutoff)
// stops the ring's clock for the codes 000 and 111 and drives the output
// from a latched constant instead, so no flip-flop switches at 0 % or 100 %
// dimming. This structure follows the source design; the flops are
// ordinary CMOS flops here, not adiabatic ones.
//
// Ports: clk, load, ld[N_BITS-1:0] in; sw (clock cut-off control, 1 = ring
// clocked) and pwm_out out.
// Timing: hold load high across one rising clk edge with ld stable; for a
// toggling code pwm_out is high in the first cycle after that edge and the
// pattern repeats every N_BITS cycles. For 000/111 pwm_out follows as soon
// as load is high (the control block is transparent).
module adcl_pwm_top #(
  parameter int unsigned N_BITS = adcl_pwm_pkg::PWM_BITS
) (
  input  logic              clk,
  input  logic              load,
  input  logic [N_BITS-1:0] ld,
  output logic              sw,
  output logic              pwm_out
);

  logic              ring_clk;
  logic              ring_out;

  clock_cutoff #(.N_BITS(N_BITS)) u_cutoff (
    .clk     (clk),
    .load    (load),
    .ld      (ld),
    .ring_clk(ring_clk),
    .ring_out(ring_out),
    .sw      (sw),
    .pwm_out (pwm_out)
  );

  pwm3 #(.N_BITS(N_BITS)) u_pwm (
    .clk   (ring_clk),
    .load  (load),
    .ld    (ld),
    .out   (ring_out)
  );

endmodule
