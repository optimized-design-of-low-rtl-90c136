// pwm_stage: one stage of the PWM ring, a load_mux feeding an adcl_dff.
//
// On each rising clk edge the flop takes the stage's code bit ld when load
// is high (parallel load, which also acts as the PWM's reset) and the
// preceding stage's output prev when load is low (shift). Each stage of the
// source design has exactly these pins: LD, load, load-bar, input, clk, Q.
//
// Ports: clk, ld, load, load_n (complement of load), prev, q.
// Timing: q changes one clk edge after the selected input.
module pwm_stage (
  input  logic clk,
  input  logic ld,
  input  logic load,
  input  logic load_n,
  input  logic prev,
  output logic q
);

  logic d;

  load_mux u_mux (
    .ld    (ld),
    .load  (load),
    .load_n(load_n),
    .prev  (prev),
    .sel   (d)
  );

  adcl_dff u_dff (
    .clk(clk),
    .d  (d),
    .q  (q)
  );

endmodule
