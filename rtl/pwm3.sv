// pwm3: the miniaturized digital 3-bit PWM, a ring of N_BITS pwm_stage cells.
//
// Stage i loads code bit ld[i] (input LDi) while load is high; otherwise it
// takes the output of stage i-1, and stage 0 takes the ring's output, which
// is the last stage's q. A loaded pattern therefore circulates with a period
// of N_BITS clock cycles, and the output is high in as many of those cycles
// as the code has ones: with three stages, code "001" (only LD2 set) gives a
// 1/3 duty and "011" (LD1, LD2 set) a 2/3 duty, in both cases starting high
// in the first cycle after the load edge. The stage structure and the
// feedback from the last stage to the first follow the source design; the
// inverter that makes load_n from load is also taken from it.
//
// Ports: clk, load (sampled on the rising clk edge), ld[N_BITS-1:0],
// out (the q of the last stage).
// Timing: the loaded code appears on the first clk rising edge at which load
// is high; the output then repeats every N_BITS cycles.
module pwm3 #(
  parameter int unsigned N_BITS = adcl_pwm_pkg::PWM_BITS
) (
  input  logic              clk,
  input  logic              load,
  input  logic [N_BITS-1:0] ld,
  output logic              out
);

  logic              load_n;
  logic [N_BITS-1:0] stages;

  assign load_n = ~load;
  assign out    = stages[N_BITS-1];

  for (genvar i = 0; i < N_BITS; i++) begin : g_stage
    pwm_stage u_stage (
      .clk   (clk),
      .ld    (ld[i]),
      .load  (load),
      .load_n(load_n),
      .prev  ((i == 0) ? stages[N_BITS-1] : stages[(i == 0) ? 0 : i-1]),
      .q     (stages[i])
    );
  end

endmodule
