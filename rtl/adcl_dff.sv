// adcl_dff: positive-edge D flip-flop, the storage element of every PWM stage.
//
// In the source design this flop is a classic six-NAND edge-triggered D
// flip-flop built in adiabatic dynamic CMOS logic (ADCL), powered by the
// AC supply. Only its logic function is kept here: q takes d on each rising
// edge of clk. The flop has no reset, as in the source design; the PWM is
// initialised through its parallel load instead.
//
// Ports: clk (rising edge), d, q.  Timing: q is valid one clk edge after d.
module adcl_dff (
  input  logic clk,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
