// adcl_pwm_pkg: constants shared by the 3-bit dimming PWM.
//
// PWM_BITS is the number of ring stages, and so the number of duty-code
// bits (3 in the source design: duties of 0, 1/3, 2/3 and 1). The duty code
// is carried as a vector whose bit i is input LDi; the source design writes
// codes as the string "LD0 LD1 LD2", so the code written "001" is
// ld = 3'b100 here (only LD2 set).
package adcl_pwm_pkg;

  localparam int unsigned PWM_BITS = 3;

endpackage
