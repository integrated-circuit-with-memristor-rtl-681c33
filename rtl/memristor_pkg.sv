// memristor_pkg: types and constants shared by the memristor emulator logic.
//
// The emulator's FPGA side computes the memristor model in IEEE 754 single
// precision. The constants below are the float32 encodings of the model
// values: the two conductance ranges of the chip's emulators, the drift
// constant k = mu / (D^2 * Gmax) with mu = 1e-14 m^2/(s V) and D = 10 nm,
// the 11 us sampling period, the one-LSB threshold of the 10-bit state
// variable, the ADC voltage scale and the initial conductance of 3.41 uS.
// The numeric values are those of the model; the ADC scale 3.3/1023 and the
// threshold 1/1023 follow from the +-3.3 V input range and the 10-bit state
// variable (see the DSP unit for the reasoning).
package memristor_pkg;

  // Word length of the state variable X and of the ADC sample.
  localparam int unsigned XBITS = 10;
  localparam int unsigned XMAX  = (1 << XBITS) - 1;   // 1023

  typedef logic [31:0] float32_t;

  // Operations of the floating-point unit.
  typedef enum logic [2:0] {
    FPU_ADD  = 3'd0,
    FPU_SUB  = 3'd1,
    FPU_MUL  = 3'd2,
    FPU_DIV  = 3'd3,
    FPU_CMP  = 3'd4,   // flags only, y = a
    FPU_ITOF = 3'd5,   // signed 32-bit integer a -> float
    FPU_FTOI = 3'd6    // float a -> signed 32-bit integer, toward zero
  } fpu_op_e;

  // Emulator 0: 200 kOhm .. 204.8 MOhm
  localparam float32_t F_GMIN_E0 = 32'h31A7ACEF;  // 4.88e-9 S
  localparam float32_t F_GMAX_E0 = 32'h36A76FC6;  // 4.99e-6 S
  localparam float32_t F_K_E0    = 32'h4B98E4C8;  // 2.004008e7 = 1e-14/(1e-16*4.99e-6)
  // Emulators 1..4: 5.2 kOhm .. 5.12 MOhm
  localparam float32_t F_GMIN_E1 = 32'h34516131;  // 195e-9 S
  localparam float32_t F_GMAX_E1 = 32'h39473ABD;  // 190e-6 S
  localparam float32_t F_K_E1    = 32'h49007EBD;  // 5.263158e5 = 1e-14/(1e-16*190e-6)

  localparam float32_t F_TS      = 32'h37388CA4;  // 11e-6 s
  localparam float32_t F_XTH     = 32'h3A802008;  // 1/1023
  localparam float32_t F_VSCALE  = 32'h3B53680D;  // 3.3/1023 V per code step
  localparam float32_t F_GINIT   = 32'h3664D75B;  // 3.41e-6 S
  localparam float32_t F_1023    = 32'h447FC000;  // 1023.0
  localparam float32_t F_HALF    = 32'h3F000000;  // 0.5

endpackage
