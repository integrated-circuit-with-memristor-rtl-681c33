// resistor_array: behavioural model of the emulator's switched resistor array.
//
// Behavioural model of an analog part (not synthesizable logic). Between
// the floating terminals Inp_A and Inp_B sit WIDTH binary-weighted branches;
// branch k (k = 0..WIDTH-1) conducts G_LSB * 2^k when its series
// transmission gate is on (sw[k] = 1, sw_n[k] = 0). The conductance is thus
// g = G_LSB * code and the current from A to B is i_ab = g * (va - vb).
// With the default G_LSB = 1/204.8 MOhm the 10-bit code spans 4.88 nS
// (code 1) to 4.99 uS (code 1023), i.e. 204.8 MOhm down to 200 kOhm.
// A gate whose two control lines disagree with each other (sw == sw_n) is
// treated as off. The binary weighting and range are the chip's; the
// all-open code 0 and the ideal switches are this model's simplifications.
module resistor_array #(
  parameter int unsigned WIDTH = 10,
  parameter real         G_LSB = 1.0 / 204.8e6
) (
  input  logic [WIDTH-1:0] sw,
  input  logic [WIDTH-1:0] sw_n,
  input  real              va,
  input  real              vb,
  output real              g,
  output real              i_ab
);

  always_comb begin
    g = 0.0;
    for (int k = 0; k < WIDTH; k++)
      if (sw[k] && !sw_n[k]) g = g + G_LSB * real'(longint'(1) << k);
    i_ab = g * (va - vb);
  end

endmodule
