// memristor_emulator_asic: one memristor emulator of the chip.
//
// Contains a behavioural part (the analog array and ADC) next to its
// synthesizable serial logic. The emulator looks like a two-terminal device
// between Inp_A (va) and Inp_B (vb) whose conductance is set digitally: the
// serial-to-parallel block takes the state variable X from the FPGA and
// switches the binary-weighted resistor array, while the measurement chain
// (differential voltage, scale by 2, 10-bit ADC) digitises the terminal
// voltage and the parallel-to-serial block returns it to the FPGA framed by
// EOC. The memristive behaviour itself is computed off-chip.
//
// Pins follow the chip's emulator: Serial_Clock (sclk), Serial_Data (sdata),
// ADC_Data (adc_data), EOC, Inp_A/Inp_B. The new-sample framing input and
// the reset are this design's additions.
module memristor_emulator_asic #(
  parameter int unsigned WIDTH = 10,
  parameter real         G_LSB = 1.0 / 204.8e6
) (
  input  logic             sclk,
  input  logic             rst_n,
  input  logic             sdata,
  input  logic             new_sample_n,
  output logic             adc_data,
  output logic             eoc,
  input  real              va,
  input  real              vb,
  output real              g,
  output real              i_ab,
  output logic [WIDTH-1:0] sw
);

  logic [WIDTH-1:0] sw_n;
  logic [WIDTH-1:0] code;
  logic             sample;

  asic_serial_to_parallel #(.WIDTH(WIDTH)) u_s2p (
    .sclk, .rst_n, .sdata, .new_sample_n, .sw, .sw_n
  );

  resistor_array #(.WIDTH(WIDTH), .G_LSB(G_LSB)) u_array (
    .sw, .sw_n, .va, .vb, .g, .i_ab
  );

  voltage_adc #(.WIDTH(WIDTH)) u_adc (
    .sclk, .rst_n, .sample, .va, .vb, .code
  );

  asic_parallel_to_serial #(.WIDTH(WIDTH)) u_p2s (
    .sclk, .rst_n, .code, .sample, .eoc, .sdata(adc_data)
  );

endmodule
