// voltage_adc: behavioural model of the emulator's voltage measurement chain.
//
// Behavioural model of an analog part (not synthesizable logic). It stands
// for the differential voltage measurement, the scale-by-2 stage and the
// 10-bit ADC. The terminals may each lie anywhere in 0..VDD, so their
// difference spans -VDD..+VDD; halving it and adding VDD/2 brings it into
// the ADC's 0..VDD input range:
//     y = (va - vb)/2 + VDD/2,   code = round(y / VDD * (2^WIDTH - 1))
// clipped to the code range. A conversion is taken at the rising edge of
// sclk while sample is high and code holds it until the next one. The chain
// and its range are the chip's; the ideal, instantaneous conversion is this
// model's simplification.
module voltage_adc #(
  parameter int unsigned WIDTH = 10,
  parameter real         VDD   = 3.3
) (
  input  logic             sclk,
  input  logic             rst_n,
  input  logic             sample,
  input  real              va,
  input  real              vb,
  output logic [WIDTH-1:0] code
);

  localparam real FULL = real'((1 << WIDTH) - 1);

  function automatic logic [WIDTH-1:0] convert(input real a, input real b);
    real y, c;
    y = (a - b) / 2.0 + VDD / 2.0;
    c = y / VDD * FULL;
    if (c <= 0.0)  return '0;
    if (c >= FULL) return '1;
    return WIDTH'(longint'($rtoi(c + 0.5)));
  endfunction

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n)      code <= '0;
    else if (sample) code <= convert(va, vb);
  end

endmodule
