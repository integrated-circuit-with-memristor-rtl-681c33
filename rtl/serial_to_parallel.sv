// serial_to_parallel: FPGA-side receive shift register of the emulator link.
//
// Collects the chip's serial ADC sample. On each shift_en (given by rx_fsm
// at a falling edge of the serial clock) the bit on din enters at the LSB, so
// after WIDTH shifts q holds the word with the first received bit as MSB.
// q holds its value until the next shift. MSB-first order is this design's
// choice; the 10-bit width is the ADC's.
module serial_to_parallel #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             din,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {q[WIDTH-2:0], din};
  end

endmodule
