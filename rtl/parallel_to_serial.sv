// parallel_to_serial: FPGA-side transmit shift register of the emulator link.
//
// load copies the updated state variable d into the register; each shift_en
// (from tx_fsm, at a falling edge of the serial clock) moves the next bit to
// dout, MSB first. load has priority over shift_en. MSB-first order is this
// design's choice; the 10-bit width is that of the state variable.
module parallel_to_serial #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             shift_en,
  output logic             dout
);

  logic [WIDTH-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sh <= '0;
    else if (load)     sh <= d;
    else if (shift_en) sh <= {sh[WIDTH-2:0], 1'b0};
  end

  assign dout = sh[WIDTH-1];

endmodule
