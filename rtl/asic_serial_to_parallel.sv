// asic_serial_to_parallel: on-chip receiver of the state variable.
//
// Takes the bits the FPGA sends on sdata at each rising edge of the serial
// clock while new_sample_n is low (MSB first), and when new_sample_n returns
// high copies the assembled word into the switch register. Each switch of
// the resistor array is a transmission gate, so every bit is given both true
// (sw) and inverted (sw_n) for the gate's two transistors. Copying only
// complete words keeps the array from passing through partial values while
// a word is shifted in; this, the framing by new_sample_n and the reset are
// this design's choices.
module asic_serial_to_parallel #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             sclk,
  input  logic             rst_n,
  input  logic             sdata,
  input  logic             new_sample_n,
  output logic [WIDTH-1:0] sw,
  output logic [WIDTH-1:0] sw_n
);

  logic [WIDTH-1:0] sh;
  logic             ns_d;

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      sw   <= '0;
      ns_d <= 1'b1;
    end else begin
      ns_d <= new_sample_n;
      if (!new_sample_n)     sh <= {sh[WIDTH-2:0], sdata};
      if (new_sample_n && !ns_d) sw <= sh;
    end
  end

  assign sw_n = ~sw;

endmodule
