// clock_divisor: derives the serial-link clock from the FPGA clock.
//
// A counter of DIV FPGA cycles makes the serial clock sclk (high for the
// first DIV/2 cycles of each period). With the default DIV = 50 a 50 MHz FPGA
// clock gives the 1 MHz serial clock of the emulator link; the FPGA
// frequency and the counter are this design's choices. The serial clock is
// sent to the chip and, as the link requires, also paces the FPGA's own
// link logic: rather than clocking flops with sclk, that logic uses the
// one-cycle enables sclk_rise and sclk_fall, which are high in the FPGA
// cycle at whose end sclk goes high or low respectively.
module clock_divisor #(
  parameter int unsigned DIV = 50    // even, >= 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic sclk,
  output logic sclk_rise,
  output logic sclk_fall
);

  logic [$clog2(DIV)-1:0] cnt;

  assign sclk_rise = (cnt == ($clog2(DIV))'(DIV - 1));
  assign sclk_fall = (cnt == ($clog2(DIV))'(DIV / 2 - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      sclk <= 1'b1;
    end else begin
      cnt <= sclk_rise ? '0 : cnt + 1'b1;
      if (sclk_rise)      sclk <= 1'b1;
      else if (sclk_fall) sclk <= 1'b0;
    end
  end

endmodule
