// asic_parallel_to_serial: on-chip sender of the measured voltage.
//
// Runs on the serial clock from the FPGA and repeats a frame of FRAME = 11
// serial clocks: it strobes the ADC (sample) two clocks before the frame
// starts, loads the ADC code and raises EOC for the first clock of the frame,
// then presents the WIDTH code bits on sdata, MSB first, one per clock. At
// 1 MHz a frame lasts 11 us: 10 us of sending plus the time the FPGA needs to
// process, as the emulator's sampling period requires. All outputs change on
// the rising edge of sclk so that the FPGA can take them on the falling edge.
// The frame layout (EOC clock, bit order, ADC strobe position) is this
// design's choice.
module asic_parallel_to_serial #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned FRAME = WIDTH + 1
) (
  input  logic             sclk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] code,
  output logic             sample,
  output logic             eoc,
  output logic             sdata
);

  localparam int unsigned CW = $clog2(FRAME);

  logic [CW-1:0]    cnt;
  logic [WIDTH-1:0] sh;

  assign sample = (cnt == CW'(FRAME - 2));
  assign sdata  = sh[WIDTH-1];

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sh  <= '0;
      eoc <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(FRAME - 1)) ? '0 : cnt + 1'b1;
      eoc <= (cnt == CW'(FRAME - 1));
      if (cnt == CW'(FRAME - 1)) sh <= code;
      else if (cnt != '0)        sh <= {sh[WIDTH-2:0], 1'b0};
    end
  end

endmodule
