// fpga_channel: FPGA-side processing for one memristor emulator.
//
// Closes the emulator loop: the chip measures the voltage across its
// resistor array and sends it serially; this block receives the sample,
// runs the memristor model on it and sends back the new 10-bit state
// variable, which the chip applies to its switch array. The block map is the
// published FPGA top level: a clock divisor producing the 1 MHz serial
// clock, a serial-to-parallel register with its RX FSM (EOC, then 10 bits,
// then Run), the DSP unit (Sample In, Run -> Updated X, Update), and a
// parallel-to-serial register with its TX FSM (Update -> new-sample pin low,
// 10 bits). Reception, processing and transmission run independently, so a
// new sample can arrive while the previous X is still being sent.
//
// Timing: one sample every 11 serial clocks (EOC + 10 bits, set by the chip);
// the DSP finishes a sample in at most 15 FPGA clocks, well inside the
// serial-clock period that follows the last bit.
module fpga_channel
  import memristor_pkg::*;
#(
  parameter int unsigned CLK_DIV = 50,
  parameter float32_t    GMIN    = F_GMIN_E0,
  parameter float32_t    GMAX    = F_GMAX_E0,
  parameter float32_t    K       = F_K_E0,
  parameter float32_t    TS      = F_TS,
  parameter float32_t    XTH     = F_XTH,
  parameter float32_t    VSCALE  = F_VSCALE,
  parameter float32_t    GINIT   = F_GINIT
) (
  input  logic             clk,
  input  logic             rst_n,
  // link to the chip
  output logic             sclk,
  input  logic             adc_data,
  input  logic             eoc,
  output logic             data_out,
  output logic             new_sample_n,
  // observation
  output logic [XBITS-1:0] x,
  output logic             update,
  output logic             run,
  output float32_t         g,
  output float32_t         q,
  output logic             dsp_busy,
  output logic             tx_busy
);

  logic             sclk_fall;
  logic             rx_shift, tx_load, tx_shift;
  logic [XBITS-1:0] sample;

  clock_divisor #(.DIV(CLK_DIV)) u_clkdiv (
    .clk, .rst_n, .sclk, .sclk_rise(), .sclk_fall
  );

  serial_to_parallel #(.WIDTH(XBITS)) u_s2p (
    .clk, .rst_n, .shift_en(rx_shift), .din(adc_data), .q(sample)
  );

  rx_fsm #(.WIDTH(XBITS)) u_rx (
    .clk, .rst_n, .sclk_fall, .eoc, .shift_en(rx_shift), .run
  );

  dsp_unit #(
    .GMIN(GMIN), .GMAX(GMAX), .K(K), .TS(TS), .XTH(XTH), .VSCALE(VSCALE), .GINIT(GINIT)
  ) u_dsp (
    .clk, .rst_n, .run, .sample_in(sample), .x, .update, .g, .q, .busy(dsp_busy)
  );

  parallel_to_serial #(.WIDTH(XBITS)) u_p2s (
    .clk, .rst_n, .load(tx_load), .d(x), .shift_en(tx_shift), .dout(data_out)
  );

  tx_fsm #(.WIDTH(XBITS)) u_tx (
    .clk, .rst_n, .sclk_fall, .update, .load(tx_load), .shift_en(tx_shift),
    .new_sample_n, .busy(tx_busy)
  );

endmodule
