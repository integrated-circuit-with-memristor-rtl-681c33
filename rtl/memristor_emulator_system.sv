// memristor_emulator_system: the memristor emulator chip with its FPGA.
//
// A programmable memristor emulator: each of the chip's NUM_EMULATORS
// emulators is a digitally switched resistor array between two floating
// terminals. Its terminal voltage is measured on chip and sent serially to
// an FPGA, which integrates a memristor model (state variable x, window
// function, linear conductance) in IEEE 754 arithmetic and sends back the new
// 10-bit state, so the pair behaves as a memristor with a pinched
// current/voltage hysteresis. Emulator 0 covers 4.88 nS .. 4.99 uS, the
// other four 195 nS .. 190 uS. The chip also carries NUM_NEURONS integrate &
// fire neurons; their phase pin and spike generator are driven from outside,
// so their pins are brought out here.
//
// Every emulator has its own FPGA channel and serial link (the sharing of the
// FPGA among emulators is not specified, so this is this design's choice).
// The analog pieces (array, ADC, neurons) are behavioural models; the serial
// logic on both sides and the whole FPGA side are synthesizable.
//
// Interface: clk/rst_n drive the FPGA (and, through the serial clocks, the
// chip). emu_va/emu_vb are the terminal voltages applied to each emulator and
// emu_i the resulting A->B current; emu_x, emu_update, emu_run, emu_g expose
// each channel's model state. The neuron pins are neu_*.
module memristor_emulator_system
  import memristor_pkg::*;
#(
  parameter int unsigned NUM_EMULATORS = 5,
  parameter int unsigned NUM_NEURONS   = 2,
  parameter int unsigned CLK_DIV       = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  // memristor emulators
  input  real              emu_va     [NUM_EMULATORS],
  input  real              emu_vb     [NUM_EMULATORS],
  output real              emu_i      [NUM_EMULATORS],
  output real              emu_gchip  [NUM_EMULATORS],
  output logic [XBITS-1:0] emu_x      [NUM_EMULATORS],
  output logic [XBITS-1:0] emu_sw     [NUM_EMULATORS],
  output float32_t         emu_g      [NUM_EMULATORS],
  output logic             emu_update [NUM_EMULATORS],
  output logic             emu_run    [NUM_EMULATORS],
  output logic             emu_tx_busy[NUM_EMULATORS],
  // I&F neurons
  input  real              neu_iin    [NUM_NEURONS],
  input  real              neu_vfb    [NUM_NEURONS],
  input  real              neu_vth    [NUM_NEURONS],
  input  logic             neu_vph    [NUM_NEURONS],
  output real              neu_vop    [NUM_NEURONS],
  output logic             neu_vout   [NUM_NEURONS]
);

  for (genvar e = 0; e < NUM_EMULATORS; e++) begin : g_emu
    // Emulator 0 is the high-resistance one; the others share one range.
    localparam float32_t GMIN  = (e == 0) ? F_GMIN_E0 : F_GMIN_E1;
    localparam float32_t GMAX  = (e == 0) ? F_GMAX_E0 : F_GMAX_E1;
    localparam float32_t K     = (e == 0) ? F_K_E0    : F_K_E1;
    localparam real      G_LSB = (e == 0) ? 1.0 / 204.8e6 : 1.0 / 5.12e6;

    logic     sclk, sdata, new_sample_n, adc_data, eoc;

    fpga_channel #(
      .CLK_DIV(CLK_DIV), .GMIN(GMIN), .GMAX(GMAX), .K(K)
    ) u_fpga (
      .clk, .rst_n,
      .sclk, .adc_data, .eoc, .data_out(sdata), .new_sample_n,
      .x(emu_x[e]), .update(emu_update[e]), .run(emu_run[e]), .g(emu_g[e]),
      .q(), .dsp_busy(), .tx_busy(emu_tx_busy[e])
    );

    memristor_emulator_asic #(.WIDTH(XBITS), .G_LSB(G_LSB)) u_asic (
      .sclk, .rst_n, .sdata, .new_sample_n, .adc_data, .eoc,
      .va(emu_va[e]), .vb(emu_vb[e]), .g(emu_gchip[e]), .i_ab(emu_i[e]), .sw(emu_sw[e])
    );
  end

  for (genvar n = 0; n < NUM_NEURONS; n++) begin : g_neuron
    if_neuron u_neuron (
      .iin(neu_iin[n]), .vfb(neu_vfb[n]), .vth(neu_vth[n]), .vph(neu_vph[n]),
      .vop(neu_vop[n]), .vout(neu_vout[n])
    );
  end

endmodule
