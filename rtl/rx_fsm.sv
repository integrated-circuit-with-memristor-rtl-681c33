// rx_fsm: data reception FSM of the emulator link (FPGA side).
//
// Waits in its initial state until the chip signals end of conversion (EOC),
// then takes the next WIDTH data bits, one at each falling edge of the serial
// clock, by pulsing shift_en for the serial_to_parallel register, and finally
// pulses run for one FPGA clock to tell the DSP a new voltage sample is ready.
// The reception sequence follows the described link; sampling EOC itself at
// a falling edge and the one-clock run pulse are this design's choices.
//
// Timing: run is high in the FPGA clock after the falling edge at which the
// last bit was taken.
module rx_fsm #(
  parameter int unsigned WIDTH = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sclk_fall,
  input  logic eoc,
  output logic shift_en,
  output logic run
);

  typedef enum logic [1:0] {RX_WAIT_EOC, RX_BITS, RX_DONE} rx_state_e;

  rx_state_e                state;
  logic [$clog2(WIDTH)-1:0] cnt;

  assign shift_en = (state == RX_BITS) && sclk_fall;
  assign run      = (state == RX_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RX_WAIT_EOC;
      cnt   <= '0;
    end else begin
      unique case (state)
        RX_WAIT_EOC: if (sclk_fall && eoc) begin
          cnt   <= '0;
          state <= RX_BITS;
        end
        RX_BITS: if (sclk_fall) begin
          if (cnt == ($clog2(WIDTH))'(WIDTH - 1)) state <= RX_DONE;
          cnt <= cnt + 1'b1;
        end
        RX_DONE: state <= RX_WAIT_EOC;
        default: state <= RX_WAIT_EOC;
      endcase
    end
  end

  a_run_pulse: assert property (@(posedge clk) run |=> !run);

endmodule
