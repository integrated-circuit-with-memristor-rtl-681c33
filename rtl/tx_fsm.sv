// tx_fsm: data transmission FSM of the emulator link (FPGA side).
//
// Waits in its initial state until the DSP raises update. It then loads the
// new state variable into the parallel_to_serial register, and at the next
// falling edge of the serial clock drives the new-sample pin (active low)
// low together with the first bit; the remaining bits follow at the next
// WIDTH-1 falling edges, and the pin returns high at the falling edge after
// the last bit. The chip latches the word into its switch array when the pin
// returns high. The wait-for-update, new-sample-low and falling-edge sending
// follow the described link; the pin's return to high as the end-of-word
// mark and the holding of an update that arrives mid-transfer (sent after
// the current word, with the then-current value) are this design's choices.
module tx_fsm #(
  parameter int unsigned WIDTH = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sclk_fall,
  input  logic update,
  output logic load,
  output logic shift_en,
  output logic new_sample_n,
  output logic busy
);

  typedef enum logic [1:0] {TX_IDLE, TX_WAIT_EDGE, TX_SEND} tx_state_e;

  tx_state_e                state;
  logic [$clog2(WIDTH)-1:0] cnt;
  logic                     pend;

  assign load     = (state == TX_IDLE) && (update || pend);
  assign shift_en = (state == TX_SEND) && sclk_fall && (cnt != ($clog2(WIDTH))'(WIDTH - 1));
  assign busy     = (state != TX_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= TX_IDLE;
      cnt          <= '0;
      pend         <= 1'b0;
      new_sample_n <= 1'b1;
    end else begin
      if (update && state != TX_IDLE) pend <= 1'b1;
      unique case (state)
        TX_IDLE: if (update || pend) begin
          pend  <= 1'b0;
          state <= TX_WAIT_EDGE;
        end
        TX_WAIT_EDGE: if (sclk_fall) begin
          new_sample_n <= 1'b0;
          cnt          <= '0;
          state        <= TX_SEND;
        end
        TX_SEND: if (sclk_fall) begin
          if (cnt == ($clog2(WIDTH))'(WIDTH - 1)) begin
            new_sample_n <= 1'b1;
            state        <= TX_IDLE;
          end
          cnt <= cnt + 1'b1;
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

endmodule
