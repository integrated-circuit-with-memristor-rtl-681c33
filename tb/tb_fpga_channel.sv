// tb_fpga_channel: checks one FPGA channel through its serial pins.
//
// The testbench plays the chip: on the channel's own serial clock it sends
// frames (EOC for one clock, then 10 bits MSB first, changing on the rising
// edge, one frame every 11 clocks) carrying a sine of ADC codes, and it
// decodes the words the channel sends back (new_sample_n low, bits taken on
// the rising edge). Every received sample must produce one Run; every
// Update must be followed by a transmitted word equal to the new X, and the
// number of words must equal the number of updates plus the initial one.
module tb_fpga_channel;
  import memristor_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             sclk, adc_data = 1'b0, eoc = 1'b0, data_out, new_sample_n;
  logic [XBITS-1:0] x;
  logic             update, run, dsp_busy, tx_busy;
  float32_t         g, q;
  int checks = 0, failures = 0;
  int n_run = 0, n_upd = 0, n_words = 0, n_frames = 0, n_busy_overlap = 0;

  always #10ns clk = ~clk;

  fpga_channel dut (.clk, .rst_n, .sclk, .adc_data, .eoc, .data_out, .new_sample_n,
                    .x, .update, .run, .g, .q, .dsp_busy, .tx_busy);

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chip side: frame sender
  logic [9:0] frame_code [$];
  int         fcnt = 0;
  logic [9:0] sh;
  always @(posedge sclk) if (rst_n && !(fcnt == 0 && n_frames >= 400)) begin
    if (fcnt == 0) begin
      eoc <= 1'b1;
      sh  <= 10'($rtoi(511.5 + 511.0 * $sin(2.0 * 3.14159265 * real'(n_frames) / 90.0) + 0.5));
    end else begin
      eoc      <= 1'b0;
      adc_data <= sh[9];
      sh       <= {sh[8:0], 1'b0};
    end
    if (fcnt == 0) begin
      frame_code.push_back(10'($rtoi(511.5 + 511.0 * $sin(2.0 * 3.14159265 * real'(n_frames) / 90.0) + 0.5)));
      n_frames++;
    end
    fcnt <= (fcnt == 10) ? 0 : fcnt + 1;
  end

  // chip side: word receiver
  logic [9:0] rx;
  logic       ns_d = 1'b1;
  logic [9:0] sent_x [$];
  logic [9:0] last_word;
  always @(posedge sclk) begin
    if (!new_sample_n) rx <= {rx[8:0], data_out};
    ns_d <= new_sample_n;
    if (new_sample_n && !ns_d) begin
      n_words++;
      checks++;
      // the word is the X of an update not yet seen on the line; updates
      // that arrive while a word is being sent are merged into the next one
      begin
        bit found;
        found = 1'b0;
        while (sent_x.size() > 0 && !found) found = (sent_x.pop_front() == rx);
        if (!found) begin
          failures++;
          $display("FAIL word %0d is no pending X", rx);
        end
      end
      last_word = rx;
    end
  end

  // FPGA side: runs must carry the frame's code
  always @(posedge clk) begin
    if (run) begin
      n_run++;
      checks++;
      if (frame_code.size() == 0 || dut.sample !== frame_code.pop_front()) begin
        failures++;
        $display("FAIL run with sample %0d", dut.sample);
      end
    end
    if (update) begin
      n_upd++;
      if (tx_busy) n_busy_overlap++;
      #1ns sent_x.push_back(x);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (n_frames == 400);
    repeat (2000) @(negedge clk);
    $display("runs=%0d updates=%0d words=%0d x=%0d", n_run, n_upd, n_words, x);
    checks += 4;
    if (last_word !== x) failures++;       // line and DSP agree when quiet
    if (n_run < 395) failures++;
    if (n_upd < 50) failures++;            // the sine moves X both ways
    if (n_words < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
