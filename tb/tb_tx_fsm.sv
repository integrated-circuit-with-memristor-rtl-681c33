// tb_tx_fsm: checks the transmission sequence Update -> pin low -> 10 bits.
//
// sclk_fall pulses every 50 clocks. After an update the FSM must load the
// shift register at once, pull new_sample_n low at the next falling edge,
// shift at each of the next 9 falling edges (10 bits on the line in all)
// and release new_sample_n at the 11th. An update arriving during a
// transfer must start a second transfer right after the first.
module tb_tx_fsm;
  logic clk = 1'b0, rst_n = 1'b0, sclk_fall = 1'b0, update = 1'b0;
  logic load, shift_en, new_sample_n, busy;
  int checks = 0, failures = 0;
  int n_load = 0, n_shift = 0, n_low = 0, n_start = 0, n_pend = 0;
  logic ns_prev = 1'b1;

  always #10ns clk = ~clk;

  tx_fsm dut (.clk, .rst_n, .sclk_fall, .update, .load, .shift_en, .new_sample_n, .busy);

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // falling-edge enables, free running
  initial begin
    forever begin
      repeat (49) @(negedge clk);
      sclk_fall = 1'b1;
      @(negedge clk) sclk_fall = 1'b0;
    end
  end

  always @(posedge clk) begin
    if (load) n_load++;
    if (shift_en) n_shift++;
    if (!new_sample_n && sclk_fall) n_low++;     // falling edges seen with pin low
    if (!new_sample_n && ns_prev) n_start++;
    ns_prev <= new_sample_n;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom_range(10, 300)) @(negedge clk);
      n_load = 0; n_shift = 0; n_low = 0; n_start = 0;
      update = 1'b1;
      #1ns;
      checks++;
      if (!load) failures++;          // loads in the update clock
      @(negedge clk) update = 1'b0;
      if (n % 4 == 3) begin
        // second update mid-transfer
        repeat (200) @(negedge clk);
        update = 1'b1;
        @(negedge clk) update = 1'b0;
        n_pend++;
      end
      while (busy) @(negedge clk);
      checks++;
      if (n % 4 == 3) begin
        // first transfer done, second one starts next
        @(negedge clk);
        checks++;
        if (!busy) failures++;
        while (busy) @(negedge clk);
        if (n_load != 2 || n_shift != 18 || n_low != 20 || n_start != 2) begin
          failures++;
          $display("FAIL double: load=%0d shift=%0d low=%0d start=%0d", n_load, n_shift, n_low, n_start);
        end
      end else if (n_load != 1 || n_shift != 9 || n_low != 10 || n_start != 1) begin
        failures++;
        $display("FAIL single: load=%0d shift=%0d low=%0d start=%0d", n_load, n_shift, n_low, n_start);
      end
      checks++;
      if (!new_sample_n) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
