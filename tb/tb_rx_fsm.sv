// tb_rx_fsm: checks the reception sequence EOC -> 10 bits -> Run.
//
// sclk_fall pulses every 50 clocks as from the clock divisor. Frames begin
// with EOC at a falling edge; the FSM must give exactly one shift_en at each
// of the next 10 falling edges, none elsewhere, and one Run pulse right
// after the 10th. Gaps with EOC low must produce nothing.
module tb_rx_fsm;
  logic clk = 1'b0, rst_n = 1'b0, sclk_fall = 1'b0, eoc = 1'b0;
  logic shift_en, run;
  int checks = 0, failures = 0;
  int n_shift = 0, n_run = 0;

  always #10ns clk = ~clk;

  rx_fsm dut (.clk, .rst_n, .sclk_fall, .eoc, .shift_en, .run);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (shift_en) n_shift++;
    if (run) n_run++;
    if (shift_en && !sclk_fall) failures++;
  end

  // one serial-clock period with a falling edge; eoc is set for that edge
  task automatic period(input logic e);
    eoc = e;
    repeat (24) @(negedge clk);
    sclk_fall = 1'b1;
    @(negedge clk) sclk_fall = 1'b0;
    repeat (25) @(negedge clk);
  endtask

  initial begin
    int gap;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 30; f++) begin
      gap = $urandom_range(0, 3);
      repeat (gap) period(1'b0);
      n_shift = 0; n_run = 0;
      period(1'b1);
      checks++;
      if (n_shift != 0 || n_run != 0) failures++;
      for (int b = 0; b < 10; b++) begin
        period($urandom_range(0, 1));   // EOC is ignored during the data bits
        checks++;
        if (n_shift != b + 1) begin
          failures++;
          $display("FAIL frame %0d: %0d shifts after bit %0d", f, n_shift, b);
        end
      end
      checks++;
      if (n_run != 1) begin
        failures++;
        $display("FAIL frame %0d: %0d run pulses", f, n_run);
      end
    end
    // no EOC: nothing happens
    n_shift = 0; n_run = 0;
    repeat (20) period(1'b0);
    checks++;
    if (n_shift != 0 || n_run != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
