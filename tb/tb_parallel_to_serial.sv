// tb_parallel_to_serial: loads random words and checks the bits come out
// MSB first, one per shift_en, with load taking priority.
module tb_parallel_to_serial;
  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift_en = 1'b0, dout;
  logic [9:0] d = '0;
  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  parallel_to_serial dut (.clk, .rst_n, .load, .d, .shift_en, .dout);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] w;
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      w = 10'($urandom);
      @(negedge clk) begin load = 1'b1; shift_en = 1'b1; d = w; end
      @(negedge clk) begin load = 1'b0; shift_en = 1'b0; d = ~w; end
      for (int i = 9; i >= 0; i--) begin
        checks++;
        if (dout !== w[i]) begin
          failures++;
          $display("FAIL bit %0d of %h", i, w);
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);   // no shift: hold
        checks++;
        if (dout !== w[i]) failures++;
        shift_en = 1'b1;
        @(negedge clk) shift_en = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
