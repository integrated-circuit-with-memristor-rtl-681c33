// tb_serial_to_parallel: shifts random words in MSB first and checks q.
// Bits presented without shift_en must be ignored.
module tb_serial_to_parallel;
  logic       clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, din = 1'b0;
  logic [9:0] q;
  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  serial_to_parallel dut (.clk, .rst_n, .shift_en, .din, .q);

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
      for (int i = 9; i >= 0; i--) begin
        @(negedge clk);
        shift_en = 1'b1; din = w[i];
        @(negedge clk);
        shift_en = 1'b0; din = ~w[i];     // noise between shifts
      end
      @(negedge clk);
      checks++;
      if (q !== w) begin
        failures++;
        $display("FAIL q=%h expected=%h", q, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
