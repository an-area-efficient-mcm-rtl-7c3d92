// tb_mcm_29x_43x: exhaustive check of the 29x / 43x shift-add example.
// Every 8-bit signed input is applied, one per clock, and both outputs are compared with
// products computed by the simulator's own multiplier. A watchdog ends the run if it hangs.
module tb_mcm_29x_43x;

  localparam int W = 8;

  logic clk = 1'b0;
  logic signed [W-1:0] x;
  logic signed [W+5:0] y29, y43;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mcm_29x_43x #(.W(W)) dut (.x(x), .y29(y29), .y43(y43));

  initial begin
    for (int v = -(2 ** (W - 1)); v < 2 ** (W - 1); v++) begin
      x = W'(v);
      @(posedge clk);
      checks++;
      if (int'(y29) != 29 * v) begin
        failures++;
        $display("FAIL x=%0d: y29=%0d expected %0d", v, y29, 29 * v);
      end
      checks++;
      if (int'(y43) != 43 * v) begin
        failures++;
        $display("FAIL x=%0d: y43=%0d expected %0d", v, y43, 43 * v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
