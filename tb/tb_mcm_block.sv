// tb_mcm_block: checks the multiple-constant-multiplication block for three coefficient
// sets: the high-pass set, the low-pass set, and a set built to exercise sharing of
// fundamentals (repeated odd parts, powers of two, a zero coefficient and the largest
// 8-bit value). Every 8-bit signed sample is applied and all nine products are compared
// with x * h(k) computed by the simulator's multiplier. The number of adders each set
// is built with (fir_pkg::mcm_adders, the count the block's recipe search yields) is
// compared with a count worked out by hand:
//   high-pass 3,4,6,18,20,33,35,27,41: 3x, 9x, 5x, 33x = x + x<<t; 35x = 3x + x<<5;
//     27x = 3x + 3x<<3; 41x = 9x + x<<5; 4x, 6x shifts only           -> 7 adders
//   low-pass 3,10,22,34,47,...: 3x, 5x, 17x = x + x<<t; 11x = 3x + x<<3;
//     47x = 3x + 11x<<2; the mirrored taps are shared                 -> 5 adders
//   sharing set 6,24,1,128,3,12,96,0,255: 3x one adder, the rest shared or shifts,
//     255x has no one-adder form and takes the 8-bit binary chain    -> 1 + 7 = 8
module tb_mcm_block;
  import fir_pkg::*;

  localparam coef_set_t SHARE_SET = {
    8'd255, 8'd0, 8'd96, 8'd12, 8'd3, 8'd128, 8'd1, 8'd24, 8'd6
  };

  logic clk = 1'b0;
  sample_t x;
  prod_t p_hpf [NTAPS];
  prod_t p_lpf [NTAPS];
  prod_t p_shr [NTAPS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mcm_block                       u_hpf (.x(x), .prod(p_hpf));
  mcm_block #(.COEFS(LPF_COEFS))  u_lpf (.x(x), .prod(p_lpf));
  mcm_block #(.COEFS(SHARE_SET))  u_shr (.x(x), .prod(p_shr));

  task automatic check_set(string name, coef_set_t c, prod_t p [NTAPS], int v);
    for (int k = 0; k < NTAPS; k++) begin
      checks++;
      if (int'(p[k]) != v * int'(c[k])) begin
        failures++;
        $display("FAIL %s x=%0d tap %0d: %0d expected %0d", name, v, k, p[k], v * int'(c[k]));
      end
    end
  endtask

  task automatic check_adders(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d adders, expected %0d", name, got, exp);
    end
  endtask

  initial begin
    check_adders("hpf", int'(mcm_adders(HPF_COEFS)), 7);
    check_adders("lpf", int'(mcm_adders(LPF_COEFS)), 5);
    check_adders("share", int'(mcm_adders(SHARE_SET)), 8);
    for (int v = -(2 ** (X_W - 1)); v < 2 ** (X_W - 1); v++) begin
      x = X_W'(v);
      @(posedge clk);
      check_set("hpf", HPF_COEFS, p_hpf, v);
      check_set("lpf", LPF_COEFS, p_lpf, v);
      check_set("share", SHARE_SET, p_shr, v);
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
