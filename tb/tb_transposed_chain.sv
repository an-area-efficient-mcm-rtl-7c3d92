// tb_transposed_chain: drives the delay-and-add chain with random products and compares
// y with a reference that keeps the history of products and evaluates
//     y(n) = sum_k p[k](n - (NTAPS-1-k))
// directly. Also checks that reset clears the chain (after reset only the newest tap's
// product shows), that an impulse on tap k appears exactly NTAPS-1-k clocks later, and
// that y follows the last tap in the same clock (zero latency).
module tb_transposed_chain;
  import fir_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  prod_t p [NTAPS];
  acc_t  y;
  int checks = 0, failures = 0;

  // hist[d][k] = product of tap k applied d clocks ago (d = 0 is the current one)
  prod_t hist [NTAPS][NTAPS];

  always #5 clk = ~clk;

  transposed_chain dut (.clk(clk), .rst(rst), .p(p), .y(y));

  function automatic acc_t model();
    acc_t s = '0;
    for (int k = 0; k < NTAPS; k++) s += acc_t'(hist[NTAPS-1-k][k]);
    return s;
  endfunction

  task automatic apply(prod_t v [NTAPS]);
    p = v;
    for (int k = 0; k < NTAPS; k++) hist[0][k] = v[k];
    #1;
    checks++;
    if (y !== model()) begin
      failures++;
      $display("FAIL t=%0t y=%0d expected %0d", $time, y, model());
    end
    @(posedge clk);
    #1;
    for (int d = NTAPS - 1; d > 0; d--) hist[d] = hist[d-1];
  endtask

  task automatic do_reset();
    rst = 1'b1;
    @(posedge clk);
    #1;
    rst = 1'b0;
    for (int d = 0; d < NTAPS; d++)
      for (int k = 0; k < NTAPS; k++) hist[d][k] = '0;
  endtask

  prod_t v [NTAPS];

  initial begin
    for (int k = 0; k < NTAPS; k++) p[k] = '0;
    do_reset();
    // impulse on each tap in turn: appears NTAPS-1-k clocks later
    for (int k = 0; k < NTAPS; k++) begin
      for (int j = 0; j < NTAPS; j++) v[j] = (j == k) ? prod_t'(100 + k) : '0;
      apply(v);
      for (int j = 0; j < NTAPS; j++) v[j] = '0;
      for (int d = 0; d < NTAPS; d++) apply(v);
    end
    // random products, with occasional resets
    for (int n = 0; n < 2000; n++) begin
      if (n % 500 == 250) do_reset();
      for (int j = 0; j < NTAPS; j++) v[j] = prod_t'($urandom_range(0, 4000)) - prod_t'(2000);
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
