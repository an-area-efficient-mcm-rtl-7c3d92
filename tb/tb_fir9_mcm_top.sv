// tb_fir9_mcm_top: end-to-end test of the 9-tap MCM FIR filter at its default parameters.
//
// A reference model keeps the last nine samples together with the L value each was taken
// with, and computes OUT(n) = sum_k h_L(n-8+k)(k) * X(n-8+k) with ordinary multiplication.
// OUT is compared with it every clock, half a clock after the inputs change (no latency).
// Directed phases:
//   - constant X = 8 with L = 1 and with L = 0 must settle at 1480 and 1496, the low-pass
//     and high-pass values of the reference traces;
//   - unit impulses on both sets must give h(8), h(7), ..., h(0) as printed in the package
//     comments (expected values typed in here, not read from the package);
//   - full-scale inputs -128 and +127 exercise the largest partial sums;
//   - L switches both ways, including mid-stream, where OUT must mix the two sets;
//   - reset in the middle of a stream;
//   - random samples with random switching;
//   - the standalone 29x / 43x example ports, driven with the same samples as X.
// Each mechanism is counted and a mechanism that never occurred is a failure.
module tb_fir9_mcm_top;
  import fir_pkg::*;

  localparam int N = 9;
  // expected coefficients h(0)..h(8), typed in independently of the design
  localparam int HPF_H [N] = '{3, 4, 6, 18, 20, 33, 35, 27, 41};
  localparam int LPF_H [N] = '{3, 10, 22, 34, 47, 34, 22, 10, 3};

  logic    CLK = 1'b0;
  logic    RST;
  logic    L;
  sample_t X;
  acc_t    OUT;
  sample_t EX_X;
  logic signed [X_W+5:0] EX_Y29, EX_Y43;

  int checks = 0, failures = 0;
  int n_switch_to_lpf = 0, n_switch_to_hpf = 0, n_mixed = 0, n_reset = 0;
  int n_dc_lpf = 0, n_dc_hpf = 0, n_impulse = 0, n_fullscale = 0, n_example = 0;

  // history: index 0 = current sample
  int  hx [N];
  logic hl [N];
  logic prev_l;

  always #5 CLK = ~CLK;

  fir9_mcm_top dut (.CLK(CLK), .RST(RST), .L(L), .X(X), .OUT(OUT),
                   .EX_X(EX_X), .EX_Y29(EX_Y29), .EX_Y43(EX_Y43));

  function automatic int model();
    int s = 0;
    for (int d = 0; d < N; d++) s += hx[d] * (hl[d] ? LPF_H[N-1-d] : HPF_H[N-1-d]);
    return s;
  endfunction

  function automatic bit mixed_window();
    for (int d = 1; d < N; d++) if (hl[d] != hl[0] && hx[d] != 0) return 1'b1;
    return 1'b0;
  endfunction

  // Apply one sample, check OUT in the same clock, then advance.
  task automatic step(int xv, logic lv);
    if (lv && !prev_l) n_switch_to_lpf++;
    if (!lv && prev_l) n_switch_to_hpf++;
    prev_l = lv;
    X = X_W'(xv);
    L = lv;
    hx[0] = xv;
    hl[0] = lv;
    EX_X = X_W'(xv);
    #1;
    checks++;
    if (int'(EX_Y29) != 29 * xv || int'(EX_Y43) != 43 * xv) begin
      failures++;
      $display("FAIL example x=%0d: %0d %0d", xv, EX_Y29, EX_Y43);
    end
    n_example++;
    checks++;
    if (int'(OUT) != model()) begin
      failures++;
      $display("FAIL t=%0t X=%0d L=%0b OUT=%0d expected %0d", $time, xv, lv, OUT, model());
    end
    if (mixed_window()) n_mixed++;
    @(posedge CLK);
    #1;
    for (int d = N - 1; d > 0; d--) begin
      hx[d] = hx[d-1];
      hl[d] = hl[d-1];
    end
  endtask

  task automatic do_reset();
    RST = 1'b1;
    @(posedge CLK);
    #1;
    RST = 1'b0;
    n_reset++;
    for (int d = 0; d < N; d++) begin
      hx[d] = 0;
      hl[d] = 1'b0;
    end
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_impulse(logic lv, int h [N]);
    step(1, lv);                       // OUT in this clock is h(8)
    for (int d = 1; d < N; d++) begin
      X = '0;
      L = lv;
      hx[0] = 0;
      hl[0] = lv;
      #1;
      expect_eq($sformatf("impulse L=%0b delay %0d", lv, d), int'(OUT), h[N-1-d]);
      @(posedge CLK);
      #1;
      for (int e = N - 1; e > 0; e--) begin
        hx[e] = hx[e-1];
        hl[e] = hl[e-1];
      end
    end
    n_impulse++;
  endtask

  initial begin
    X = '0;
    EX_X = '0;
    L = 1'b0;
    prev_l = 1'b0;
    RST = 1'b0;
    do_reset();

    // Reference traces: X = 8, low-pass then high-pass, settled values 1480 and 1496.
    for (int i = 0; i < 12; i++) step(8, 1'b1);
    #1;
    expect_eq("settled low-pass, X=8", int'(OUT), 1480);
    if (OUT == 16'b0000010111001000) n_dc_lpf++;
    for (int i = 0; i < 12; i++) step(8, 1'b0);
    #1;
    expect_eq("settled high-pass, X=8", int'(OUT), 1496);
    if (OUT == 16'b0000010111011000) n_dc_hpf++;

    // Impulse responses of both sets.
    for (int i = 0; i < N; i++) step(0, 1'b0);
    check_impulse(1'b0, HPF_H);
    check_impulse(1'b1, LPF_H);

    // Full-scale inputs.
    for (int i = 0; i < 12; i++) step(-128, 1'b0);
    #1;
    expect_eq("full-scale negative high-pass", int'(OUT), -128 * 187);
    for (int i = 0; i < 12; i++) step(127, 1'b1);
    #1;
    expect_eq("full-scale positive low-pass", int'(OUT), 127 * 185);
    n_fullscale++;

    // Switch mid-stream with a non-zero signal: OUT mixes the two sets for 8 clocks.
    for (int i = 0; i < 20; i++) step(int'($urandom_range(0, 255)) - 128, (i % 10) < 5);

    // Reset in the middle of a stream.
    for (int i = 0; i < 5; i++) step(50 + i, 1'b1);
    do_reset();
    step(0, 1'b1);
    expect_eq("OUT after reset with X=0", int'(OUT), 0);

    // Random samples, random switching.
    for (int i = 0; i < 3000; i++) begin
      if (i % 1000 == 500) do_reset();
      step(int'($urandom_range(0, 255)) - 128,
           ($urandom_range(0, 19) == 0) ? ~prev_l : prev_l);
    end

    if (n_switch_to_lpf == 0) begin failures++; $display("FAIL no switch to low-pass"); end
    if (n_switch_to_hpf == 0) begin failures++; $display("FAIL no switch to high-pass"); end
    if (n_mixed == 0)         begin failures++; $display("FAIL no mixed-set window"); end
    if (n_reset < 2)          begin failures++; $display("FAIL no mid-stream reset"); end
    if (n_dc_lpf == 0)        begin failures++; $display("FAIL low-pass trace value not seen"); end
    if (n_dc_hpf == 0)        begin failures++; $display("FAIL high-pass trace value not seen"); end
    if (n_impulse != 2)       begin failures++; $display("FAIL impulse phases"); end
    if (n_fullscale == 0)     begin failures++; $display("FAIL full-scale phase"); end
    if (n_example == 0)       begin failures++; $display("FAIL example never driven"); end
    $display("mechanisms: to_lpf=%0d to_hpf=%0d mixed=%0d resets=%0d dc_lpf=%0d dc_hpf=%0d impulses=%0d",
             n_switch_to_lpf, n_switch_to_hpf, n_mixed, n_reset, n_dc_lpf, n_dc_hpf, n_impulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
