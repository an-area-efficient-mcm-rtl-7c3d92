// transposed_chain: delay-and-add chain of the transposed-form 9-tap FIR filter.
//
// In the transposed form every tap's product of the current sample is added to a partial
// sum that has been delayed by one clock, so the register-to-register path holds a single
// adder whatever the number of taps. The order follows the filter's block diagram: h(0)'s
// product enters the first D register, each following tap adds its product to the delayed
// sum, and h(8)'s product is added last, without a register, to form y(n):
//
//     r[0](n+1) = p[0](n)
//     r[k](n+1) = r[k-1](n) + p[k](n)          k = 1 .. NTAPS-2
//     y(n)      = r[NTAPS-2](n) + p[NTAPS-1](n)
//
// so y(n) = sum_k p[k](n - (NTAPS-1-k)). With p[k] = h(k) * x this is
// y(n) = sum_k h(k) x(n - 8 + k), where h(8) weights the newest sample.
//
// Interface: p holds the NTAPS products of the current sample; y is the filter output.
// Timing: y depends combinationally on p[NTAPS-1] (zero-latency path through one adder);
// the other taps reach y through 1..NTAPS-1 registers. rst is synchronous and active high
// and clears the NTAPS-1 partial-sum registers (reset style is this design's choice).
// Partial sums wrap at Y_W bits; with the package's coefficient sets they never overflow.
module transposed_chain
  import fir_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  prod_t p [NTAPS],
  output acc_t  y
);

  acc_t r [NTAPS-1];  // partial sums held in the D registers

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS - 1; k++) r[k] <= '0;
    end else begin
      r[0] <= acc_t'(p[0]);
      for (int k = 1; k < NTAPS - 1; k++) r[k] <= r[k-1] + acc_t'(p[k]);
    end
  end

  assign y = r[NTAPS-2] + acc_t'(p[NTAPS-1]);

endmodule
