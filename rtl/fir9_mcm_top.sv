// fir9_mcm_top: 9-tap transposed-form FIR filter with a multiplierless MCM coefficient block
// and a choice of low-pass or high-pass coefficients.
//
// Each clock one 8-bit sample X enters. The MCM (multiple constant multiplication) block
// forms all nine products h(k) * X with shifts and adders and no multiplier. The transposed
// delay-and-add chain then combines them into the 16-bit output OUT:
//     OUT(n) = sum_{k=0..8} h(k) * X(n - 8 + k)
// (h(0) enters the first delay register and h(8) weights the newest sample, as in the
// filter's block diagram).
//
// The filter is reconfigured by changing only the coefficient module. On an FPGA the
// low-pass and high-pass coefficient modules are loaded into one reconfigurable region by
// dynamic partial reconfiguration while the delay chain keeps running. That bitstream
// mechanism is outside RTL. Here both coefficient modules are built, and input L picks the
// one whose products feed the chain: L = 1 low-pass, L = 0 high-pass, matching the
// filter's published traces. A switch takes effect on the next sample's products. Partial
// sums already in the chain keep the products of the set in force when they were made, so
// for 8 clocks after a switch OUT mixes the two sets, as a swapped coefficient module would.
//
// Interface: CLK; RST synchronous, active high, clears the delay registers; L selects the
// coefficient set; X signed two's complement sample; OUT signed output.
// Timing: no pipeline latency. OUT responds to X in the same clock through the h(8) term
// and settles to (sum of h) * X after 8 clocks of constant input: with X = 8 it reads 1480
// for the low-pass set and 1496 for the high-pass set.
// Port names and widths (CLK, RST, L, X[7:0], OUT[15:0]) follow the published traces;
// signed samples and the synchronous reset are this design's choices.
//
// Beside the filter, and not connected to it, sits the standalone 29x / 43x shift-add
// example (mcm_29x_43x) with its own ports EX_X, EX_Y29 and EX_Y43, so that the worked
// example is part of the same build. It is combinational and independent of CLK and RST.
module fir9_mcm_top
  import fir_pkg::*;
#(
  parameter coef_set_t LPF_SET = LPF_COEFS,   // coefficient module selected by L = 1
  parameter coef_set_t HPF_SET = HPF_COEFS    // coefficient module selected by L = 0
) (
  input  logic    CLK,
  input  logic    RST,
  input  logic    L,
  input  sample_t X,
  output acc_t    OUT,
  // standalone shift-add example, not part of the filter datapath
  input  sample_t               EX_X,
  output logic signed [X_W+5:0] EX_Y29,
  output logic signed [X_W+5:0] EX_Y43
);

  // No product or partial sum may exceed Y_W signed bits: |X| <= 2^(X_W-1).
  if (coef_sum(LPF_SET) * (2 ** (X_W - 1)) >= 2 ** (Y_W - 1) ||
      coef_sum(HPF_SET) * (2 ** (X_W - 1)) >= 2 ** (Y_W - 1)) begin : g_range_error
    $error("fir9_mcm_top: coefficient sum too large for a %0d-bit output", Y_W);
  end

  prod_t lpf_prod [NTAPS];
  prod_t hpf_prod [NTAPS];
  prod_t sel_prod [NTAPS];

  mcm_block #(.COEFS(LPF_SET)) u_mcm_lpf (.x(X), .prod(lpf_prod));
  mcm_block #(.COEFS(HPF_SET)) u_mcm_hpf (.x(X), .prod(hpf_prod));

  always_comb begin
    for (int k = 0; k < NTAPS; k++) sel_prod[k] = L ? lpf_prod[k] : hpf_prod[k];
  end

  transposed_chain u_chain (
    .clk (CLK),
    .rst (RST),
    .p   (sel_prod),
    .y   (OUT)
  );

  mcm_29x_43x #(.W(X_W)) u_example (.x(EX_X), .y29(EX_Y29), .y43(EX_Y43));

endmodule
