// mcm_block: multiple constant multiplication (MCM) block of the 9-tap FIR filter.
//
// One input sample x is multiplied by all NTAPS constant coefficients at once, using shifts
// and adders only, with no multiplier. It is the filter's coefficient module: the low-pass
// and the high-pass filters are two instances of this block with different COEFS.
//
// How it works. Each coefficient c is written as c = f << s, with f odd (the fundamental);
// the shift s is wiring. Each distinct fundamental is built once, with as few adders as
// this simple search finds, and partial products are shared between coefficients:
//   - f = 1 (c a power of two): no adder, the product is x shifted.
//   - f equal to the fundamental of an earlier tap: no adder, that tap's result is reused
//     and shifted (in the high-pass set 6x is 3x << 1).
//   - f = g + (h << t) with g, h each x or the fundamental of an earlier tap: one adder.
//     This is how the example chain 5x -> 13x -> 29x reuses its partial sums; in the
//     high-pass set 35x = 3x + (x << 5), 27x = 3x + (3x << 3), 41x = 9x + (x << 5).
//   - otherwise: the binary method, one shifted copy of x added per 1 bit of f, chained.
// The high-pass set 3, 4, 6, 18, 20, 33, 35, 27, 41 then needs 7 adders (localparam
// ADDERS). The binary decomposition, the reuse of partial products and the aim of a
// minimum number of adders follow the filter's description. The search itself (taps in
// index order, one adder per fundamental, additions only, no signed digits) is this
// design's choice and does not guarantee the true minimum.
//
// Interface: x is a signed sample; prod[k] = x * COEFS[k], signed, P_W bits, exact.
// Timing: purely combinational, no clock.
module mcm_block
  import fir_pkg::*;
#(
  parameter coef_set_t COEFS = HPF_COEFS
) (
  input  sample_t x,
  output prod_t   prod [NTAPS]
);

  // Number of adders this coefficient set is built with.
  localparam int unsigned ADDERS = mcm_adders(COEFS);

  // src[j] = F(j) * x for tap j; src[NTAPS] = x itself.
  prod_t src [NTAPS+1];

  assign src[NTAPS] = prod_t'(x);

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    localparam coef_t       C     = COEFS[k];
    localparam int unsigned SH    = trailing_zeros(C);
    localparam coef_t       F     = odd_part(C);
    localparam int unsigned OWNER = fundamental_owner(COEFS, k);
    localparam recipe_t     R     = find_recipe(COEFS, k);
    localparam int unsigned RA    = int'(R.a);
    localparam int unsigned RB    = int'(R.b);
    localparam int unsigned RT    = int'(R.t);

    prod_t fund;   // F * x

    if (C == '0) begin : g_zero
      assign fund = '0;
    end else if (F == 1) begin : g_pow2
      assign fund = prod_t'(x);
    end else if (OWNER != k) begin : g_share
      assign fund = src[OWNER];
    end else if (R.found) begin : g_reuse
      // one adder from earlier partial products
      assign fund = src[RA] + (src[RB] <<< RT);
    end else begin : g_chain
      // binary shift-add chain over the 1 bits of the fundamental
      prod_t chain;
      always_comb begin
        chain = '0;
        for (int b = 0; b < H_W; b++)
          if (F[b]) chain = chain + (prod_t'(x) <<< b);
      end
      assign fund = chain;
    end

    assign src[k]  = fund;
    assign prod[k] = fund <<< SH;
  end

endmodule
