// fir_pkg: widths, types and coefficient sets shared by the 9-tap MCM FIR filter.
//
// The filter takes an 8-bit sample X and produces a 16-bit result OUT every clock, with
// nine 8-bit constant coefficients per filter. Those sizes follow the filter's published
// simulation traces (X[7:0], OUT[15:0], H0..H8 as 8-bit values).
//
// Two coefficient sets exist, one per reconfigurable coefficient module:
//   HPF_COEFS = 3, 4, 6, 18, 20, 33, 35, 27, 41 for h(0)..h(8). These are the nine 8-bit
//               coefficient values shown with the reference traces. With a constant input of
//               8 the filter settles at 8 * 187 = 1496, the value the high-pass trace shows.
//   LPF_COEFS = 3, 10, 22, 34, 47, 34, 22, 10, 3. The low-pass values were never published;
//               only the settled output 1480 for X = 8 is known, that is, a coefficient sum
//               of 185. This symmetric, centre-peaked set with that sum is this design's own
//               choice. Replace it with the intended low-pass set if one is at hand.
// Samples are signed two's complement and coefficients are unsigned constants (this
// design's choice). For any coefficient set whose sum is at most 255, every product and
// every partial sum fits in 16 signed bits.
package fir_pkg;

  localparam int unsigned NTAPS = 9;   // filter taps h(0)..h(8)
  localparam int unsigned X_W   = 8;   // input sample width
  localparam int unsigned H_W   = 8;   // coefficient width
  localparam int unsigned Y_W   = 16;  // output and partial-sum width
  localparam int unsigned P_W   = X_W + H_W;  // width of one constant product

  typedef logic signed [X_W-1:0] sample_t;
  typedef logic signed [Y_W-1:0] acc_t;
  typedef logic signed [P_W-1:0] prod_t;
  typedef logic        [H_W-1:0] coef_t;
  typedef coef_t [NTAPS-1:0] coef_set_t;   // element k holds h(k)

  localparam coef_set_t HPF_COEFS = {
    8'd41, 8'd27, 8'd35, 8'd33, 8'd20, 8'd18, 8'd6, 8'd4, 8'd3
  };
  localparam coef_set_t LPF_COEFS = {
    8'd3, 8'd10, 8'd22, 8'd34, 8'd47, 8'd34, 8'd22, 8'd10, 8'd3
  };

  // Sum of a coefficient set, used for range checks.
  function automatic int unsigned coef_sum(coef_set_t c);
    int unsigned s = 0;
    for (int k = 0; k < NTAPS; k++) s += int'(c[k]);
    return s;
  endfunction

  // Number of trailing zero bits of a coefficient (0 for a zero coefficient).
  function automatic int unsigned trailing_zeros(coef_t c);
    int unsigned n = 0;
    if (c == '0) return 0;
    while (c[n] == 1'b0) n++;
    return n;
  endfunction

  // Odd part of a coefficient, the "fundamental" that an adder tree has to build.
  function automatic coef_t odd_part(coef_t c);
    return c >> trailing_zeros(c);
  endfunction

  // Index of the first tap whose coefficient has the same odd part as tap k.
  // Equal to k when tap k is the first to need that fundamental.
  function automatic int unsigned fundamental_owner(coef_set_t c, int unsigned k);
    for (int unsigned j = 0; j < k; j++)
      if (c[j] != '0 && odd_part(c[j]) == odd_part(c[k])) return j;
    return k;
  endfunction

  // One-adder recipe for a fundamental: f = F(a) + (F(b) << t), where F(j) is the odd
  // part of tap j's coefficient and index NTAPS stands for x itself (F = 1).
  typedef struct packed {
    logic        found;
    logic [7:0]  a;
    logic [7:0]  b;
    logic [7:0]  t;
  } recipe_t;

  function automatic int unsigned fund_of(coef_set_t c, int unsigned j);
    return (j == NTAPS) ? 1 : int'(odd_part(c[j]));
  endfunction

  // Looks for a recipe for tap k's fundamental among x and the fundamentals of taps 0..k-1.
  function automatic recipe_t find_recipe(coef_set_t c, int unsigned k);
    recipe_t r = '0;
    int unsigned f = int'(odd_part(c[k]));
    for (int unsigned a = 0; a <= NTAPS; a++) begin
      if (a == NTAPS || (a < k && c[a] != '0)) begin
        for (int unsigned b = 0; b <= NTAPS; b++) begin
          if (b == NTAPS || (b < k && c[b] != '0)) begin
            for (int unsigned t = 1; t < H_W; t++) begin
              if (!r.found && fund_of(c, a) + (fund_of(c, b) << t) == f) begin
                r.found = 1'b1;
                r.a = 8'(a);
                r.b = 8'(b);
                r.t = 8'(t);
              end
            end
          end
        end
      end
    end
    return r;
  endfunction

  // Number of ones in a coefficient.
  function automatic int unsigned ones(coef_t c);
    int unsigned n = 0;
    for (int b = 0; b < H_W; b++) n += int'(c[b]);
    return n;
  endfunction

  // Adders an mcm_block with coefficient set c builds: one per fundamental that has a
  // recipe, popcount - 1 per fundamental built by a plain binary chain, none otherwise.
  function automatic int unsigned mcm_adders(coef_set_t c);
    int unsigned n = 0;
    for (int unsigned k = 0; k < NTAPS; k++) begin
      if (c[k] != '0 && fundamental_owner(c, k) == k && odd_part(c[k]) != 1) begin
        if (find_recipe(c, k).found) n += 1;
        else n += ones(c[k]) - 1;
      end
    end
    return n;
  endfunction

endpackage
