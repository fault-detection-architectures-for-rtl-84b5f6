// polymac_core: n parallel shift-and-add cells that compute
//     R = (+/-) A * b + C      in Z_{2^W}[x] / (x^n + 1)
// where A and C are polynomials with W-bit coefficients and b is a binary
// polynomial fed one coefficient per cycle, highest degree first.
//
// How it works. Each cell i owns one accumulator Res[i]. A multiply step
// (s1 = 0) evaluates one Horner step R <- x*R + b_j*A: every cell adds the
// accumulator of the cell below it, and cell 0 adds the negative of
// Res[n-1], which is the anti-circular rotation caused by x^n = -1. The term
// a cell adds is its A coefficient masked by the current bit of b (the bit
// stretched to W bits), complemented and incremented by one when `neg` is
// set, so that the mask-complement-increment chain forms -(a*b). After n
// multiply steps one add step (s1 = 1) adds C to every cell without rotating.
//
// The term (mask, complement, +1 and the S1 multiplexer) is computed in a
// first stage and registered; the rotating accumulation is the second stage.
// This sub-pipeline register cuts the cell's combinational path roughly in
// half. Because the term path is feed-forward, the register only delays the
// result by one cycle: a result is complete one cycle after the last step.
//
// Interface: `clr` zeroes the accumulators and empties the pipeline; `step`
// with `s1` issues one step; `b_bit` and `neg` belong to that step. `res` is
// the accumulator array. Steps can be issued every cycle.
//
// The cell structure (NAND/+1 term, S1 multiplexer, rotation through the
// neighbouring register, negated Res[n-1] into cell 0) follows the published
// architecture. The sub-pipeline position and the generic `neg` input (the
// key-generation NAND is the neg = 1 case) are this design's choices.
module polymac_core #(
  parameter int unsigned N = 256,  // ring degree
  parameter int unsigned W = 8     // datapath width of a cell
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                step,
  input  logic                s1,     // 0: multiply step, 1: add C
  input  logic                b_bit,  // current coefficient of b
  input  logic                neg,    // negate the product term
  input  logic [N-1:0][W-1:0] a,
  input  logic [N-1:0][W-1:0] c,
  output logic [N-1:0][W-1:0] res
);

  // Stage 1: term formation.
  logic [N-1:0][W-1:0] term_d, term_q;
  logic                step_q, s1_q;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (s1) term_d[i] = c[i];
      else    term_d[i] = ((a[i] & {W{b_bit}}) ^ {W{neg}}) + W'(neg);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      step_q <= 1'b0;
      s1_q   <= 1'b0;
      term_q <= '0;
    end else begin
      step_q <= step;
      s1_q   <= s1;
      term_q <= term_d;
    end
  end

  // Stage 2: accumulate with anti-circular rotation.
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      res <= '0;
    end else if (step_q) begin
      for (int i = 0; i < N; i++) begin
        if (s1_q)       res[i] <= res[i] + term_q[i];
        else if (i == 0) res[0] <= term_q[0] - res[N-1];
        else            res[i] <= res[i-1] + term_q[i];
      end
    end
  end

endmodule
