// reno_unit: one polynomial multiply-accumulate, R = (+/-) A*b + C over
// Z_{2^W}[x]/(x^n+1), protected by recomputing with negated operands (RENO).
//
// The normal run computes R directly. The recomputed run negates both
// multiplication operands, A' = -A and b' = -b, so the product
// A'*b' = A*b is unchanged and no decoding is needed: the two W-bit results
// must be equal. Coefficients are already two's complement, so -A is the
// complement-and-increment of A, and the negative binary operand is handled
// by flipping the sign control of the cells' term (a bit of b' is 0 or -1,
// and a bit stretched to W bits of ones already is -1). The two runs take
// different paths through the term logic and the adders see different
// operand bit patterns, which exposes stuck or flipped lines on the operand
// and term paths. A triplicated comparator with a majority voter compares the
// results and sets `fault`. Limits that follow from the algebra: the terms,
// and so the partial sums in the accumulators, are numerically the same in
// both runs, and the addend C is not negated, so faults there hit both runs
// alike; and 0 and -q/2 are their own negatives, so a stuck sign bit on such
// a coefficient escapes too.
//
// Interface and timing are those of reso_unit: pulse `start` with A, b, C
// held stable; `done` pulses 2N+8 cycles later; `result` (normal run) and
// `fault` are valid until the next start. SUB = 1 selects R = C - A*b.
//
// Negating both operands and comparing without decoding follows the
// published RENO scheme; the way the negated binary operand is realised (a
// flipped sign control rather than a stored -b) is this design's choice.
module reno_unit #(
  parameter int unsigned N   = 256,
  parameter int unsigned W   = 8,
  parameter bit          SUB = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0][W-1:0] a,
  input  logic [N-1:0]        b,
  input  logic [N-1:0][W-1:0] c,
  output logic                busy,
  output logic                done,
  output logic [N-1:0][W-1:0] result,
  output logic                fault
);

  logic run, load, shift, step, s1, cap_norm, cmp;
  logic b_bit;
  logic [N-1:0][W-1:0] a_sel, res;
  logic                mismatch;

  fd_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .run, .load, .shift, .step, .s1,
    .cap_norm, .cmp
  );

  bit_shift_reg #(.N(N)) u_bits (
    .clk, .rst_n, .load, .shift, .din(b), .bit_out(b_bit)
  );

  // Operand multiplexer: A in the normal run, A' = -A in the recomputed run.
  always_comb begin
    for (int i = 0; i < N; i++) a_sel[i] = run ? (~a[i] + W'(1)) : a[i];
  end

  // b' = -b flips the sign of the product term.
  polymac_core #(.N(N), .W(W)) u_core (
    .clk, .rst_n, .clr(load), .step, .s1, .b_bit, .neg(SUB ^ run),
    .a(a_sel), .c, .res
  );

  tmr_comparator #(.WD(N*W)) u_cmp (
    .x(result), .y(res), .force_replica(3'b000),
    .replica_mismatch(), .mismatch
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      result <= '0;
      fault  <= 1'b0;
    end else begin
      if (start && !busy) fault <= 1'b0;
      if (cap_norm) result <= res;
      if (cmp)      fault  <= mismatch;
    end
  end

endmodule
