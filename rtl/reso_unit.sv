// reso_unit: one polynomial multiply-accumulate, R = (+/-) A*b + C over
// Z_{2^W}[x]/(x^n+1), protected by recomputing with shifted operands (RESO).
//
// The core is one bit wider than a coefficient (W+1 bits). The normal run
// computes R on sign-extended operands and keeps the low W bits of every
// accumulator, which are R mod 2^W. The recomputed run feeds 2A and 2C (each
// operand shifted left one place) and so produces 2R mod 2^(W+1); decoding
// drops the least significant bit, leaving bits W..1, which again equal
// R mod 2^W. The binary polynomial b is not shifted: doubling A already
// doubles the product. A triplicated comparator with a majority voter
// compares the two W-bit results; any difference sets `fault`. A stuck or
// flipped line in the core hits different bits of the result in the two
// runs, which is what exposes it.
//
// Interface: pulse `start` with A, b, C held stable until `done`. `done`
// pulses 2N+8 cycles after start (see fd_ctrl); `result` (the normal-run
// value) and `fault` are valid from then until the next start. SUB = 1
// selects R = C - A*b (key generation), SUB = 0 selects R = A*b + C.
//
// The shift encode/decode and the W+1-bit datapath follow the published RESO
// scheme; the control timing and ports are this design's choices.
module reso_unit #(
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

  localparam int unsigned WC = W + 1;

  logic run, load, shift, step, s1, cap_norm, cmp;
  logic b_bit;
  logic [N-1:0][WC-1:0] a_enc, c_enc, res;
  logic [N-1:0][W-1:0]  decoded;
  logic                 mismatch;

  fd_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .run, .load, .shift, .step, .s1,
    .cap_norm, .cmp
  );

  bit_shift_reg #(.N(N)) u_bits (
    .clk, .rst_n, .load, .shift, .din(b), .bit_out(b_bit)
  );

  // Encoding: sign-extend for the normal run, shift left for the recomputed run.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      a_enc[i] = run ? {a[i], 1'b0} : {a[i][W-1], a[i]};
      c_enc[i] = run ? {c[i], 1'b0} : {c[i][W-1], c[i]};
    end
  end

  polymac_core #(.N(N), .W(WC)) u_core (
    .clk, .rst_n, .clr(load), .step, .s1, .b_bit, .neg(SUB),
    .a(a_enc), .c(c_enc), .res
  );

  // Decoding: drop the least significant bit of the recomputed result.
  always_comb begin
    for (int i = 0; i < N; i++) decoded[i] = res[i][WC-1:1];
  end

  tmr_comparator #(.WD(N*W)) u_cmp (
    .x(result), .y(decoded), .force_replica(3'b000),
    .replica_mismatch(), .mismatch
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      result <= '0;
      fault  <= 1'b0;
    end else begin
      if (start && !busy) fault <= 1'b0;
      if (cap_norm)
        for (int i = 0; i < N; i++) result[i] <= res[i][W-1:0];
      if (cmp) fault <= mismatch;
    end
  end

endmodule
