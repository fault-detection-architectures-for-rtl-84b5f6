// keygen_fd: InvRBLWE key generation with fault detection.
//
// Computes the public-key polynomial p = r1 - a*r2 in Z_q[x]/(x^n+1) from the
// public polynomial a and the binary error polynomials r1, r2 (r2 is the
// secret key). r2 is fed bit by bit into the multiplier, whose cells form
// -(a*r2) with the complement-and-increment term; r1 is widened to W-bit
// coefficients (0 or 1) and added in the final S1 = 1 cycle. The whole
// computation is repeated in encoded form (RENO by default, RESO when
// SCHEME = FD_RESO) and compared; `fault` is set on a mismatch.
//
// Interface: pulse `start` with the inputs held until `done`, which pulses
// 2N+8 cycles later; `p` and `fault` are then valid until the next start.
//
// The equation, the negated product through complement-and-increment and the
// widening of r1 follow the published key-generation datapath; sharing one
// generic protected unit with the other stages is this design's choice.
module keygen_fd
  import rlwe_pkg::*;
#(
  parameter int unsigned N      = RLWE_N,
  parameter int unsigned W      = RLWE_W,
  parameter fd_scheme_e  SCHEME = FD_RENO
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0][W-1:0] a,
  input  logic [N-1:0]        r1,
  input  logic [N-1:0]        r2,
  output logic                busy,
  output logic                done,
  output logic [N-1:0][W-1:0] p,
  output logic                fault
);

  logic [N-1:0][W-1:0] r1_ext;

  always_comb begin
    for (int i = 0; i < N; i++) r1_ext[i] = W'(r1[i]);
  end

  fd_unit #(.N(N), .W(W), .SUB(1'b1), .SCHEME(SCHEME)) u_unit (
    .clk, .rst_n, .start, .a, .b(r2), .c(r1_ext), .busy, .done,
    .result(p), .fault
  );

endmodule
