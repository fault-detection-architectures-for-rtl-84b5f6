// dec_fd: InvRBLWE decryption with fault detection.
//
// Computes m~ = c1*r2 + c2 in Z_q[x]/(x^n+1) with the same protected
// multiply-accumulate structure as c1 in encryption (c1 as the W-bit
// multiplicand, the secret key r2 fed bit by bit, c2 added in the final
// cycle), repeated in encoded form (RENO by default, RESO with SCHEME =
// FD_RESO) and compared. msg_decode then turns m~ into the message bits.
//
// Interface: pulse `start` with the inputs held until `done`, which pulses
// 2N+8 cycles later; `m_tilde`, `m` and `fault` are valid until the next
// start.
//
// Reusing the c1 structure for decryption follows the published scheme; the
// decoder placement right after the protected unit is this design's choice.
module dec_fd
  import rlwe_pkg::*;
#(
  parameter int unsigned N      = RLWE_N,
  parameter int unsigned W      = RLWE_W,
  parameter fd_scheme_e  SCHEME = FD_RENO
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0][W-1:0] c1,
  input  logic [N-1:0][W-1:0] c2,
  input  logic [N-1:0]        r2,
  output logic                busy,
  output logic                done,
  output logic [N-1:0][W-1:0] m_tilde,
  output logic [N-1:0]        m,
  output logic                fault
);

  fd_unit #(.N(N), .W(W), .SUB(1'b0), .SCHEME(SCHEME)) u_unit (
    .clk, .rst_n, .start, .a(c1), .b(r2), .c(c2), .busy, .done,
    .result(m_tilde), .fault
  );

  msg_decode #(.N(N), .W(W)) u_decode (.m_tilde, .m);

endmodule
