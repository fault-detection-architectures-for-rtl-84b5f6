// enc_fd: InvRBLWE encryption with fault detection.
//
// Produces the ciphertext pair
//     c1 = a*e1 + e2
//     c2 = p*e1 + e3 + encode(m),   encode(m)_i = m_i * (-q/2)
// with two protected multiply-accumulate units that run in parallel and share
// the binary polynomial e1. With q = 2^W the encoded message coefficient is
// the pattern 100..0 when m_i = 1, and e3_i only touches bit 0, so the addend
// e3 + encode(m) is formed by wiring rather than an adder. Each unit repeats
// its computation in encoded form (RENO by default, RESO with SCHEME =
// FD_RESO); `fault_c1` and `fault_c2` flag a mismatch in either output.
//
// Interface: pulse `start` with the inputs held until `done`, which pulses
// 2N+8 cycles later; outputs are valid until the next start.
//
// The two equations and the encode rule follow the published encryption
// stage; running the c1 and c2 units in parallel on a shared e1 and forming
// e3 + encode(m) by wiring are this design's choices.
module enc_fd
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
  input  logic [N-1:0][W-1:0] p,
  input  logic [N-1:0]        m,
  input  logic [N-1:0]        e1,
  input  logic [N-1:0]        e2,
  input  logic [N-1:0]        e3,
  output logic                busy,
  output logic                done,
  output logic [N-1:0][W-1:0] c1,
  output logic [N-1:0][W-1:0] c2,
  output logic                fault_c1,
  output logic                fault_c2,
  output logic                fault
);

  logic [N-1:0][W-1:0] e2_ext, e3m;
  logic busy1, busy2, done1, done2;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      e2_ext[i] = W'(e2[i]);
      e3m[i]    = {m[i], {(W-2){1'b0}}, e3[i]};
    end
  end

  fd_unit #(.N(N), .W(W), .SUB(1'b0), .SCHEME(SCHEME)) u_c1 (
    .clk, .rst_n, .start, .a, .b(e1), .c(e2_ext), .busy(busy1), .done(done1),
    .result(c1), .fault(fault_c1)
  );

  fd_unit #(.N(N), .W(W), .SUB(1'b0), .SCHEME(SCHEME)) u_c2 (
    .clk, .rst_n, .start, .a(p), .b(e1), .c(e3m), .busy(busy2), .done(done2),
    .result(c2), .fault(fault_c2)
  );

  // Both units run in lock step, so either one's status stands for both.
  assign busy  = busy1 | busy2;
  assign done  = done1 & done2;
  assign fault = fault_c1 | fault_c2;

endmodule
