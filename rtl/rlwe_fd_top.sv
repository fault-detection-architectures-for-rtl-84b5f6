// rlwe_fd_top: InvRBLWE (inverted binary ring-LWE) key generation,
// encryption and decryption, each guarded by recomputation on encoded
// operands.
//
// Three independent stage units hang off one command port:
//   OP_GEN  p = r1 - a*r2           (keygen_fd); p and the secret r2 are kept
//   OP_ENC  c1 = a*e1 + e2,
//           c2 = p*e1 + e3 + encode(m)  (enc_fd, using the kept p)
//   OP_DEC  m~ = c1_in*r2 + c2_in, m = decode(m~)  (dec_fd, using the kept r2)
// Each stage computes its result twice on the same datapath, the second time
// on encoded operands (negated with SCHEME = FD_RENO, the default; shifted
// with FD_RESO), and a triplicated comparator sets the stage's fault flag
// when the two disagree. `fault` is the OR of the three flags, which stay set
// until the same stage runs again.
//
// Interface: with `busy` low, pulse `start` with `op` and the stage's inputs,
// and hold the inputs until `done` pulses, 2N+8 cycles after start (N = 256:
// 520 cycles). Results stay on their ports until the same stage runs again.
// A start while busy, or with an unknown op, is ignored. Keeping the key pair
// between commands and the single command port are this design's choices;
// the stage datapaths follow the published architecture.
module rlwe_fd_top
  import rlwe_pkg::*;
#(
  parameter int unsigned N      = RLWE_N,
  parameter int unsigned W      = RLWE_W,
  parameter fd_scheme_e  SCHEME = FD_RENO
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [1:0]          op,
  input  logic [N-1:0][W-1:0] a,
  input  logic [N-1:0]        r1,
  input  logic [N-1:0]        r2,
  input  logic [N-1:0]        m,
  input  logic [N-1:0]        e1,
  input  logic [N-1:0]        e2,
  input  logic [N-1:0]        e3,
  input  logic [N-1:0][W-1:0] c1_in,
  input  logic [N-1:0][W-1:0] c2_in,
  output logic                busy,
  output logic                done,
  output logic [N-1:0][W-1:0] pk_p,
  output logic [N-1:0][W-1:0] c1,
  output logic [N-1:0][W-1:0] c2,
  output logic [N-1:0][W-1:0] m_tilde,
  output logic [N-1:0]        m_out,
  output logic                fault_gen,
  output logic                fault_enc,
  output logic                fault_dec,
  output logic                fault
);

  logic         go;
  logic         start_gen, start_enc, start_dec;
  logic         busy_gen, busy_enc, busy_dec;
  logic         done_gen, done_enc, done_dec;
  logic [N-1:0] sk;

  assign go        = start && !busy;
  assign start_gen = go && (op == OP_GEN);
  assign start_enc = go && (op == OP_ENC);
  assign start_dec = go && (op == OP_DEC);

  // Secret key register: r2 as used by the last key generation.
  always_ff @(posedge clk) begin
    if (!rst_n)         sk <= '0;
    else if (start_gen) sk <= r2;
  end

  keygen_fd #(.N(N), .W(W), .SCHEME(SCHEME)) u_gen (
    .clk, .rst_n, .start(start_gen), .a, .r1, .r2,
    .busy(busy_gen), .done(done_gen), .p(pk_p), .fault(fault_gen)
  );

  enc_fd #(.N(N), .W(W), .SCHEME(SCHEME)) u_enc (
    .clk, .rst_n, .start(start_enc), .a, .p(pk_p), .m, .e1, .e2, .e3,
    .busy(busy_enc), .done(done_enc), .c1, .c2,
    .fault_c1(), .fault_c2(), .fault(fault_enc)
  );

  dec_fd #(.N(N), .W(W), .SCHEME(SCHEME)) u_dec (
    .clk, .rst_n, .start(start_dec), .c1(c1_in), .c2(c2_in), .r2(sk),
    .busy(busy_dec), .done(done_dec), .m_tilde, .m(m_out), .fault(fault_dec)
  );

  assign busy  = busy_gen | busy_enc | busy_dec;
  assign done  = done_gen | done_enc | done_dec;
  assign fault = fault_gen | fault_enc | fault_dec;

endmodule
