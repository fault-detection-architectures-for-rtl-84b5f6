// rlwe_pkg: sizes, types and helper functions shared by the InvRBLWE
// fault-detection datapath.
//
// The ring is Z_q[x]/(x^n + 1) with q = 2^W, so every coefficient is a W-bit
// two's-complement number in [-q/2, q/2 - 1] and arithmetic wraps modulo q
// for free (no modular reduction). The default (n, q) = (256, 256) is the
// moderate-security parameter set; (512, 256) is the other one. Binary
// polynomials (r1, r2, e1, e2, e3, m) are plain n-bit vectors, bit i being
// the coefficient of x^i.
package rlwe_pkg;

  localparam int unsigned RLWE_N = 256;  // ring degree n
  localparam int unsigned RLWE_W = 8;    // log2 q, coefficient width

  // Which recomputation scheme guards a stage.
  typedef enum logic {
    FD_RESO = 1'b0,  // recomputing with shifted operands
    FD_RENO = 1'b1   // recomputing with negated operands
  } fd_scheme_e;

  // Operation selected at the top level.
  typedef enum logic [1:0] {
    OP_GEN = 2'd0,   // key generation
    OP_ENC = 2'd1,   // encryption
    OP_DEC = 2'd2    // decryption
  } rlwe_op_e;

endpackage
