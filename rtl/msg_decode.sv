// msg_decode: turns the decrypted noisy polynomial m~ back into message bits.
//
// After decryption, coefficient i of m~ is  noise_i + m_i*(-q/2), where the
// noise e2*r2 + r1*e1 + e3 has, for binary polynomials with independent
// uniform bits, the mean i - (n-3)/2 (the anti-circular wrap makes low
// coefficients lean negative and high ones positive). The decoder subtracts
// that centre, rounded to i - (n-2)/2, reads the difference as a W-bit two's-
// complement number d_i, and outputs m_i = 1 when |d_i| > q/4 (the value sits
// near -q/2) and m_i = 0 otherwise. Purely combinational.
//
// The centre term and the q/4 threshold follow the published decode rule;
// which side of the threshold means 1 is taken from the encode rule
// m_i -> m_i*(-q/2), since a coefficient carrying a one lies about q/2 away
// from the centre.
module msg_decode
  import rlwe_pkg::*;
#(
  parameter int unsigned N = RLWE_N,
  parameter int unsigned W = RLWE_W
) (
  input  logic [N-1:0][W-1:0] m_tilde,
  output logic [N-1:0]        m
);

  localparam int CENTRE_OFS = (int'(N) - 2) / 2;  // round((n-3)/2)
  localparam logic signed [W-1:0] QUARTER = W'(1 << (W - 2));

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic signed [W-1:0] d;
      d    = signed'(m_tilde[i] - W'(i) + W'(CENTRE_OFS));
      m[i] = (d > QUARTER) || (d < -QUARTER);
    end
  end

endmodule
