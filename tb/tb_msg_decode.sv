// tb_msg_decode: builds noisy coefficients centre_i + noise + m_i*(-q/2),
// with noise well inside +/-q/4, and checks that the message is recovered;
// then checks the threshold on both sides against the reference decoder.
module tb_msg_decode;
  import rlwe_ref_pkg::*;
  localparam int N = 64;
  localparam int W = 8;
  logic [N-1:0][W-1:0] m_tilde;
  logic [N-1:0]        m;
  int checks = 0, failures = 0;

  msg_decode #(.N(N), .W(W)) dut (.m_tilde, .m);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bpoly_t msg, exp;
    poly_t  mt;
    for (int t = 0; t < 50; t++) begin
      msg = rand_bpoly(N);
      mt  = new[N];
      for (int i = 0; i < N; i++) begin
        int centre, noise;
        centre = i - (N - 2) / 2;
        noise  = int'($urandom % 101) - 50;       // |noise| <= 50 < q/4
        if (t >= 25) noise = int'($urandom % 256); // anything: compare with the reference
        mt[i] = modw(longint'(centre + noise - (msg[i] ? 128 : 0)), W);
        m_tilde[i] = W'(mt[i]);
      end
      #1;
      exp = decode(N, W, mt);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (m[i] !== exp[i] || (t < 25 && m[i] !== msg[i])) begin
          failures++;
          $display("FAIL t=%0d i=%0d m~=%0d got %0b ref %0b msg %0b", t, i, mt[i], m[i], exp[i], msg[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
