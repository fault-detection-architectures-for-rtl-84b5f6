// tb_rlwe_fd_top_full: the top at its default size (n = 256, q = 256, RENO)
// taken through one complete key generation, encryption and decryption. All
// results are compared with the reference model, the decrypted message with
// the original, and each operation must take 2N+8 = 520 cycles with no fault
// flagged. A last decryption with one stuck operand line must be flagged.
module tb_rlwe_fd_top_full;
  import rlwe_pkg::*;
  import rlwe_ref_pkg::*;
  localparam int N = RLWE_N;
  localparam int W = RLWE_W;

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] op = 2'd0;
  logic [N-1:0][W-1:0] a, c1_in, c2_in, pk_p, c1, c2, m_tilde;
  logic [N-1:0]        r1, r2, m, e1, e2, e3, m_out;
  logic busy, done, fault_gen, fault_enc, fault_dec, fault;

  rlwe_fd_top dut (
    .clk, .rst_n, .start, .op, .a, .r1, .r2, .m, .e1, .e2, .e3, .c1_in, .c2_in,
    .busy, .done, .pk_p, .c1, .c2, .m_tilde, .m_out,
    .fault_gen, .fault_enc, .fault_dec, .fault);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit good, input string what);
    checks++;
    if (!good) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit same(input logic [N-1:0][W-1:0] x, input poly_t y);
    for (int i = 0; i < N; i++) if (int'(x[i]) != y[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic command(input logic [1:0] o);
    int cyc;
    @(negedge clk); op = o; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 4 * N) begin @(negedge clk); cyc++; end
    chk(cyc == 2 * N + 8, $sformatf("op %0d latency %0d", o, cyc));
  endtask

  initial begin
    poly_t  ra, rp, rc1, rc2, rmt;
    bpoly_t rr1, rr2, rm, re1, re2, re3;
    int     bad_bits;
    ra = rand_poly(N, W);
    rr1 = rand_bpoly(N); rr2 = rand_bpoly(N); rm = rand_bpoly(N);
    re1 = rand_bpoly(N); re2 = rand_bpoly(N); re3 = rand_bpoly(N);
    rp  = mac(N, W, ra, rr2, bin_to_poly(N, rr1), 1'b1);
    rc1 = mac(N, W, ra, re1, bin_to_poly(N, re2), 1'b0);
    rc2 = mac(N, W, rp, re1, enc_add(N, W, rm, re3), 1'b0);
    rmt = mac(N, W, rc1, rr2, rc2, 1'b0);
    for (int i = 0; i < N; i++) begin
      a[i] = W'(ra[i]); r1[i] = rr1[i]; r2[i] = rr2[i]; m[i] = rm[i];
      e1[i] = re1[i]; e2[i] = re2[i]; e3[i] = re3[i];
      c1_in[i] = '0; c2_in[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;

    command(OP_GEN);
    chk(same(pk_p, rp), "public key p = r1 - a*r2");
    chk(!fault_gen, "no fault in key generation");

    command(OP_ENC);
    chk(same(c1, rc1), "c1 = a*e1 + e2");
    chk(same(c2, rc2), "c2 = p*e1 + e3 + encode(m)");
    chk(!fault_enc, "no fault in encryption");

    c1_in = c1; c2_in = c2;
    command(OP_DEC);
    chk(same(m_tilde, rmt), "m~ = c1*r2 + c2");
    bad_bits = 0;
    for (int i = 0; i < N; i++) if (m_out[i] != rm[i]) bad_bits++;
    chk(bad_bits == 0, $sformatf("message recovered (%0d bits wrong)", bad_bits));
    chk(!fault && !fault_dec, "no fault anywhere");

    force dut.u_dec.u_unit.g_reno.u_unit.a_sel[100][3] = ~c1[100][3];
    command(OP_DEC);
    release dut.u_dec.u_unit.g_reno.u_unit.a_sel[100][3];
    chk(fault_dec && fault, "stuck operand line flagged in decryption");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
