// tb_rlwe_fd_top: end-to-end test of the whole design, one RENO and one RESO
// instance side by side (N reduced to 32 so that many operations fit).
// Each round generates a key pair, encrypts a random message with the kept
// public key, decrypts the ciphertext read back from the outputs and compares
// every intermediate polynomial with the reference and the decoded message
// with the original. It also exercises and counts: a start while busy (must
// be ignored), an unknown op (must be ignored), a stuck-at fault injected in
// each stage (must raise that stage's flag and `fault`), the flag clearing on
// the next run of that stage, and message bits decoding to both 0 and 1.
module tb_rlwe_fd_top;
  import rlwe_pkg::*;
  import rlwe_ref_pkg::*;
  localparam int N = 32;
  localparam int W = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] op = 2'd0;
  logic [N-1:0][W-1:0] a, c1_in, c2_in;
  logic [N-1:0]        r1, r2, m, e1, e2, e3;

  // Outputs, index 0: RENO, index 1: RESO.
  logic                busy[2], done[2], fg[2], fe[2], fd[2], f[2];
  logic [N-1:0][W-1:0] pk[2], c1[2], c2[2], mt[2];
  logic [N-1:0]        mo[2];

  rlwe_fd_top #(.N(N), .W(W), .SCHEME(FD_RENO)) dut_n (
    .clk, .rst_n, .start, .op, .a, .r1, .r2, .m, .e1, .e2, .e3, .c1_in, .c2_in,
    .busy(busy[0]), .done(done[0]), .pk_p(pk[0]), .c1(c1[0]), .c2(c2[0]),
    .m_tilde(mt[0]), .m_out(mo[0]), .fault_gen(fg[0]), .fault_enc(fe[0]),
    .fault_dec(fd[0]), .fault(f[0]));
  rlwe_fd_top #(.N(N), .W(W), .SCHEME(FD_RESO)) dut_s (
    .clk, .rst_n, .start, .op, .a, .r1, .r2, .m, .e1, .e2, .e3, .c1_in, .c2_in,
    .busy(busy[1]), .done(done[1]), .pk_p(pk[1]), .c1(c1[1]), .c2(c2[1]),
    .m_tilde(mt[1]), .m_out(mo[1]), .fault_gen(fg[1]), .fault_enc(fe[1]),
    .fault_dec(fd[1]), .fault(f[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_gen = 0, n_enc = 0, n_dec = 0, n_busy_ignored = 0, n_bad_op_ignored = 0;
  int n_det_gen = 0, n_det_enc = 0, n_det_dec = 0, n_clear = 0, n_ones = 0, n_zeros = 0;

  initial begin
    #20000000;
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

  function automatic bit msg_same(input logic [N-1:0] x, input bpoly_t y);
    for (int i = 0; i < N; i++) if (x[i] != y[i]) return 1'b0;
    return 1'b1;
  endfunction

  // Issue one command and wait for done; optionally pulse start again mid-way.
  task automatic command(input logic [1:0] o, input bit poke_busy, output int cyc);
    @(negedge clk); op = o; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done[0] && cyc < 10 * N) begin
      if (poke_busy && cyc == N) begin
        op = OP_GEN; start = 1;          // must be ignored
        @(negedge clk); start = 0; cyc++;
        n_busy_ignored++;
        continue;
      end
      @(negedge clk); cyc++;
    end
    chk(cyc == 2 * N + 8, $sformatf("latency %0d", cyc));
    chk(done[1], "RESO instance in step");
  endtask

  initial begin
    poly_t  ra, rp, rc1, rc2, rmt;
    bpoly_t rr1, rr2, rm, re1, re2, re3;
    int     cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // An unknown op does nothing.
    op = 2'd3; start = 1;
    @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    chk(!busy[0] && !busy[1], "unknown op ignored");
    n_bad_op_ignored++;

    for (int round = 0; round < 8; round++) begin
      int inject;
      inject = round % 4;   // 0: none, 1: gen, 2: enc, 3: dec
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
      end

      // Key generation.
      if (inject == 1) begin
        force dut_n.u_gen.u_unit.g_reno.u_unit.a_sel[3][2] = ~ra[3][2];
        force dut_s.u_gen.u_unit.g_reso.u_unit.a_enc[3][2] = ~ra[3][2];
      end
      command(OP_GEN, round == 2, cyc);
      n_gen++;
      release dut_n.u_gen.u_unit.g_reno.u_unit.a_sel[3][2];
      release dut_s.u_gen.u_unit.g_reso.u_unit.a_enc[3][2];
      for (int s = 0; s < 2; s++) begin
        if (inject == 1) begin
          chk(same(pk[s], rp) || (fg[s] && f[s]), $sformatf("scheme %0d corrupted key not flagged", s));
          if (fg[s]) n_det_gen++;
        end else begin
          chk(same(pk[s], rp), $sformatf("round %0d scheme %0d public key", round, s));
          chk(!fg[s], "false alarm in key generation");
          if (round > 1 && !fg[s]) n_clear++;
        end
      end
      if (inject == 1) begin
        // A corrupted key must not be used further: regenerate it cleanly.
        command(OP_GEN, 1'b0, cyc);
        n_gen++;
        for (int s = 0; s < 2; s++) begin
          chk(same(pk[s], rp) && !fg[s], "clean key generation after fault");
          if (!fg[s]) n_clear++;
        end
      end

      // Encryption with the kept public key.
      if (inject == 2) begin
        force dut_n.u_enc.u_c1.g_reno.u_unit.a_sel[7][5] = ~ra[7][5];
        force dut_s.u_enc.u_c1.g_reso.u_unit.a_enc[7][5] = ~ra[7][5];
      end
      command(OP_ENC, 1'b0, cyc);
      n_enc++;
      release dut_n.u_enc.u_c1.g_reno.u_unit.a_sel[7][5];
      release dut_s.u_enc.u_c1.g_reso.u_unit.a_enc[7][5];
      for (int s = 0; s < 2; s++) begin
        chk(same(c2[s], rc2), $sformatf("round %0d scheme %0d c2", round, s));
        if (inject == 2) begin
          chk(same(c1[s], rc1) || (fe[s] && f[s]), "corrupted c1 not flagged");
          if (fe[s]) n_det_enc++;
        end else begin
          chk(same(c1[s], rc1), $sformatf("round %0d scheme %0d c1", round, s));
          chk(!fe[s], "false alarm in encryption");
        end
      end

      // Decryption of the reference ciphertext (equal to the outputs when clean).
      for (int i = 0; i < N; i++) begin c1_in[i] = W'(rc1[i]); c2_in[i] = W'(rc2[i]); end
      if (inject == 3) begin
        force dut_n.u_dec.u_unit.g_reno.u_unit.a_sel[12][0] = ~rc1[12][0];
        force dut_s.u_dec.u_unit.g_reso.u_unit.a_enc[12][0] = ~rc1[12][0];
      end
      command(OP_DEC, 1'b0, cyc);
      n_dec++;
      release dut_n.u_dec.u_unit.g_reno.u_unit.a_sel[12][0];
      release dut_s.u_dec.u_unit.g_reso.u_unit.a_enc[12][0];
      for (int s = 0; s < 2; s++) begin
        if (inject == 3) begin
          chk(same(mt[s], rmt) || (fd[s] && f[s]), "corrupted m~ not flagged");
          if (fd[s]) n_det_dec++;
        end else begin
          chk(same(mt[s], rmt), $sformatf("round %0d scheme %0d m~", round, s));
          chk(msg_same(mo[s], rm), $sformatf("round %0d scheme %0d message", round, s));
          chk(!fd[s] && (f[s] == (fg[s] | fe[s])), "false alarm in decryption");
          for (int i = 0; i < N; i++) if (mo[s][i]) n_ones++; else n_zeros++;
        end
      end
    end

    $display("operations: gen=%0d enc=%0d dec=%0d; ignored: busy=%0d bad op=%0d",
             n_gen, n_enc, n_dec, n_busy_ignored, n_bad_op_ignored);
    $display("faults flagged: gen=%0d enc=%0d dec=%0d; flags cleared=%0d; bits 1=%0d 0=%0d",
             n_det_gen, n_det_enc, n_det_dec, n_clear, n_ones, n_zeros);
    chk(n_gen > 0 && n_enc > 0 && n_dec > 0, "every stage ran");
    chk(n_busy_ignored > 0 && n_bad_op_ignored > 0, "ignored commands seen");
    chk(n_det_gen > 0, "key-generation fault flagged");
    chk(n_det_enc > 0, "encryption fault flagged");
    chk(n_det_dec > 0, "decryption fault flagged");
    chk(n_clear > 0, "fault flag cleared");
    chk(n_ones > 0 && n_zeros > 0, "both message values decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
