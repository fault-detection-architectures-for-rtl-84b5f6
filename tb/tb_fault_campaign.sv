// tb_fault_campaign: stuck-at fault-injection campaign on the decryption
// unit (m~ = c1*r2 + c2), RENO and RESO instances side by side at n = 32.
//
// Every injection decrypts a fresh random ciphertext while a set of lines of
// the encoded multiplicand bus (the input of the cell array) is held at
// random stuck values. Three fault classes are drawn in turn: a single bit
// (SBU), two bits of one coefficient byte (SBDBU) and 2 to 8 bits spread over
// the bus (MB). Half of the injections are permanent (held for the whole
// operation), half transient (held for a random window of cycles). For each
// scheme and class the bench counts the injections that corrupted m~ and how
// many of those raised `fault`, and prints the coverage. Under RESO every
// permanent single-bit fault must be caught; overall coverage must reach 99%
// for both schemes. Known escapes: under RENO a stuck sign bit on a
// coefficient equal to 0 or -q/2, whose negation is itself, so both runs go
// wrong the same way (+q/2 = -q/2 mod q); under RESO two adjacent stuck bits
// whose errors line up after the one-place shift.
module tb_fault_campaign;
  import rlwe_pkg::*;
  import rlwe_ref_pkg::*;
  localparam int N = 32;
  localparam int W = 8;
  localparam int INJECTIONS = 65536;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][W-1:0] c1, c2, mt_n, mt_s;
  logic [N-1:0]        r2, m_n, m_s;
  logic busy_n, done_n, f_n, busy_s, done_s, f_s;

  dec_fd #(.N(N), .W(W), .SCHEME(FD_RENO)) dut_n (.clk, .rst_n, .start, .c1, .c2, .r2,
    .busy(busy_n), .done(done_n), .m_tilde(mt_n), .m(m_n), .fault(f_n));
  dec_fd #(.N(N), .W(W), .SCHEME(FD_RESO)) dut_s (.clk, .rst_n, .start, .c1, .c2, .r2,
    .busy(busy_s), .done(done_s), .m_tilde(mt_s), .m(m_s), .fault(f_s));

  always #5 clk = ~clk;

  // Fault-free value of each encoded bus, and the injected mask and values.
  logic [N-1:0][W-1:0] good_n, mask_n, val_n;
  logic [N-1:0][W:0]   good_s, mask_s, val_s;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      good_n[i] = dut_n.u_unit.g_reno.u_unit.run ? (~c1[i] + 8'd1) : c1[i];
      good_s[i] = dut_s.u_unit.g_reso.u_unit.run ? {c1[i], 1'b0} : {c1[i][W-1], c1[i]};
    end
  end

  int checks = 0, failures = 0;
  int corrupted[2][3][2], flagged[2][3][2], injected[3];

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit same(input logic [N-1:0][W-1:0] x, input poly_t y);
    for (int i = 0; i < N; i++) if (int'(x[i]) != y[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    poly_t  rc1, rc2, xmt;
    bpoly_t rr2;
    int     cls, nbits, t0, len, cyc, coef, bitpos;
    bit     transient;
    string  names[3] = '{"SBU", "SBDBU", "MB"};
    for (int s = 0; s < 2; s++) for (int k = 0; k < 3; k++) for (int d = 0; d < 2; d++) begin
      corrupted[s][k][d] = 0; flagged[s][k][d] = 0;
    end
    for (int k = 0; k < 3; k++) injected[k] = 0;
    $display("%0d injections, %0d per class", INJECTIONS, INJECTIONS / 3);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int inj = 0; inj < INJECTIONS; inj++) begin
      rc1 = rand_poly(N, W); rc2 = rand_poly(N, W); rr2 = rand_bpoly(N);
      xmt = mac(N, W, rc1, rr2, rc2, 1'b0);
      for (int i = 0; i < N; i++) begin c1[i] = W'(rc1[i]); c2[i] = W'(rc2[i]); r2[i] = rr2[i]; end
      cls = inj % 3;
      transient = inj[1];
      injected[cls]++;
      mask_n = '0; mask_s = '0;
      val_n = N*W'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      val_s = N*(W+1)'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      coef   = int'($urandom % N);
      bitpos = int'($urandom % W);
      case (cls)
        0: begin
          mask_n[coef][bitpos] = 1'b1;
          mask_s[coef][int'($urandom % (W + 1))] = 1'b1;
        end
        1: begin
          int b2;
          b2 = (bitpos + 1 + int'($urandom % (W - 1))) % W;
          mask_n[coef][bitpos] = 1'b1; mask_n[coef][b2] = 1'b1;
          mask_s[coef][bitpos + 1] = 1'b1; mask_s[coef][b2] = 1'b1;
        end
        default: begin
          nbits = 2 + int'($urandom % 7);
          for (int k = 0; k < nbits; k++) begin
            int cc;
            cc = int'($urandom % N);
            mask_n[cc][$urandom % W] = 1'b1;
            mask_s[cc][$urandom % (W + 1)] = 1'b1;
          end
        end
      endcase
      t0  = transient ? 1 + int'($urandom % (2 * N + 6)) : 1;
      len = transient ? 1 + int'($urandom % N) : 4 * N;

      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done_n && cyc < 4 * N) begin
        if (cyc == t0) begin
          force dut_n.u_unit.g_reno.u_unit.a_sel = (good_n & ~mask_n) | (val_n & mask_n);
          force dut_s.u_unit.g_reso.u_unit.a_enc = (good_s & ~mask_s) | (val_s & mask_s);
        end
        if (cyc == t0 + len) begin
          release dut_n.u_unit.g_reno.u_unit.a_sel;
          release dut_s.u_unit.g_reso.u_unit.a_enc;
        end
        @(negedge clk); cyc++;
      end
      release dut_n.u_unit.g_reno.u_unit.a_sel;
      release dut_s.u_unit.g_reso.u_unit.a_enc;

      if (!same(mt_n, xmt)) begin corrupted[0][cls][transient]++; if (f_n) flagged[0][cls][transient]++; end
      if (!same(mt_s, xmt)) begin corrupted[1][cls][transient]++; if (f_s) flagged[1][cls][transient]++; end
    end

    for (int s = 0; s < 2; s++) begin
      int tc, tf;
      tc = 0; tf = 0;
      for (int k = 0; k < 3; k++) for (int d = 0; d < 2; d++) begin
        $display("%s %-5s %-9s corrupted %0d flagged %0d coverage %0.4f%%",
                 s == 0 ? "RENO" : "RESO", names[k], d == 0 ? "permanent" : "transient",
                 corrupted[s][k][d], flagged[s][k][d],
                 corrupted[s][k][d] == 0 ? 100.0 : 100.0 * flagged[s][k][d] / corrupted[s][k][d]);
        tc += corrupted[s][k][d]; tf += flagged[s][k][d];
        checks++;
        if (corrupted[s][k][d] == 0) begin failures++; $display("FAIL class %s never corrupted a result", names[k]); end
      end
      // RESO catches every permanent single-bit fault. RENO cannot catch a
      // stuck sign bit on a coefficient equal to 0 or -q/2 (their own
      // negatives), so it is allowed a small shortfall there.
      checks++;
      if (s == 1 && flagged[s][0][0] != corrupted[s][0][0]) begin
        failures++; $display("FAIL permanent single-bit fault escaped RESO");
      end
      checks++;
      if (100.0 * flagged[s][0][0] / corrupted[s][0][0] < 99.5) begin
        failures++; $display("FAIL permanent single-bit coverage below 99.5%%");
      end
      checks++;
      if (100.0 * tf / tc < 99.0) begin failures++; $display("FAIL coverage below 99%%"); end
      $display("%s overall coverage %0.4f%% (%0d of %0d corrupted results flagged)",
               s == 0 ? "RENO" : "RESO", 100.0 * tf / tc, tf, tc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
