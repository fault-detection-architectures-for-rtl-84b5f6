// tb_keygen_campaign: fault injection on key generation (p = r1 - a*r2) at
// three locations, RENO and RESO instances side by side at n = 32:
//   INPUT  the encoded multiplicand bus at the input of the cell array,
//   ADDER  the adder outputs, i.e. one accumulator bit Res[i][k],
//   VOTER  one replica of the triplicated comparator stuck at "no mismatch",
//          together with an INPUT fault, to show the voter still flags it.
// Faults are stuck-at 0 or 1, permanent or held for a random window.
// Requirements: INPUT and VOTER coverage of at least 99% for both schemes
// (the voter must make VOTER equal INPUT), ADDER coverage of at least 99% for
// RESO. RENO's accumulators hold the same partial sums in both runs, so a
// permanent stuck accumulator bit escapes it; its ADDER figures are
// reported, and only the transient ones are required to exceed 50%.
module tb_keygen_campaign;
  import rlwe_pkg::*;
  import rlwe_ref_pkg::*;
  localparam int N = 32;
  localparam int W = 8;
  localparam int PER_LOCATION = 4000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][W-1:0] a, p_n, p_s;
  logic [N-1:0]        r1, r2;
  logic busy_n, done_n, f_n, busy_s, done_s, f_s;

  keygen_fd #(.N(N), .W(W), .SCHEME(FD_RENO)) dut_n (.clk, .rst_n, .start, .a, .r1, .r2,
    .busy(busy_n), .done(done_n), .p(p_n), .fault(f_n));
  keygen_fd #(.N(N), .W(W), .SCHEME(FD_RESO)) dut_s (.clk, .rst_n, .start, .a, .r1, .r2,
    .busy(busy_s), .done(done_s), .p(p_s), .fault(f_s));

  always #5 clk = ~clk;

  logic [N-1:0][W-1:0] good_n, mask_n, val_n;
  logic [N-1:0][W:0]   good_s, mask_s, val_s;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      good_n[i] = dut_n.u_unit.g_reno.u_unit.run ? (~a[i] + 8'd1) : a[i];
      good_s[i] = dut_s.u_unit.g_reso.u_unit.run ? {a[i], 1'b0} : {a[i][W-1], a[i]};
    end
  end

  // Accumulator bit faults need constant indices: a fixed set of sites.
  logic stuck;
  task automatic force_res(input int site);
    case (site)
      0: begin force dut_n.u_unit.g_reno.u_unit.u_core.res[0][0]  = stuck; force dut_s.u_unit.g_reso.u_unit.u_core.res[0][1]  = stuck; end
      1: begin force dut_n.u_unit.g_reno.u_unit.u_core.res[5][3]  = stuck; force dut_s.u_unit.g_reso.u_unit.u_core.res[5][3]  = stuck; end
      2: begin force dut_n.u_unit.g_reno.u_unit.u_core.res[11][7] = stuck; force dut_s.u_unit.g_reso.u_unit.u_core.res[11][8] = stuck; end
      3: begin force dut_n.u_unit.g_reno.u_unit.u_core.res[17][1] = stuck; force dut_s.u_unit.g_reso.u_unit.u_core.res[17][2] = stuck; end
      4: begin force dut_n.u_unit.g_reno.u_unit.u_core.res[23][5] = stuck; force dut_s.u_unit.g_reso.u_unit.u_core.res[23][6] = stuck; end
      5: begin force dut_n.u_unit.g_reno.u_unit.u_core.res[29][2] = stuck; force dut_s.u_unit.g_reso.u_unit.u_core.res[29][0] = stuck; end
      6: begin force dut_n.u_unit.g_reno.u_unit.u_core.res[31][6] = stuck; force dut_s.u_unit.g_reso.u_unit.u_core.res[31][7] = stuck; end
      default: begin force dut_n.u_unit.g_reno.u_unit.u_core.res[14][4] = stuck; force dut_s.u_unit.g_reso.u_unit.u_core.res[14][4] = stuck; end
    endcase
  endtask
  task automatic release_res();
    release dut_n.u_unit.g_reno.u_unit.u_core.res[0][0];  release dut_s.u_unit.g_reso.u_unit.u_core.res[0][1];
    release dut_n.u_unit.g_reno.u_unit.u_core.res[5][3];  release dut_s.u_unit.g_reso.u_unit.u_core.res[5][3];
    release dut_n.u_unit.g_reno.u_unit.u_core.res[11][7]; release dut_s.u_unit.g_reso.u_unit.u_core.res[11][8];
    release dut_n.u_unit.g_reno.u_unit.u_core.res[17][1]; release dut_s.u_unit.g_reso.u_unit.u_core.res[17][2];
    release dut_n.u_unit.g_reno.u_unit.u_core.res[23][5]; release dut_s.u_unit.g_reso.u_unit.u_core.res[23][6];
    release dut_n.u_unit.g_reno.u_unit.u_core.res[29][2]; release dut_s.u_unit.g_reso.u_unit.u_core.res[29][0];
    release dut_n.u_unit.g_reno.u_unit.u_core.res[31][6]; release dut_s.u_unit.g_reso.u_unit.u_core.res[31][7];
    release dut_n.u_unit.g_reno.u_unit.u_core.res[14][4]; release dut_s.u_unit.g_reso.u_unit.u_core.res[14][4];
  endtask

  int checks = 0, failures = 0;
  // [scheme][location][permanent/transient]
  int corrupted[2][3][2], flagged[2][3][2];
  int false_alarms = 0;

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

  function automatic real pct(input int f, input int c);
    return c == 0 ? 100.0 : 100.0 * f / c;
  endfunction

  initial begin
    poly_t  ra, xp;
    bpoly_t rr1, rr2;
    int     loc, t0, len, cyc, site;
    bit     transient;
    string  names[3] = '{"INPUT", "ADDER", "VOTER"};
    for (int s = 0; s < 2; s++) for (int l = 0; l < 3; l++) for (int d = 0; d < 2; d++) begin
      corrupted[s][l][d] = 0; flagged[s][l][d] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int inj = 0; inj < 3 * PER_LOCATION; inj++) begin
      ra = rand_poly(N, W); rr1 = rand_bpoly(N); rr2 = rand_bpoly(N);
      xp = mac(N, W, ra, rr2, bin_to_poly(N, rr1), 1'b1);
      for (int i = 0; i < N; i++) begin a[i] = W'(ra[i]); r1[i] = rr1[i]; r2[i] = rr2[i]; end
      loc = inj % 3;
      transient = inj[2];
      mask_n = '0; mask_s = '0;
      val_n = N*W'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      val_s = N*(W+1)'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      begin
        int cc, kk;
        cc = int'($urandom % N); kk = int'($urandom % W);
        mask_n[cc][kk] = 1'b1;
        mask_s[cc][kk + int'($urandom % 2)] = 1'b1;
      end
      stuck = 1'($urandom);
      site  = int'($urandom % 8);
      t0  = transient ? 1 + int'($urandom % (2 * N + 6)) : 1;
      len = transient ? 1 + int'($urandom % N) : 4 * N;
      if (loc == 2) begin
        force dut_n.u_unit.g_reno.u_unit.u_cmp.replica_mismatch[1] = 1'b0;
        force dut_s.u_unit.g_reso.u_unit.u_cmp.replica_mismatch[1] = 1'b0;
      end

      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done_n && cyc < 4 * N) begin
        if (cyc == t0) begin
          if (loc == 1) force_res(site);
          else begin
            force dut_n.u_unit.g_reno.u_unit.a_sel = (good_n & ~mask_n) | (val_n & mask_n);
            force dut_s.u_unit.g_reso.u_unit.a_enc = (good_s & ~mask_s) | (val_s & mask_s);
          end
        end
        if (cyc == t0 + len) begin
          release_res();
          release dut_n.u_unit.g_reno.u_unit.a_sel;
          release dut_s.u_unit.g_reso.u_unit.a_enc;
        end
        @(negedge clk); cyc++;
      end
      release_res();
      release dut_n.u_unit.g_reno.u_unit.a_sel;
      release dut_s.u_unit.g_reso.u_unit.a_enc;
      release dut_n.u_unit.g_reno.u_unit.u_cmp.replica_mismatch[1];
      release dut_s.u_unit.g_reso.u_unit.u_cmp.replica_mismatch[1];

      if (!same(p_n, xp)) begin corrupted[0][loc][transient]++; if (f_n) flagged[0][loc][transient]++; end
      if (!same(p_s, xp)) begin corrupted[1][loc][transient]++; if (f_s) flagged[1][loc][transient]++; end
    end

    // A clean run with a stuck voter input must not raise a false alarm.
    force dut_n.u_unit.g_reno.u_unit.u_cmp.replica_mismatch[0] = 1'b1;
    force dut_s.u_unit.g_reso.u_unit.u_cmp.replica_mismatch[0] = 1'b1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done_n) @(negedge clk);
    checks++;
    if (f_n || f_s) begin failures++; $display("FAIL false alarm from one stuck voter input"); end
    release dut_n.u_unit.g_reno.u_unit.u_cmp.replica_mismatch[0];
    release dut_s.u_unit.g_reso.u_unit.u_cmp.replica_mismatch[0];

    for (int s = 0; s < 2; s++) begin
      for (int l = 0; l < 3; l++) for (int d = 0; d < 2; d++)
        $display("%s %-5s %-9s corrupted %0d flagged %0d coverage %0.4f%%",
                 s == 0 ? "RENO" : "RESO", names[l], d == 0 ? "permanent" : "transient",
                 corrupted[s][l][d], flagged[s][l][d], pct(flagged[s][l][d], corrupted[s][l][d]));
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (corrupted[s][l][0] + corrupted[s][l][1] == 0) begin
          failures++; $display("FAIL location %s never corrupted a result", names[l]);
        end
      end
      checks++;
      if (pct(flagged[s][0][0] + flagged[s][0][1], corrupted[s][0][0] + corrupted[s][0][1]) < 99.0) begin
        failures++; $display("FAIL INPUT coverage below 99%%");
      end
      checks++;
      if (pct(flagged[s][2][0] + flagged[s][2][1], corrupted[s][2][0] + corrupted[s][2][1]) < 99.0) begin
        failures++; $display("FAIL VOTER coverage below 99%%");
      end
      checks++;
      if (s == 1 && pct(flagged[s][1][0] + flagged[s][1][1], corrupted[s][1][0] + corrupted[s][1][1]) < 99.0) begin
        failures++; $display("FAIL RESO ADDER coverage below 99%%");
      end
      checks++;
      if (s == 0 && pct(flagged[s][1][1], corrupted[s][1][1]) < 50.0) begin
        failures++; $display("FAIL RENO transient ADDER coverage below 50%%");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
