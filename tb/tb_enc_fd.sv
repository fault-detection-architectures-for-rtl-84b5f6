// tb_enc_fd: encryption c1 = a*e1 + e2, c2 = p*e1 + e3 + encode(m) under both
// schemes against the reference, with latency and no false alarms, then a
// stuck-at line on the c2 unit's operand bus that must be flagged (through
// fault_c2 and fault) whenever it corrupts c2, while c1 stays clean.
module tb_enc_fd;
  import rlwe_pkg::*;
  import rlwe_ref_pkg::*;
  localparam int N = 16;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][W-1:0] a, p;
  logic [N-1:0]        m, e1, e2, e3;
  logic [N-1:0][W-1:0] c1_n, c2_n, c1_s, c2_s;
  logic busy_n, done_n, fc1_n, fc2_n, f_n, busy_s, done_s, fc1_s, fc2_s, f_s;
  int checks = 0, failures = 0;

  enc_fd #(.N(N), .W(W), .SCHEME(FD_RENO)) dut_n (.clk, .rst_n, .start, .a, .p, .m, .e1, .e2, .e3,
    .busy(busy_n), .done(done_n), .c1(c1_n), .c2(c2_n), .fault_c1(fc1_n), .fault_c2(fc2_n), .fault(f_n));
  enc_fd #(.N(N), .W(W), .SCHEME(FD_RESO)) dut_s (.clk, .rst_n, .start, .a, .p, .m, .e1, .e2, .e3,
    .busy(busy_s), .done(done_s), .c1(c1_s), .c2(c2_s), .fault_c1(fc1_s), .fault_c2(fc2_s), .fault(f_s));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  poly_t x1, x2;

  task automatic run_op(output int cyc);
    poly_t ra = rand_poly(N, W), rp = rand_poly(N, W);
    bpoly_t rm = rand_bpoly(N), re1 = rand_bpoly(N), re2 = rand_bpoly(N), re3 = rand_bpoly(N);
    x1 = mac(N, W, ra, re1, bin_to_poly(N, re2), 1'b0);
    x2 = mac(N, W, rp, re1, enc_add(N, W, rm, re3), 1'b0);
    for (int i = 0; i < N; i++) begin
      a[i] = W'(ra[i]); p[i] = W'(rp[i]);
      m[i] = rm[i]; e1[i] = re1[i]; e2[i] = re2[i]; e3[i] = re3[i];
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done_n && cyc < 10 * N) begin @(negedge clk); cyc++; end
  endtask

  function automatic bit ok(input logic [N-1:0][W-1:0] c, input poly_t x);
    for (int i = 0; i < N; i++) if (int'(c[i]) != x[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int cyc, flagged;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      run_op(cyc);
      checks++; if (cyc != 2 * N + 8) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++; if (!done_s) begin failures++; $display("FAIL RESO not done"); end
      checks++; if (!ok(c1_n, x1) || !ok(c2_n, x2)) begin failures++; $display("FAIL t=%0d RENO ciphertext", t); end
      checks++; if (!ok(c1_s, x1) || !ok(c2_s, x2)) begin failures++; $display("FAIL t=%0d RESO ciphertext", t); end
      checks++; if (f_n || f_s) begin failures++; $display("FAIL t=%0d false alarm", t); end
    end
    flagged = 0;
    for (int t = 0; t < 6; t++) begin
      case (t)
        0: begin force dut_n.u_c2.g_reno.u_unit.a_sel[1][0] = 1'b0; force dut_s.u_c2.g_reso.u_unit.a_enc[1][0] = 1'b0; end
        1: begin force dut_n.u_c2.g_reno.u_unit.a_sel[1][1] = 1'b1; force dut_s.u_c2.g_reso.u_unit.a_enc[1][1] = 1'b1; end
        2: begin force dut_n.u_c2.g_reno.u_unit.a_sel[9][2] = 1'b0; force dut_s.u_c2.g_reso.u_unit.a_enc[9][2] = 1'b0; end
        3: begin force dut_n.u_c2.g_reno.u_unit.a_sel[9][3] = 1'b1; force dut_s.u_c2.g_reso.u_unit.a_enc[9][3] = 1'b1; end
        4: begin force dut_n.u_c2.g_reno.u_unit.a_sel[N-1][4] = 1'b0; force dut_s.u_c2.g_reso.u_unit.a_enc[N-1][4] = 1'b0; end
        default: begin force dut_n.u_c2.g_reno.u_unit.a_sel[N-1][5] = 1'b1; force dut_s.u_c2.g_reso.u_unit.a_enc[N-1][5] = 1'b1; end
      endcase
      run_op(cyc);
      if (!ok(c2_n, x2)) begin checks++; if (!(fc2_n && f_n)) begin failures++; $display("FAIL RENO c2 fault missed"); end end
      if (!ok(c2_s, x2)) begin checks++; if (!(fc2_s && f_s)) begin failures++; $display("FAIL RESO c2 fault missed"); end end
      checks++; if (fc1_n || fc1_s || !ok(c1_n, x1)) begin failures++; $display("FAIL c1 disturbed"); end
      flagged += fc2_n + fc2_s;
      release dut_n.u_c2.g_reno.u_unit.a_sel[1][0]; release dut_s.u_c2.g_reso.u_unit.a_enc[1][0];
      release dut_n.u_c2.g_reno.u_unit.a_sel[1][1]; release dut_s.u_c2.g_reso.u_unit.a_enc[1][1];
      release dut_n.u_c2.g_reno.u_unit.a_sel[9][2]; release dut_s.u_c2.g_reso.u_unit.a_enc[9][2];
      release dut_n.u_c2.g_reno.u_unit.a_sel[9][3]; release dut_s.u_c2.g_reso.u_unit.a_enc[9][3];
      release dut_n.u_c2.g_reno.u_unit.a_sel[N-1][4]; release dut_s.u_c2.g_reso.u_unit.a_enc[N-1][4];
      release dut_n.u_c2.g_reno.u_unit.a_sel[N-1][5]; release dut_s.u_c2.g_reso.u_unit.a_enc[N-1][5];
    end
    $display("c2 faults flagged: %0d of 12 stuck-at runs", flagged);
    checks++; if (flagged < 3) begin failures++; $display("FAIL too few faults flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
