// tb_dec_fd: builds key pairs and ciphertexts with the reference model,
// decrypts them under both schemes and checks m~ = c1*r2 + c2, the decoded
// message against the original message, the latency and the absence of
// false alarms; then a stuck-at line on each scheme's operand bus must be
// flagged whenever it corrupts m~.
module tb_dec_fd;
  import rlwe_pkg::*;
  import rlwe_ref_pkg::*;
  localparam int N = 32;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][W-1:0] c1, c2, mt_n, mt_s;
  logic [N-1:0]        r2, m_n, m_s;
  logic busy_n, done_n, f_n, busy_s, done_s, f_s;
  int checks = 0, failures = 0;

  dec_fd #(.N(N), .W(W), .SCHEME(FD_RENO)) dut_n (.clk, .rst_n, .start, .c1, .c2, .r2,
    .busy(busy_n), .done(done_n), .m_tilde(mt_n), .m(m_n), .fault(f_n));
  dec_fd #(.N(N), .W(W), .SCHEME(FD_RESO)) dut_s (.clk, .rst_n, .start, .c1, .c2, .r2,
    .busy(busy_s), .done(done_s), .m_tilde(mt_s), .m(m_s), .fault(f_s));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  poly_t  xmt;
  bpoly_t msg;

  task automatic run_op(output int cyc);
    poly_t  ra = rand_poly(N, W), rp, rc1, rc2;
    bpoly_t rr1 = rand_bpoly(N), rr2 = rand_bpoly(N);
    bpoly_t re1 = rand_bpoly(N), re2 = rand_bpoly(N), re3 = rand_bpoly(N);
    msg = rand_bpoly(N);
    rp  = mac(N, W, ra, rr2, bin_to_poly(N, rr1), 1'b1);
    rc1 = mac(N, W, ra, re1, bin_to_poly(N, re2), 1'b0);
    rc2 = mac(N, W, rp, re1, enc_add(N, W, msg, re3), 1'b0);
    xmt = mac(N, W, rc1, rr2, rc2, 1'b0);
    for (int i = 0; i < N; i++) begin c1[i] = W'(rc1[i]); c2[i] = W'(rc2[i]); r2[i] = rr2[i]; end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done_n && cyc < 10 * N) begin @(negedge clk); cyc++; end
  endtask

  function automatic bit ok(input logic [N-1:0][W-1:0] mt);
    for (int i = 0; i < N; i++) if (int'(mt[i]) != xmt[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit msg_ok(input logic [N-1:0] mm);
    for (int i = 0; i < N; i++) if (mm[i] != msg[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int cyc, flagged;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      run_op(cyc);
      checks++; if (cyc != 2 * N + 8) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++; if (!done_s) begin failures++; $display("FAIL RESO not done"); end
      checks++; if (!ok(mt_n) || !ok(mt_s)) begin failures++; $display("FAIL t=%0d m~ wrong", t); end
      checks++; if (!msg_ok(m_n) || !msg_ok(m_s)) begin failures++; $display("FAIL t=%0d message not recovered", t); end
      checks++; if (f_n || f_s) begin failures++; $display("FAIL t=%0d false alarm", t); end
    end
    flagged = 0;
    for (int t = 0; t < 4; t++) begin
      case (t)
        0: begin force dut_n.u_unit.g_reno.u_unit.a_sel[4][5] = 1'b0; force dut_s.u_unit.g_reso.u_unit.a_enc[4][5] = 1'b0; end
        1: begin force dut_n.u_unit.g_reno.u_unit.a_sel[4][6] = 1'b1; force dut_s.u_unit.g_reso.u_unit.a_enc[4][6] = 1'b1; end
        2: begin force dut_n.u_unit.g_reno.u_unit.a_sel[20][1] = 1'b0; force dut_s.u_unit.g_reso.u_unit.a_enc[20][1] = 1'b0; end
        default: begin force dut_n.u_unit.g_reno.u_unit.a_sel[20][2] = 1'b1; force dut_s.u_unit.g_reso.u_unit.a_enc[20][2] = 1'b1; end
      endcase
      run_op(cyc);
      if (!ok(mt_n)) begin checks++; if (!f_n) begin failures++; $display("FAIL RENO fault missed"); end end
      if (!ok(mt_s)) begin checks++; if (!f_s) begin failures++; $display("FAIL RESO fault missed"); end end
      flagged += f_n + f_s;
      release dut_n.u_unit.g_reno.u_unit.a_sel[4][5]; release dut_s.u_unit.g_reso.u_unit.a_enc[4][5];
      release dut_n.u_unit.g_reno.u_unit.a_sel[4][6]; release dut_s.u_unit.g_reso.u_unit.a_enc[4][6];
      release dut_n.u_unit.g_reno.u_unit.a_sel[20][1]; release dut_s.u_unit.g_reso.u_unit.a_enc[20][1];
      release dut_n.u_unit.g_reno.u_unit.a_sel[20][2]; release dut_s.u_unit.g_reso.u_unit.a_enc[20][2];
    end
    $display("faults flagged: %0d of 8 stuck-at runs", flagged);
    checks++; if (flagged < 2) begin failures++; $display("FAIL too few faults flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
