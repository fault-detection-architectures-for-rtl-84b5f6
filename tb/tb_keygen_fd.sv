// tb_keygen_fd: key generation p = r1 - a*r2 under both schemes (RENO and
// RESO instances side by side) against the reference, with the 2N+8-cycle
// latency, no false alarms, and a stuck-at line on each scheme's encoded
// operand bus that must be flagged whenever it corrupts p.
module tb_keygen_fd;
  import rlwe_pkg::*;
  import rlwe_ref_pkg::*;
  localparam int N = 16;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][W-1:0] a, p_reno, p_reso;
  logic [N-1:0]        r1, r2;
  logic busy_n, busy_s, done_n, done_s, fault_n, fault_s;
  int checks = 0, failures = 0;

  keygen_fd #(.N(N), .W(W), .SCHEME(FD_RENO)) dut_n (.clk, .rst_n, .start, .a, .r1, .r2,
    .busy(busy_n), .done(done_n), .p(p_reno), .fault(fault_n));
  keygen_fd #(.N(N), .W(W), .SCHEME(FD_RESO)) dut_s (.clk, .rst_n, .start, .a, .r1, .r2,
    .busy(busy_s), .done(done_s), .p(p_reso), .fault(fault_s));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  poly_t exp;

  task automatic run_op(output int cyc);
    poly_t ra = rand_poly(N, W);
    bpoly_t rr1 = rand_bpoly(N), rr2 = rand_bpoly(N);
    exp = mac(N, W, ra, rr2, bin_to_poly(N, rr1), 1'b1);
    for (int i = 0; i < N; i++) begin a[i] = W'(ra[i]); r1[i] = rr1[i]; r2[i] = rr2[i]; end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done_n && cyc < 10 * N) begin @(negedge clk); cyc++; end
  endtask

  function automatic bit ok(input logic [N-1:0][W-1:0] p);
    for (int i = 0; i < N; i++) if (int'(p[i]) != exp[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int cyc, flagged;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      run_op(cyc);
      checks++; if (cyc != 2 * N + 8) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++; if (!done_s) begin failures++; $display("FAIL RESO not done with RENO"); end
      checks++; if (!ok(p_reno)) begin failures++; $display("FAIL t=%0d RENO p wrong", t); end
      checks++; if (!ok(p_reso)) begin failures++; $display("FAIL t=%0d RESO p wrong", t); end
      checks++; if (fault_n || fault_s) begin failures++; $display("FAIL t=%0d false alarm", t); end
    end
    flagged = 0;
    for (int t = 0; t < 8; t++) begin
      if (t[0]) begin
        force dut_n.u_unit.g_reno.u_unit.a_sel[5][3] = 1'b1;
        force dut_s.u_unit.g_reso.u_unit.a_enc[5][3] = 1'b1;
      end else begin
        force dut_n.u_unit.g_reno.u_unit.a_sel[2][6] = 1'b0;
        force dut_s.u_unit.g_reso.u_unit.a_enc[2][6] = 1'b0;
      end
      run_op(cyc);
      if (!ok(p_reno)) begin checks++; if (!fault_n) begin failures++; $display("FAIL RENO fault missed"); end end
      if (!ok(p_reso)) begin checks++; if (!fault_s) begin failures++; $display("FAIL RESO fault missed"); end end
      flagged += fault_n + fault_s;
      release dut_n.u_unit.g_reno.u_unit.a_sel[5][3];
      release dut_s.u_unit.g_reso.u_unit.a_enc[5][3];
      release dut_n.u_unit.g_reno.u_unit.a_sel[2][6];
      release dut_s.u_unit.g_reso.u_unit.a_enc[2][6];
    end
    $display("faults flagged: %0d of 16 stuck-at runs", flagged);
    checks++; if (flagged < 4) begin failures++; $display("FAIL too few faults flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
