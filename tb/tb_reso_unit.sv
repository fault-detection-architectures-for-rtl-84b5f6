// tb_reso_unit: runs reso_unit (SUB = 0 and SUB = 1 side by side) on random
// operands, compares `result` with the schoolbook reference, checks that
// `fault` stays low without faults and that `done` arrives 2N+8 cycles after
// start. Then it holds one line of the encoded operand bus (a_enc) stuck at 0
// or 1 for a whole operation: whenever the stuck line corrupts the result,
// the recomputation must raise `fault`, and at least some faults must show.
module tb_reso_unit;
  import rlwe_ref_pkg::*;
  localparam int N = 16;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][W-1:0] a, c, res0, res1;
  logic [N-1:0]        b;
  logic busy0, busy1, done0, done1, fault0, fault1;
  int checks = 0, failures = 0;

  reso_unit #(.N(N), .W(W), .SUB(1'b0)) dut0 (.clk, .rst_n, .start, .a, .b, .c,
    .busy(busy0), .done(done0), .result(res0), .fault(fault0));
  reso_unit #(.N(N), .W(W), .SUB(1'b1)) dut1 (.clk, .rst_n, .start, .a, .b, .c,
    .busy(busy1), .done(done1), .result(res1), .fault(fault1));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  poly_t  ra, rc, e0, e1;
  bpoly_t rb;

  task automatic run_op(output int cyc);
    ra = rand_poly(N, W); rc = rand_poly(N, W); rb = rand_bpoly(N);
    e0 = mac(N, W, ra, rb, rc, 1'b0);
    e1 = mac(N, W, ra, rb, rc, 1'b1);
    for (int i = 0; i < N; i++) begin a[i] = W'(ra[i]); c[i] = W'(rc[i]); b[i] = rb[i]; end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done0 && cyc < 10 * N) begin @(negedge clk); cyc++; end
  endtask

  function automatic bit correct0();
    for (int i = 0; i < N; i++) if (int'(res0[i]) != e0[i]) return 1'b0;
    return 1'b1;
  endfunction
  function automatic bit correct1();
    for (int i = 0; i < N; i++) if (int'(res1[i]) != e1[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int cyc, detected, corrupted;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fault-free operation.
    for (int t = 0; t < 12; t++) begin
      run_op(cyc);
      checks++; if (cyc != 2 * N + 8) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++; if (!done1) begin failures++; $display("FAIL units out of step"); end
      checks++; if (!correct0()) begin failures++; $display("FAIL t=%0d A*b+C wrong", t); end
      checks++; if (!correct1()) begin failures++; $display("FAIL t=%0d C-A*b wrong", t); end
      checks++; if (fault0 || fault1) begin failures++; $display("FAIL t=%0d false alarm", t); end
    end
    // Stuck-at faults on the encoded operand bus.
    detected = 0; corrupted = 0;
    for (int t = 0; t < 16; t++) begin
      case (t % 8)
        0: begin force dut0.a_enc[3][0] = 1'b0; force dut1.a_enc[3][0] = 1'b0; end
        1: begin force dut0.a_enc[3][0] = 1'b1; force dut1.a_enc[3][0] = 1'b1; end
        2: begin force dut0.a_enc[0][4] = 1'b0; force dut1.a_enc[0][4] = 1'b0; end
        3: begin force dut0.a_enc[0][4] = 1'b1; force dut1.a_enc[0][4] = 1'b1; end
        4: begin force dut0.a_enc[N-1][6] = 1'b0; force dut1.a_enc[N-1][6] = 1'b0; end
        5: begin force dut0.a_enc[N-1][6] = 1'b1; force dut1.a_enc[N-1][6] = 1'b1; end
        6: begin force dut0.a_enc[7][2] = 1'b0; force dut1.a_enc[7][2] = 1'b0; end
        default: begin force dut0.a_enc[7][2] = 1'b1; force dut1.a_enc[7][2] = 1'b1; end
      endcase
      run_op(cyc);
      if (!correct0()) begin
        corrupted++;
        checks++; if (!fault0) begin failures++; $display("FAIL t=%0d corrupted A*b+C not flagged", t); end
      end
      if (!correct1()) begin
        corrupted++;
        checks++; if (!fault1) begin failures++; $display("FAIL t=%0d corrupted C-A*b not flagged", t); end
      end
      detected += fault0 + fault1;
      release dut0.a_enc[3][0]; release dut1.a_enc[3][0];
      release dut0.a_enc[0][4]; release dut1.a_enc[0][4];
      release dut0.a_enc[N-1][6]; release dut1.a_enc[N-1][6];
      release dut0.a_enc[7][2]; release dut1.a_enc[7][2];
    end
    $display("stuck-at runs: %0d results corrupted, %0d faults flagged", corrupted, detected);
    checks++; if (detected < 4) begin failures++; $display("FAIL too few faults flagged"); end
    // Fault-free again: the flag must clear on the next start.
    run_op(cyc);
    checks++; if (fault0 || fault1 || !correct0() || !correct1()) begin
      failures++; $display("FAIL recovery after faults");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
