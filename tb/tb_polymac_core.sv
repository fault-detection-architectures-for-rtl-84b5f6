// tb_polymac_core: drives the core by hand (clear, N multiply steps with the
// bits of b highest degree first, one add step) and compares the
// accumulators with the schoolbook reference for +A*b + C and C - A*b. It
// also checks that the result appears exactly one cycle after the last step
// (the sub-pipeline latency) and that gaps between steps change nothing.
module tb_polymac_core;
  import rlwe_ref_pkg::*;
  localparam int N = 16;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clr = 0, step = 0, s1 = 0, b_bit = 0, neg = 0;
  logic [N-1:0][W-1:0] a, c, res;
  int checks = 0, failures = 0;

  polymac_core #(.N(N), .W(W)) dut (.clk, .rst_n, .clr, .step, .s1, .b_bit, .neg,
                                    .a, .c, .res);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t  ra, rc, exp;
    bpoly_t rb;
    bit     sub;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      ra = rand_poly(N, W); rc = rand_poly(N, W); rb = rand_bpoly(N);
      if (t == 0) foreach (rb[i]) rb[i] = 1'b1;
      if (t == 1) foreach (rb[i]) rb[i] = (i == N - 1);  // pure rotation of a by n-1
      sub = t[0];
      exp = mac(N, W, ra, rb, rc, sub);
      for (int i = 0; i < N; i++) begin a[i] = W'(ra[i]); c[i] = W'(rc[i]); end
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0; neg = sub;
      for (int k = N - 1; k >= 0; k--) begin
        step = 1; s1 = 0; b_bit = rb[k];
        @(negedge clk);
        if (t % 3 == 2 && k % 5 == 0) begin step = 0; b_bit = ~b_bit; @(negedge clk); end
      end
      step = 1; s1 = 1;
      @(negedge clk); step = 0; s1 = 0;
      // The add step is still in the sub-pipeline register: the
      // accumulators must hold the bare product (+/-A*b) in this cycle.
      begin
        poly_t z = new[N], prod;
        foreach (z[i]) z[i] = 0;
        prod = mac(N, W, ra, rb, z, sub);
        for (int i = 0; i < N; i++) begin
          checks++;
          if (int'(res[i]) != prod[i]) begin
            failures++;
            $display("FAIL t=%0d coef %0d before add: got %0d expected %0d", t, i, res[i], prod[i]);
          end
        end
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(res[i]) != exp[i]) begin
          failures++;
          $display("FAIL t=%0d coef %0d: got %0d expected %0d", t, i, res[i], exp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
