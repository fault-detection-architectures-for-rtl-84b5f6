// tb_fd_ctrl: counts every control pulse over several operations and checks
// the start-to-done latency of 2N+8 cycles, that start is ignored while busy,
// and the order of the phases within each run.
module tb_fd_ctrl;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, run, load, shift, step, s1, cap_norm, cmp;
  int checks = 0, failures = 0;

  fd_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .busy, .done, .run, .load, .shift,
                        .step, .s1, .cap_norm, .cmp);

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, n_load, n_shift, n_step, n_s1, n_cap, n_cmp, n_run1_steps, mul_run;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(busy, 0, "idle after reset");
    for (int t = 0; t < 4; t++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = (t == 2);  // a start held while busy is ignored
      cyc = 1; n_load = 0; n_shift = 0; n_step = 0; n_s1 = 0; n_cap = 0; n_cmp = 0;
      n_run1_steps = 0; mul_run = 0;
      while (!done && cyc < 10 * N) begin
        n_load  += load;  n_shift += shift; n_step += step; n_s1 += s1;
        n_cap   += cap_norm; n_cmp += cmp;
        if (run && step) n_run1_steps++;
        if (s1 && shift) failures++;               // add step never shifts
        if (cap_norm && !load) failures++;         // capture only while loading run 2
        @(negedge clk); cyc++;
      end
      start = 0;
      chk(cyc, 2 * N + 8, "start to done latency");
      chk(n_load, 2, "loads");
      chk(n_shift, 2 * N, "shifts");
      chk(n_step, 2 * (N + 1), "steps");
      chk(n_s1, 2, "add steps");
      chk(n_cap, 1, "captures");
      chk(n_cmp, 1, "compares");
      chk(n_run1_steps, N + 1, "recomputed-run steps");
      @(negedge clk);
      chk(busy, 0, "idle after done");
      chk(done, 0, "done is one pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
