// tb_bit_shift_reg: loads random vectors, shifts them out and checks that the
// coefficients appear highest degree first, that load wins over shift and
// that zeros fill in from the bottom.
module tb_bit_shift_reg;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, bit_out;
  logic [N-1:0] din = '0, v;
  int checks = 0, failures = 0;

  bit_shift_reg #(.N(N)) dut (.clk, .rst_n, .load, .shift, .din, .bit_out);

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      v = N'($urandom);
      @(negedge clk); din = v; load = 1; shift = (t % 2 == 1);  // load beats shift
      @(negedge clk); load = 0; shift = 1;
      for (int k = N - 1; k >= 0; k--) begin
        chk(bit_out, v[k], $sformatf("trial %0d bit %0d", t, k));
        @(negedge clk);
      end
      chk(bit_out, 1'b0, "zero fill");
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
