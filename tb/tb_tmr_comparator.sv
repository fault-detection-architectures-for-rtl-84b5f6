// tb_tmr_comparator: equal and unequal operands, every single replica
// inverted (must be outvoted) and every pair inverted (must win the vote).
module tb_tmr_comparator;
  localparam int WD = 64;
  logic [WD-1:0] x, y;
  logic [2:0]    force_replica, replica_mismatch;
  logic          mismatch;
  int checks = 0, failures = 0;

  tmr_comparator #(.WD(WD)) dut (.x, .y, .force_replica, .replica_mismatch, .mismatch);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic exp_diff;
      int   nforced;
      x = {$urandom, $urandom};
      y = x;
      if (t % 2 == 1) y[$urandom % WD] ^= 1'b1;
      if (t % 7 == 3) y = ~x;
      force_replica = 3'($urandom);
      #1;
      exp_diff = (x != y);
      nforced  = force_replica[0] + force_replica[1] + force_replica[2];
      checks++;
      if (mismatch !== (nforced >= 2 ? !exp_diff : exp_diff)) begin
        failures++;
        $display("FAIL t=%0d diff=%0b force=%b mismatch=%0b", t, exp_diff, force_replica, mismatch);
      end
      checks++;
      if (replica_mismatch !== ({3{exp_diff}} ^ force_replica)) begin
        failures++;
        $display("FAIL t=%0d replicas=%b", t, replica_mismatch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
