// tmr_comparator: equality check between the normal-run result and the
// decoded recomputed result, hardened by triple modular redundancy.
//
// Three identical comparators each raise a mismatch when x != y; a 2-of-3
// majority voter forms the output, so one comparator that is stuck or upset
// cannot hide a fault or raise a false alarm on its own. Purely
// combinational. The `force_replica` input lets a test (or a built-in
// self-test) invert the verdict of any single replica to show that the voter
// masks it; tie it to zero in normal use.
//
// Triplicating the comparators with a majority voter follows the published
// scheme; the replica-invert test input is this design's addition.
// A synthesis tool will merge the three identical replicas unless told to
// keep them (for example with a keep/dont_touch attribute on the replicas).
module tmr_comparator #(
  parameter int unsigned WD = 2048  // compared bits
) (
  input  logic [WD-1:0] x,
  input  logic [WD-1:0] y,
  input  logic [2:0]    force_replica,
  output logic [2:0]    replica_mismatch,
  output logic          mismatch
);

  for (genvar k = 0; k < 3; k++) begin : g_rep
    assign replica_mismatch[k] = (x != y) ^ force_replica[k];
  end

  assign mismatch = (replica_mismatch[0] & replica_mismatch[1])
                  | (replica_mismatch[1] & replica_mismatch[2])
                  | (replica_mismatch[0] & replica_mismatch[2]);

endmodule
