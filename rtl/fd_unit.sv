// fd_unit: selects the recomputation scheme of one protected polynomial
// multiply-accumulate R = (+/-) A*b + C. SCHEME = FD_RENO builds reno_unit
// (negated operands, W-bit core), FD_RESO builds reso_unit (shifted operands,
// W+1-bit core). Both have the same ports and the same 2N+8-cycle timing, so
// the stage modules are written once for either scheme.
// Both schemes come from the published work; making them interchangeable
// behind one parameter is this design's choice.
module fd_unit
  import rlwe_pkg::*;
#(
  parameter int unsigned N      = 256,
  parameter int unsigned W      = 8,
  parameter bit          SUB    = 1'b0,
  parameter fd_scheme_e  SCHEME = FD_RENO
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0][W-1:0] a,
  input  logic [N-1:0]        b,
  input  logic [N-1:0][W-1:0] c,
  output logic                busy,
  output logic                done,
  output logic [N-1:0][W-1:0] result,
  output logic                fault
);

  if (SCHEME == FD_RESO) begin : g_reso
    reso_unit #(.N(N), .W(W), .SUB(SUB)) u_unit (
      .clk, .rst_n, .start, .a, .b, .c, .busy, .done, .result, .fault
    );
  end else begin : g_reno
    reno_unit #(.N(N), .W(W), .SUB(SUB)) u_unit (
      .clk, .rst_n, .start, .a, .b, .c, .busy, .done, .result, .fault
    );
  end

endmodule
