// bit_shift_reg: parallel-in, serial-out shift register that feeds a binary
// polynomial to the multiplier one coefficient per cycle.
//
// `load` captures the n-bit vector (bit i = coefficient of x^i); each `shift`
// moves it up one place. `bit_out` is always the current top bit, so after a
// load the coefficients appear highest degree first, as the Horner-order
// multiplier needs. Load wins over shift. Reset clears the register.
//
// The published architecture names a shift register feeding r1, r2 (or e1)
// bit by bit; the most-significant-first order is this design's choice and
// matches the multiplier's Horner evaluation.
module bit_shift_reg #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] din,
  output logic         bit_out
);

  logic [N-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {sr[N-2:0], 1'b0};
  end

  assign bit_out = sr[N-1];

endmodule
