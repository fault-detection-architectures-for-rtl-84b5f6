// fd_ctrl: sequencer for one recomputation-protected polynomial unit.
//
// A `start` runs the datapath twice on the same hardware: first the normal
// run (run = 0), then the recomputed run on encoded operands (run = 1).
// Each run is
//   LOAD   1 cycle : clear the accumulators, load the bit shift register
//   MUL    N cycles: s1 = 0, one Horner step and one shift per cycle
//   ADD    1 cycle : s1 = 1, add the addend polynomial
//   DRAIN  1 cycle : let the sub-pipeline register empty into the accumulators
// The LOAD cycle of the recomputed run also asserts `cap_norm`, so the normal
// result is captured at the same clock edge that clears the accumulators.
// After the recomputed run a CMP cycle asserts `cmp`, when the unit registers
// the comparator verdict, and `done` is high in the following cycle. Counting
// the clock edge that samples `start` as the first, `done` is high after edge
// 2*N + 8: two runs of N+3 cycles, the IDLE-to-LOAD edge and the CMP cycle.
// An unprotected single run would need N+4.
//
// Running the original and the recomputed operation back to back (2n cycles
// in total) follows the published scheme; the exact state split is this
// design's choice.
module fd_ctrl #(
  parameter int unsigned N = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic done,
  output logic run,       // 0: normal run, 1: recomputed run
  output logic load,      // clear core, load shift register
  output logic shift,     // advance the shift register
  output logic step,      // issue a core step
  output logic s1,        // 0: multiply step, 1: add step
  output logic cap_norm,  // capture the normal-run result
  output logic cmp        // register the comparison
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_MUL, S_ADD, S_DRAIN, S_CMP} state_e;

  state_e                 state;
  logic [$clog2(N)-1:0]   cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      run   <= 1'b0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          run   <= 1'b0;
        end
        S_LOAD: begin
          state <= S_MUL;
          cnt   <= '0;
        end
        S_MUL: begin
          cnt <= cnt + 1'b1;
          if (cnt == $clog2(N)'(N - 1)) state <= S_ADD;
        end
        S_ADD:   state <= S_DRAIN;
        S_DRAIN: begin
          if (!run) begin
            state <= S_LOAD;
            run   <= 1'b1;
          end else begin
            state <= S_CMP;
          end
        end
        S_CMP: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign load     = (state == S_LOAD);
  assign shift    = (state == S_MUL);
  assign step     = (state == S_MUL) || (state == S_ADD);
  assign s1       = (state == S_ADD);
  assign cap_norm = (state == S_LOAD) && run;
  assign cmp      = (state == S_CMP);

endmodule
