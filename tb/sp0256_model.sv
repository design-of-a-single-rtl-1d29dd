// sp0256_model - behavioural model of the SP0256 speech synthesizer's
// CPU-facing pins, for simulation only (not synthesizable).
//
// The real chip reads a 6-bit allophone address on A6:1 at the falling
// edge of ALD# when it stands by (SBY = 1), drops SBY while it speaks the
// allophone and raises it again when done; input is not accepted while SBY
// is 0. This model keeps that protocol, replaces the sound by a fixed
// SPEAK_NS delay, and records every accepted code in order so a testbench
// can check what was "spoken". Falling edges of ALD# while busy are
// counted as ignored.
module sp0256_model #(
  parameter int SPEAK_NS = 200,   // duration of one allophone
  parameter int MAX_CODES = 64    // size of the record
) (
  input  logic [5:0] a,       // A6:1
  input  logic       ald_n,   // ALD#
  output logic       sby      // SBY
);

  logic [5:0] spoken [MAX_CODES];
  int         n_spoken  = 0;
  int         n_ignored = 0;

  initial sby = 1'b1;

  always @(negedge ald_n) begin
    if (sby) begin
      if (n_spoken < MAX_CODES) spoken[n_spoken] = a;
      n_spoken++;
      sby = 1'b0;
      #(SPEAK_NS);
      sby = 1'b1;
    end else begin
      n_ignored++;
    end
  end

endmodule
