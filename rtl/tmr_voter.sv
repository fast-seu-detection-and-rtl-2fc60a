// tmr_voter: bitwise two-out-of-three majority voter for the outputs of the
// triplicated processor.
//
// Each output bit is the majority of the three corresponding input bits, so
// a single replica that disagrees is outvoted. `mismatch` flags, in the same
// cycle, that at least one replica disagrees on at least one bit. Purely
// combinational, no latency.
//
// The voter stands between the three processor cores and the rest of the
// platform as in the described system; the bitwise majority and the mismatch
// flag are this design's choices, since the voter's insides are not given.
module tmr_voter #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  input  logic [W-1:0] in_c,
  output logic [W-1:0] voted,
  output logic         mismatch
);
  assign voted    = (in_a & in_b) | (in_a & in_c) | (in_b & in_c);
  assign mismatch = |((in_a ^ in_b) | (in_a ^ in_c));
endmodule
