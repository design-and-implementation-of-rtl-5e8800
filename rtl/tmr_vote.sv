// tmr_vote: bitwise two-out-of-three majority of a triplicated bundle. The
// I/O boards use it on the triply redundant bus control lines, so that one
// stuck or corrupted copy of a control line is outvoted. Combinational.
// The document states that control lines are triplicated and voted by the
// boards; the plain majority gate is the obvious realisation.
module tmr_vote #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         disagree   // some copy differs from the others
);
  assign y        = (a & b) | (a & c) | (b & c);
  assign disagree = (a != b) || (a != c);
endmodule
