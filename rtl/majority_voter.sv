// majority_voter: bitwise two-out-of-three vote over three copies of a
// bank of WIDTH-bit words (declared signed to match the filter outputs), used behind the triplicated correction logic so
// that a fault in one copy does not reach the outputs.
//
// Interface and timing: purely combinational; o[i] = maj(a[i], b[i], c[i])
// bit by bit.
module majority_voter #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 18
) (
  input  logic signed [WIDTH-1:0] a [N],
  input  logic signed [WIDTH-1:0] b [N],
  input  logic signed [WIDTH-1:0] c [N],
  output logic signed [WIDTH-1:0] o [N]
);

  always_comb
    for (int i = 0; i < int'(N); i++) o[i] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);

endmodule
