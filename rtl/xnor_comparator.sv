// xnor_comparator: equality comparator built from XNOR gates.
//
// Each bit pair goes through an XNOR; the reduction AND of the XNOR outputs
// is 1 exactly when the two words are equal. This is the basic cell of both
// the header filtering rules (32-bit address and 16-bit port comparators)
// and the payload pattern matchers (8-bit byte comparators), as the design
// specifies. Purely combinational, no clock.
//
//   a, b : words to compare (WIDTH bits)
//   eq   : 1 when a == b
module xnor_comparator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);
  logic [WIDTH-1:0] same;

  always_comb begin
    same = a ~^ b;
    eq   = &same;
  end
endmodule
