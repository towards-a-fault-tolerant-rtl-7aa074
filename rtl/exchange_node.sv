// exchange_node - two-input sorting node of the median network.
//
// One 8-bit magnitude comparator (A < B) drives the select lines of two 2:1
// multiplexers. With A < B the higher output H takes B and the lower output L
// takes A; otherwise H takes A and L takes B. Purely combinational.
//
// Interface: a, b in; h = max(a, b), l = min(a, b).
// The structure (one comparator, two multiplexers, select 0 = A on H and
// B on L) follows the node drawing of the design; the width is a parameter.
module exchange_node #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] h,
  output logic [W-1:0] l
);
  logic a_lt_b;

  always_comb begin
    a_lt_b = (a < b);
    h      = a_lt_b ? b : a;
    l      = a_lt_b ? a : b;
  end
endmodule
