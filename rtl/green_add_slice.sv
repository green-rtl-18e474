// green_add_slice: one 8-bit slice of the ALU's accurate adder.
//
// Four slices form the ALU's 32-bit carry chain. Between neighbouring slices
// the ALU inserts a multiplexer that either forwards the lower slice's carry
// out or forces the carry in to 0, which splits the chain into independent
// 8-, 16- or 32-bit adders. The slice itself is a plain ripple/carry adder:
// {cout, s} = a + b + cin. The 8-bit slice width and the carry multiplexers
// follow the architecture; the adder itself is left to synthesis.
// Combinational.
module green_add_slice (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout
);
  always_comb {cout, s} = {1'b0, a} + {1'b0, b} + 9'(cin);
endmodule
