// isa_add: sub-adder (ADD) of one speculative path.
//
// A regular BLOCK-bit binary adder: sum and carry-out of a + b + cin, where
// cin is the speculated carry of the path (or the adder carry-in for the
// lowest path). Its carry-out is the carry the next path's compensation block
// compares with that path's speculation. The document gives only its function;
// the '+' leaves the adder architecture to synthesis.
//
// Interface: a, b (BLOCK bits), cin; sum (BLOCK bits), cout. Combinational.
module isa_add #(
  parameter int unsigned BLOCK = 8
) (
  input  logic [BLOCK-1:0] a,
  input  logic [BLOCK-1:0] b,
  input  logic             cin,
  output logic [BLOCK-1:0] sum,
  output logic             cout
);

  assign {cout, sum} = {1'b0, a} + {1'b0, b} + {{BLOCK{1'b0}}, cin};

endmodule
