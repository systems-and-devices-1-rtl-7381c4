// adder_n: WIDTH-bit adder with carry in and carry out (the add_12 part of the program
// counter).  {COUT, SUM} = A + B + CIN.  Purely combinational.
module adder_n #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  assign {cout, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, cin};
endmodule
