// mux_2: WIDTH-bit two-input multiplexer (the mux_2_12 part).  Y = A when SEL is 0 and
// Y = B when SEL is 1.  Purely combinational.
module mux_2 #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  assign y = sel ? b : a;
endmodule
