// mux_4: WIDTH-bit four-input multiplexer (the mux_4_16 part of the register file and
// the four-input multiplexer of the return-address stack).  Y = D[SEL].  Combinational.
module mux_4 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [3:0][WIDTH-1:0] d,
  input  logic [1:0]            sel,
  output logic [WIDTH-1:0]      y
);
  assign y = d[sel];
endmodule
