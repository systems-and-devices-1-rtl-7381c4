// mux_3_12: the address multiplexer.  It drives the 12-bit address bus from one of three
// sources: A = PC(11:0) (instruction fetch), B = IR(11:0) (absolute address of LOAD,
// STORE, ADDM, SUBM) and C = RY(11:0) (register-indirect LOAD/STORE).
// As in the published schematic it is two two-input multiplexers in series: SEL0 chooses
// between A and B, and SEL1 chooses between that result and C.  So {SEL1,SEL0} = 00 -> A,
// 01 -> B, 1x -> C.  Purely combinational.
module mux_3_12 #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic             sel0,
  input  logic             sel1,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] ab;

  mux_2 #(.WIDTH(WIDTH)) u_mux_ab (.a(a),  .b(b), .sel(sel0), .y(ab));
  mux_2 #(.WIDTH(WIDTH)) u_mux_c  (.a(ab), .b(c), .sel(sel1), .y(y));
endmodule
