// register_file_4: four 16-bit general purpose registers (RA, RB, RC, RD) with one write
// port and two read ports.  As published it is four reg_16 registers, a D2_4E 2-to-4
// decoder that enables the register named by SEL_X when EN is high, and two mux_4_16
// read multiplexers driving RX (register SEL_X) and RY (register SEL_Y).
// So the destination register is always the RX operand.  Writes happen on the rising
// edge of CLK; reads are combinational; CLR asynchronously clears every register.
module register_file_4
  import simple_cpu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  input  logic [1:0]       sel_x,
  input  logic [1:0]       sel_y,
  output logic [WIDTH-1:0] rx,
  output logic [WIDTH-1:0] ry
);
  logic [3:0]            we;
  logic [3:0][WIDTH-1:0] r;

  decoder_2_4 u_dec (.en(en), .a(sel_x), .y(we));

  for (genvar i = 0; i < 4; i++) begin : g_reg
    register_n #(.WIDTH(WIDTH)) u_reg (.clk(clk), .clr(clr), .en(we[i]), .d(din), .q(r[i]));
  end

  mux_4 #(.WIDTH(WIDTH)) u_mux_x (.d(r), .sel(sel_x), .y(rx));
  mux_4 #(.WIDTH(WIDTH)) u_mux_y (.d(r), .sel(sel_y), .y(ry));
endmodule
