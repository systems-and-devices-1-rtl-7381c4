// data_mux: the data multiplexer in front of the ALU's B input.  It widens the 8-bit
// immediate of the instruction to 16 bits in one of two ways, as the document specifies:
// sign-extended, (IR(7))^8 & IR(7:0), used by MOVE (and here by ADD and SUB), or
// zero-extended, (0)^8 & IR(7:0), used by AND and OR.  Its other inputs are the 16-bit
// memory read data (LOAD, ADDM, SUBM, register-indirect LOAD) and register port RY
// (register-register instructions).  The use of sign extension for ADD/SUB immediates and
// the select encoding are this design's choice.  Purely combinational.
module data_mux
  import simple_cpu_pkg::*;
(
  input  dsel_t             sel,
  input  logic [7:0]        imm,
  input  logic [DATA_W-1:0] mem,
  input  logic [DATA_W-1:0] ry,
  output logic [DATA_W-1:0] y
);
  always_comb begin
    unique case (sel)
      DSEL_SEXT: y = {{(DATA_W-8){imm[7]}}, imm};
      DSEL_ZEXT: y = {{(DATA_W-8){1'b0}}, imm};
      DSEL_MEM:  y = mem;
      DSEL_RY:   y = ry;
      default:   y = mem;
    endcase
  end
endmodule
