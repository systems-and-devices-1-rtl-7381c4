// alu: the 16-bit arithmetic and logic unit.  A is the RX register operand and B comes
// from the data multiplexer.  Operations: pass B (MOVE, LOAD), A + B, A - B, A and B,
// A or B, and shift A left by one inserting 0 (SL0).
// It also computes the five status flags of the result, stored by the CPU's status
// register in the published bit order B0 ZERO, B1 CARRY, B2 OVERFLOW, B3 POSITIVE,
// B4 NEGATIVE.  The flag definitions are this design's choice:
//   ZERO     result is 0
//   CARRY    carry out of bit 15 for A + B; carry out of A + not B + 1 for A - B (so 1
//            means "no borrow"); the bit shifted out for SL0; 0 otherwise
//   OVERFLOW two's complement overflow of A + B or A - B; 0 otherwise
//   POSITIVE result is greater than 0 as a signed number
//   NEGATIVE bit 15 of the result
// Purely combinational.
module alu
  import simple_cpu_pkg::*;
(
  input  alu_op_t           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y,
  output status_t           flags
);
  logic [DATA_W:0] sum;
  logic [DATA_W:0] diff;

  assign sum  = {1'b0, a} + {1'b0, b};
  assign diff = {1'b0, a} + {1'b0, ~b} + 1'b1;

  always_comb begin
    flags = '0;
    unique case (op)
      ALU_PASSB: y = b;
      ALU_ADD: begin
        y              = sum[DATA_W-1:0];
        flags.carry    = sum[DATA_W];
        flags.overflow = (a[DATA_W-1] == b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_SUB: begin
        y              = diff[DATA_W-1:0];
        flags.carry    = diff[DATA_W];
        flags.overflow = (a[DATA_W-1] != b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SL0: begin
        y           = {a[DATA_W-2:0], 1'b0};
        flags.carry = a[DATA_W-1];
      end
      default: y = b;
    endcase
    flags.zero     = (y == '0);
    flags.negative = y[DATA_W-1];
    flags.positive = !y[DATA_W-1] && (y != '0);
  end
endmodule
