// control_logic: the CPU's sequencer and instruction decoder.  Every instruction takes
// three clock cycles, one in each state of a FETCH -> DECODE -> EXECUTE cycle:
//   FETCH   the address multiplexer selects the PC and the instruction register loads
//           the memory word at the end of the cycle;
//   DECODE  the address multiplexer selects the operand address of the new instruction
//           (IR(11:0) or RY) so the memory read has a full cycle to settle; nothing is
//           written;
//   EXECUTE the address is held, and on the closing edge the register file, status
//           register, memory (stores), program counter and return stack are updated.
// Conditional jumps test the stored status register (ZERO or CARRY).  The status register
// is loaded only by arithmetic and logic instructions (ADD, SUB, AND, OR, ADDM, SUBM and
// their register forms, SL0), so MOVE and LOAD leave the flags alone.
// The three-state sequence, the control encoding and the flag policy are this design's
// choice; the document shows the block but not its contents.  CLR (asynchronous) returns
// the sequencer to FETCH.
module control_logic
  import simple_cpu_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic [DATA_W-1:0] ir,
  input  status_t           status,
  output ctrl_t             ctrl,
  output state_t            state
);
  ctrl_t  dec;     // decoded instruction, applied in EXECUTE
  state_t state_next;

  opcode_t op;
  subop_t  sub;
  assign op  = opcode_t'(ir[15:12]);
  assign sub = subop_t'(ir[3:0]);

  always_comb begin
    unique case (state)
      S_FETCH:  state_next = S_DECODE;
      S_DECODE: state_next = S_EXECUTE;
      default:  state_next = S_FETCH;
    endcase
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) state <= S_FETCH;
    else     state <= state_next;
  end

  // Instruction decoder
  always_comb begin
    dec        = '0;
    dec.asel   = ASEL_PC;
    dec.dsel   = DSEL_SEXT;
    dec.alu_op = ALU_PASSB;
    dec.sel_x  = ir[11:10];
    dec.sel_y  = ir[9:8];
    dec.pc_en  = 1'b1;
    unique case (op)
      OP_MOVE: begin dec.dsel = DSEL_SEXT; dec.rf_en = 1'b1; end
      OP_ADD:  begin dec.dsel = DSEL_SEXT; dec.alu_op = ALU_ADD; dec.rf_en = 1'b1; dec.status_en = 1'b1; end
      OP_SUB:  begin dec.dsel = DSEL_SEXT; dec.alu_op = ALU_SUB; dec.rf_en = 1'b1; dec.status_en = 1'b1; end
      OP_AND:  begin dec.dsel = DSEL_ZEXT; dec.alu_op = ALU_AND; dec.rf_en = 1'b1; dec.status_en = 1'b1; end
      OP_OR:   begin dec.dsel = DSEL_ZEXT; dec.alu_op = ALU_OR;  dec.rf_en = 1'b1; dec.status_en = 1'b1; end
      OP_LOAD: begin
        dec.sel_x = 2'd0; dec.asel = ASEL_IR; dec.dsel = DSEL_MEM; dec.rf_en = 1'b1;
      end
      OP_STORE: begin dec.sel_x = 2'd0; dec.asel = ASEL_IR; dec.ram_wr = 1'b1; end
      OP_ADDM: begin
        dec.sel_x = 2'd0; dec.asel = ASEL_IR; dec.dsel = DSEL_MEM; dec.alu_op = ALU_ADD;
        dec.rf_en = 1'b1; dec.status_en = 1'b1;
      end
      OP_SUBM: begin
        dec.sel_x = 2'd0; dec.asel = ASEL_IR; dec.dsel = DSEL_MEM; dec.alu_op = ALU_SUB;
        dec.rf_en = 1'b1; dec.status_en = 1'b1;
      end
      OP_JUMPU:  dec.pc_ld = 1'b1;
      OP_JUMPZ:  dec.pc_ld = status.zero;
      OP_JUMPNZ: dec.pc_ld = !status.zero;
      OP_JUMPC:  dec.pc_ld = status.carry;
      OP_CALL:   begin dec.pc_ld = 1'b1; dec.pc_push = 1'b1; end
      OP_RSVD:   ;
      OP_REG: begin
        case (sub)
          RG_MOVE:  begin dec.dsel = DSEL_RY; dec.rf_en = 1'b1; end
          RG_LOAD:  begin dec.asel = ASEL_RY; dec.dsel = DSEL_MEM; dec.rf_en = 1'b1; end
          RG_STORE: begin dec.asel = ASEL_RY; dec.ram_wr = 1'b1; end
          RG_ADD:   begin dec.dsel = DSEL_RY; dec.alu_op = ALU_ADD; dec.rf_en = 1'b1; dec.status_en = 1'b1; end
          RG_SUB:   begin dec.dsel = DSEL_RY; dec.alu_op = ALU_SUB; dec.rf_en = 1'b1; dec.status_en = 1'b1; end
          RG_AND:   begin dec.dsel = DSEL_RY; dec.alu_op = ALU_AND; dec.rf_en = 1'b1; dec.status_en = 1'b1; end
          RG_OR:    begin dec.dsel = DSEL_RY; dec.alu_op = ALU_OR;  dec.rf_en = 1'b1; dec.status_en = 1'b1; end
          RG_SL0:   begin dec.alu_op = ALU_SL0; dec.rf_en = 1'b1; dec.status_en = 1'b1; end
          RG_RET:   dec.pc_pop = 1'b1;
          default:  ;
        endcase
      end
      default: ;
    endcase
  end

  // Apply the decoded lines according to the state.
  always_comb begin
    ctrl = '0;
    unique case (state)
      S_FETCH: begin
        ctrl.asel  = ASEL_PC;
        ctrl.ir_en = 1'b1;
        ctrl.sel_x = dec.sel_x;
        ctrl.sel_y = dec.sel_y;
      end
      S_DECODE: begin
        ctrl.asel   = dec.asel;
        ctrl.dsel   = dec.dsel;
        ctrl.alu_op = dec.alu_op;
        ctrl.sel_x  = dec.sel_x;
        ctrl.sel_y  = dec.sel_y;
      end
      default: ctrl = dec;   // EXECUTE
    endcase
  end
endmodule
