// simple_cpu_pkg: types and constants shared by the blocks of the 16-bit SimpleCPU
// (version "v1d").  The CPU has a 12-bit address bus (4096 x 16-bit memory), a 16-bit
// datapath, a four-entry register file RA..RD, a five-bit status register and a four-deep
// hardware return-address stack for CALL/RET.
//
// Instruction word: IR(15:12) is the opcode.  Opcode 0100 (LOAD RA,A), the 12-bit absolute
// address field IR(11:0), the destination field IR(11:10) of the immediate group, the
// source field IR(9:8), the "register group" that shares one opcode and uses the low
// nibble IR(3:0) as a sub-opcode, and sub-opcode 0100 = ADD RX,RY follow the published
// instruction formats.  The remaining opcode and sub-opcode values are this design's own
// assignment.
package simple_cpu_pkg;

  localparam int unsigned DATA_W   = 16;   // data bus, registers, ALU
  localparam int unsigned ADDR_W   = 12;   // address bus: 4096 memory locations

  // Main opcode, IR(15:12)
  typedef enum logic [3:0] {
    OP_MOVE   = 4'b0000,  // RD <- sign-extended IR(7:0)
    OP_ADD    = 4'b0001,  // RD <- RD + sign-extended IR(7:0)
    OP_SUB    = 4'b0010,  // RD <- RD - sign-extended IR(7:0)
    OP_AND    = 4'b0011,  // RD <- RD and zero-extended IR(7:0)
    OP_LOAD   = 4'b0100,  // RA <- M[IR(11:0)]
    OP_STORE  = 4'b0101,  // M[IR(11:0)] <- RA
    OP_ADDM   = 4'b0110,  // RA <- RA + M[IR(11:0)]
    OP_SUBM   = 4'b0111,  // RA <- RA - M[IR(11:0)]
    OP_JUMPU  = 4'b1000,  // PC <- IR(11:0)
    OP_JUMPZ  = 4'b1001,  // if ZERO     PC <- IR(11:0)
    OP_JUMPNZ = 4'b1010,  // if not ZERO PC <- IR(11:0)
    OP_JUMPC  = 4'b1011,  // if CARRY    PC <- IR(11:0)
    OP_CALL   = 4'b1100,  // push PC+1, PC <- IR(11:0)
    OP_OR     = 4'b1101,  // RD <- RD or zero-extended IR(7:0)
    OP_RSVD   = 4'b1110,  // reserved: executes as a no-operation
    OP_REG    = 4'b1111   // register group, sub-opcode in IR(3:0)
  } opcode_t;

  // Sub-opcode of the register group, IR(3:0); RX = IR(11:10), RY = IR(9:8)
  typedef enum logic [3:0] {
    RG_MOVE  = 4'b0000,   // RX <- RY
    RG_LOAD  = 4'b0001,   // RX <- M[RY(11:0)]   (register indirect)
    RG_STORE = 4'b0010,   // M[RY(11:0)] <- RX   (register indirect)
    RG_ADD   = 4'b0100,   // RX <- RX + RY
    RG_SUB   = 4'b0110,   // RX <- RX - RY
    RG_AND   = 4'b0111,   // RX <- RX and RY
    RG_OR    = 4'b1000,   // RX <- RX or RY
    RG_SL0   = 4'b1010,   // RX <- RX(14:0) & '0'
    RG_RET   = 4'b1111    // pop return address into PC
  } subop_t;

  typedef enum logic [2:0] {
    ALU_PASSB = 3'd0,     // Y <- B
    ALU_ADD   = 3'd1,     // Y <- A + B
    ALU_SUB   = 3'd2,     // Y <- A - B
    ALU_AND   = 3'd3,     // Y <- A and B
    ALU_OR    = 3'd4,     // Y <- A or B
    ALU_SL0   = 3'd5      // Y <- A(14:0) & '0'
  } alu_op_t;

  // Data multiplexer (ALU B operand) select
  typedef enum logic [1:0] {
    DSEL_SEXT = 2'd0,     // sign-extended IR(7:0)
    DSEL_ZEXT = 2'd1,     // zero-extended IR(7:0)
    DSEL_MEM  = 2'd2,     // memory read data
    DSEL_RY   = 2'd3      // register file port RY
  } dsel_t;

  // Address multiplexer select {SEL1, SEL0}: input A=PC, B=IR(11:0), C=RY(11:0)
  typedef enum logic [1:0] {
    ASEL_PC = 2'b00,
    ASEL_IR = 2'b01,
    ASEL_RY = 2'b10
  } asel_t;

  // Status register: B0 ZERO, B1 CARRY, B2 OVERFLOW, B3 POSITIVE, B4 NEGATIVE
  typedef struct packed {
    logic negative;   // B4
    logic positive;   // B3
    logic overflow;   // B2
    logic carry;      // B1
    logic zero;       // B0
  } status_t;

  typedef enum logic [1:0] {
    S_FETCH   = 2'd0,
    S_DECODE  = 2'd1,
    S_EXECUTE = 2'd2
  } state_t;

  // Control lines driven by the control logic
  typedef struct packed {
    logic       ir_en;      // load the instruction register from memory
    logic       pc_en;      // update the program counter
    logic       pc_ld;      // PC <- IR(11:0) (jump / call target)
    logic       pc_push;    // push PC + 1 onto the return stack (CALL)
    logic       pc_pop;     // PC <- top of the return stack (RET)
    asel_t      asel;       // address multiplexer select
    dsel_t      dsel;       // data multiplexer select
    alu_op_t    alu_op;     // ALU operation
    logic       rf_en;      // write the ALU result into register SEL_X
    logic [1:0] sel_x;      // register file port X: destination and A operand
    logic [1:0] sel_y;      // register file port Y: B operand / indirect address
    logic       status_en;  // load the status register from the ALU flags
    logic       ram_wr;     // write RX into memory
  } ctrl_t;

  // Instruction-word builders, used by testbenches and program generators
  function automatic logic [15:0] enc_imm(opcode_t op, logic [1:0] rd, logic [7:0] k);
    return {op, rd, 2'b00, k};
  endfunction

  function automatic logic [15:0] enc_abs(opcode_t op, logic [11:0] a);
    return {op, a};
  endfunction

  function automatic logic [15:0] enc_reg(subop_t sub, logic [1:0] rx, logic [1:0] ry);
    return {OP_REG, rx, ry, 4'b0000, sub};
  endfunction

endpackage
