// simple_cpu_v1d: a 16-bit, register-based, multi-cycle CPU with a 12-bit address bus.
// It is the "v1d" upgrade of a single-accumulator 8-bit CPU: the address bus grows to
// 12 bits (4096 x 16 memory) while keeping the 4-bit opcode + 12-bit address instruction
// format, the data path grows to 16 bits, the accumulator is replaced by four general
// purpose registers plus a status register, register and register-indirect addressing
// are added, and CALL/RET are supported by a hardware return-address stack in the PC.
//
// Blocks (as in the published schematic): IR (register_n, 16 bit), PC (counter_12 with
// its lifo_12 stack), ADDR (mux_3_12: PC, IR(11:0), RY(11:0)), control_logic, DATA
// (data_mux), alu, register_file_4, the status register (register_n, 5 bit) and the
// data-out buffer, which here is the plain output DATA_OUT = RX qualified by RAM_WR.
//
// Memory interface: ADDR and DATA_OUT are valid while RAM_WR is high; the memory must
// write DATA_OUT to ADDR on the rising CLK edge that ends that cycle.  DATA_IN must be
// the (asynchronously read) word at ADDR within the same cycle.  Each instruction takes
// three cycles (FETCH, DECODE, EXECUTE; see control_logic).  CLR is an asynchronous,
// active-high reset: PC = 0, registers, status and stack cleared.
module simple_cpu_v1d
  import simple_cpu_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic [ADDR_W-1:0] addr,
  output logic              ram_wr
);
  ctrl_t             ctrl;
  state_t            state;
  logic [DATA_W-1:0] ir, rx, ry, alu_b, alu_y;
  logic [ADDR_W-1:0] pc;
  status_t           status, flags;

  register_n #(.WIDTH(DATA_W)) u_ir (
    .clk(clk), .clr(clr), .en(ctrl.ir_en), .d(data_in), .q(ir)
  );

  counter_12 #(.WIDTH(ADDR_W)) u_pc (
    .clk(clk), .clr(clr), .en(ctrl.pc_en), .ld(ctrl.pc_ld), .push(ctrl.pc_push),
    .pop(ctrl.pc_pop), .din(ir[ADDR_W-1:0]), .dout(pc)
  );

  mux_3_12 #(.WIDTH(ADDR_W)) u_addr_mux (
    .a(pc), .b(ir[ADDR_W-1:0]), .c(ry[ADDR_W-1:0]),
    .sel0(ctrl.asel[0]), .sel1(ctrl.asel[1]), .y(addr)
  );

  control_logic u_ctrl (
    .clk(clk), .clr(clr), .ir(ir), .status(status), .ctrl(ctrl), .state(state)
  );

  data_mux u_data_mux (
    .sel(ctrl.dsel), .imm(ir[7:0]), .mem(data_in), .ry(ry), .y(alu_b)
  );

  alu u_alu (.op(ctrl.alu_op), .a(rx), .b(alu_b), .y(alu_y), .flags(flags));

  register_file_4 #(.WIDTH(DATA_W)) u_regs (
    .clk(clk), .clr(clr), .en(ctrl.rf_en), .din(alu_y),
    .sel_x(ctrl.sel_x), .sel_y(ctrl.sel_y), .rx(rx), .ry(ry)
  );

  register_n #(.WIDTH($bits(status_t))) u_status (
    .clk(clk), .clr(clr), .en(ctrl.status_en), .d(flags), .q(status)
  );

  // Data-out buffer (buf16): RX is presented to memory, RAM_WR qualifies it.
  assign data_out = rx;
  assign ram_wr   = ctrl.ram_wr;
endmodule
