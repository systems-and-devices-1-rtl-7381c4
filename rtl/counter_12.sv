// counter_12: the 12-bit program counter with its subroutine support.  As published it is
// a register, two multiplexers and an adder, extended for CALL/RET with the lifo_12
// return-address stack and a second adder that forms the return address PC + 1.
//
// Datapath: the first mux_2 selects the current PC or the jump target DIN (LD = 1); the
// adder adds 1 to the PC (increment) or 0 to DIN (jump); the second mux_2 selects that sum
// or the top of the return stack (POP = 1); the PC register loads the result when EN is
// high.  PUSH writes PC + 1 into the stack, so CALL is LD + PUSH in one cycle and RET is
// POP.  EN = 0 holds the PC; the stack also only moves when EN is high.
// Timing: one rising CLK edge per update; CLR (asynchronous) resets the PC to 0 and
// empties the stack.  How the adder's second operand and carry are driven is not legible
// in the schematic and is this design's reading.
module counter_12 #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             en,    // update the PC this cycle
  input  logic             ld,    // load DIN (jump / call target) instead of incrementing
  input  logic             push,  // CALL: save PC + 1 on the return stack
  input  logic             pop,   // RET: load the PC from the return stack
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] pc, src, sum, next_pc, ret_addr, stack_top;
  logic             cout_unused, ret_cout_unused;

  mux_2 #(.WIDTH(WIDTH)) u_src_mux (.a(pc), .b(din), .sel(ld), .y(src));

  adder_n #(.WIDTH(WIDTH)) u_inc (
    .a(src), .b('0), .cin(~ld), .sum(sum), .cout(cout_unused)
  );

  mux_2 #(.WIDTH(WIDTH)) u_ret_mux (.a(sum), .b(stack_top), .sel(pop), .y(next_pc));

  register_n #(.WIDTH(WIDTH)) u_pc (.clk(clk), .clr(clr), .en(en), .d(next_pc), .q(pc));

  // Return address for CALL.
  adder_n #(.WIDTH(WIDTH)) u_ret_inc (
    .a(pc), .b('0), .cin(1'b1), .sum(ret_addr), .cout(ret_cout_unused)
  );

  lifo_12 #(.WIDTH(WIDTH)) u_lifo (
    .clk(clk), .clr(clr), .push(en & push), .pop(en & pop),
    .data_in(ret_addr), .data_out(stack_top)
  );

  assign dout = pc;
endmodule
