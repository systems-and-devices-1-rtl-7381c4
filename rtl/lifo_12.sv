// lifo_12: the four-entry, 12-bit last-in first-out return-address stack used by CALL
// and RET.  It is built as published: four 12-bit registers, a two-bit stack counter
// (the write pointer), a two-bit decrementer that derives the read pointer from it, a
// 2-to-4 one-hot decoder that picks the register to write, and a four-input multiplexer
// that presents the read-pointer entry on DATA_OUT.
//
// After CLR the write pointer is 0 and the read pointer 3.  PUSH (on a rising CLK edge)
// writes DATA_IN into the entry at the write pointer and advances both pointers by one.
// POP moves both pointers back by one; the entry being popped is on DATA_OUT during the
// cycle in which POP is high, so the caller samples it on the same edge.  DATA_OUT is
// combinational from the read pointer.  The pointers wrap modulo 4: a fifth nested push
// overwrites the oldest return address, and there is no full or empty flag (the document
// describes none).  Asserting PUSH and POP together is not allowed.
module lifo_12 #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);
  logic [1:0]            wr_ptr, rd_ptr, wr_ptr_next;
  logic [3:0]            wr_sel;
  logic [3:0][WIDTH-1:0] entry;

  // Stack counter: counts up on PUSH, steps back to the read pointer on POP.
  always_comb begin
    wr_ptr_next = wr_ptr;
    if (push)     wr_ptr_next = wr_ptr + 2'd1;
    else if (pop) wr_ptr_next = rd_ptr;
  end

  register_n #(.WIDTH(2)) u_counter (
    .clk(clk), .clr(clr), .en(push | pop), .d(wr_ptr_next), .q(wr_ptr)
  );

  decrement_2 u_dec (.a(wr_ptr), .y(rd_ptr));

  decoder_2_4 u_wsel (.en(push), .a(wr_ptr), .y(wr_sel));

  for (genvar i = 0; i < 4; i++) begin : g_entry
    register_n #(.WIDTH(WIDTH)) u_entry (
      .clk(clk), .clr(clr), .en(wr_sel[i]), .d(data_in), .q(entry[i])
    );
  end

  mux_4 #(.WIDTH(WIDTH)) u_rmux (.d(entry), .sel(rd_ptr), .y(data_out));

  a_push_pop_exclusive: assert property (@(posedge clk) !(push && pop))
    else $error("lifo_12: PUSH and POP asserted together");
endmodule
