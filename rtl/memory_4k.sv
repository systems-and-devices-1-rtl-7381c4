// memory_4k: the CPU's external memory, 2**ADDR_W words of DATA_W bits (4096 x 16 by
// default), holding both instructions and data.  Reading is asynchronous: DOUT follows
// ADDR combinationally.  Writing is synchronous: M[ADDR] takes DIN on the rising edge of
// CLK when WE is high.  The memory size follows the document; the read/write timing is
// this design's choice.  Contents are not cleared by reset; a program is loaded into
// the array before the CPU is released from reset.
module memory_4k #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = mem[addr];
endmodule
