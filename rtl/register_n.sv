// register_n: a WIDTH-bit register with clock enable and clear, the reg_16 / reg_12
// building block of the CPU (instruction register, general purpose registers, program
// counter register, status register, return-stack entries).
// Q takes D on the rising edge of CLK when EN is high.  CLR is an asynchronous,
// active-high clear to zero; its polarity and asynchronous action are this design's choice.
module register_n #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (en) q <= d;
  end
endmodule
