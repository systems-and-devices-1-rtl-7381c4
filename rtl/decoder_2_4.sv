// decoder_2_4: 2-to-4 one-hot decoder with enable (the D2_4E part).  It selects which of
// four registers is written, both in the register file and in the return-address stack.
// Y(i) is high when EN is high and A equals i; all outputs are low when EN is low.
// Purely combinational.
module decoder_2_4 (
  input  logic       en,
  input  logic [1:0] a,
  output logic [3:0] y
);
  always_comb begin
    y = 4'b0000;
    if (en) y[a] = 1'b1;
  end
endmodule
