// tb_decoder_2_4: exhaustive check of the 2-to-4 one-hot decoder with enable.
module tb_decoder_2_4;
  logic       en;
  logic [1:0] a;
  logic [3:0] y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  decoder_2_4 dut (.en(en), .a(a), .y(y));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 4; i++) begin
        logic [3:0] exp_y;
        en = 1'(e);
        a  = 2'(i);
        exp_y = (e == 1) ? 4'(1 << i) : 4'b0000;
        #1;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL en=%b a=%0d y=%b expected %b", en, a, y, exp_y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
