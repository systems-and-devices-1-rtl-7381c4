// tb_mux_3_12: random check of the address multiplexer: {SEL1,SEL0} = 00 -> PC input A,
// 01 -> IR input B, 1x -> RY input C.
module tb_mux_3_12;
  logic [11:0] a, b, c, y, exp_y;
  logic        sel0, sel1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mux_3_12 dut (.a(a), .b(b), .c(c), .sel0(sel0), .sel1(sel1), .y(y));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a = 12'($urandom); b = 12'($urandom); c = 12'($urandom);
      {sel1, sel0} = 2'(i % 4);
      exp_y = sel1 ? c : (sel0 ? b : a);
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%b%b y=%h expected %h", sel1, sel0, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
