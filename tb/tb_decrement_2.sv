// tb_decrement_2: exhaustive check of the two-bit decrementer against (A - 1) mod 4 and
// against the published truth table (00->11, 01->00, 10->01, 11->10).
module tb_decrement_2;
  logic [1:0] a, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  decrement_2 dut (.a(a), .y(y));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] table_y [4];
    table_y = '{2'b11, 2'b00, 2'b01, 2'b10};
    for (int i = 0; i < 4; i++) begin
      a = 2'(i);
      #1;
      checks++;
      if (y !== table_y[i] || y !== 2'((i + 3) % 4)) begin
        failures++;
        $display("FAIL a=%b y=%b expected %b", a, y, table_y[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
