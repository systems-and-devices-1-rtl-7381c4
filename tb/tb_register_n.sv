// tb_register_n: random check of the enable/clear register against a reference value,
// including the asynchronous clear.
module tb_register_n;
  localparam int W = 16;
  logic         clk = 0, clr, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  register_n dut (.clk(clk), .clr(clr), .en(en), .d(d), .q(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; en = 0; d = '0; model = '0;
    #12 clr = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      d  = W'($urandom);
      if (en) model = d;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", i, q, model);
      end
      if (i % 97 == 50) begin
        // asynchronous clear in the middle of a cycle
        #2 clr = 1; #1;
        checks++;
        if (q !== '0) begin failures++; $display("FAIL clear q=%h", q); end
        clr = 0; model = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
