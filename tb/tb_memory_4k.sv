// tb_memory_4k: writes every location of the 4096 x 16 memory with a pattern and reads it
// back, then checks that a write only lands when WE is high.
module tb_memory_4k;
  logic        clk = 0, we;
  logic [11:0] addr;
  logic [15:0] din, dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  memory_4k dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  function automatic logic [15:0] pattern(int i);
    return 16'((i * 40503 + 12345) ^ (i << 3));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); we = 1; addr = 12'(i); din = pattern(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 4096; i++) begin
      addr = 12'(i); #1;
      checks++;
      if (dout !== pattern(i)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h dout=%h expected %h", addr, dout, pattern(i));
      end
    end
    // WE low: no write
    @(negedge clk); we = 0; addr = 12'h19a; din = ~pattern(12'h19a);
    @(posedge clk); #1;
    checks++;
    if (dout !== pattern(12'h19a)) begin failures++; $display("FAIL write with WE low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
