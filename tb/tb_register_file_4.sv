// tb_register_file_4: random writes and dual reads against a four-entry reference array;
// checks that only register SEL_X is written, only when EN is high, and that CLR clears.
module tb_register_file_4;
  logic        clk = 0, clr, en;
  logic [15:0] din, rx, ry;
  logic [1:0]  sel_x, sel_y;
  logic [15:0] model [4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  register_file_4 dut (.clk(clk), .clr(clr), .en(en), .din(din), .sel_x(sel_x),
                       .sel_y(sel_y), .rx(rx), .ry(ry));

  task automatic check_reads();
    for (int x = 0; x < 4; x++) begin
      sel_x = 2'(x); sel_y = 2'(3 - x);
      #1;
      checks++;
      if (rx !== model[x] || ry !== model[3 - x]) begin
        failures++;
        $display("FAIL read x=%0d rx=%h/%h ry=%h/%h", x, rx, model[x], ry, model[3-x]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; en = 0; din = '0; sel_x = 0; sel_y = 0;
    foreach (model[i]) model[i] = '0;
    #12 clr = 0;
    check_reads();
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      din = 16'($urandom);
      sel_x = 2'($urandom); sel_y = 2'($urandom);
      if (en) model[sel_x] = din;
      @(posedge clk); #1;
      en = 0;
      check_reads();
    end
    clr = 1; #1; clr = 0;
    foreach (model[i]) model[i] = '0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
