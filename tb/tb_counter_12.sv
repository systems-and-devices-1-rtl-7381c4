// tb_counter_12: checks the program counter's increment, jump, CALL (push PC + 1 and jump)
// and RET (pop), the EN hold, and replays the published nested-call example: CALL SubA at
// 0 (SubA = 2), CALL SubB at 2 (SubB = 4), CALL SubC at 4 (SubC = 6), CALL SubD at 6
// (SubD = 8), then RET from 9, 7, 5, 3 returning to 7, 5, 3, 1.
module tb_counter_12;
  logic        clk = 0, clr, en, ld, push, pop;
  logic [11:0] din, dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  counter_12 dut (.clk(clk), .clr(clr), .en(en), .ld(ld), .push(push), .pop(pop),
                  .din(din), .dout(dout));

  task automatic step(logic e, logic l, logic pu, logic po, logic [11:0] d,
                      logic [11:0] exp_pc, string what);
    @(negedge clk); en = e; ld = l; push = pu; pop = po; din = d;
    @(posedge clk); #1;
    en = 0; ld = 0; push = 0; pop = 0;
    checks++;
    if (dout !== exp_pc) begin
      failures++;
      $display("FAIL %s: PC=%0d expected %0d", what, dout, exp_pc);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; en = 0; ld = 0; push = 0; pop = 0; din = '0;
    #12 clr = 0;
    checks++;
    if (dout !== 0) begin failures++; $display("FAIL reset PC=%0d", dout); end
    step(1, 1, 1, 0, 12'd2, 12'd2, "CALL SubA");
    step(0, 0, 0, 0, 12'd0, 12'd2, "hold");
    step(1, 1, 1, 0, 12'd4, 12'd4, "CALL SubB");
    step(1, 1, 1, 0, 12'd6, 12'd6, "CALL SubC");
    step(1, 1, 1, 0, 12'd8, 12'd8, "CALL SubD");
    step(1, 0, 0, 0, 12'd0, 12'd9, "MOVE RA 0x01");
    step(1, 0, 0, 1, 12'd0, 12'd7, "RET to SubC");
    step(1, 0, 0, 1, 12'd0, 12'd5, "RET to SubB");
    step(1, 0, 0, 1, 12'd0, 12'd3, "RET to SubA");
    step(1, 0, 0, 1, 12'd0, 12'd1, "RET to Start");
    step(1, 1, 0, 0, 12'd0, 12'd0, "JUMP Start");
    // counting and wrap-around of the 12-bit PC
    step(1, 1, 0, 0, 12'hffe, 12'hffe, "JUMP 0xFFE");
    step(1, 0, 0, 0, 12'd0, 12'hfff, "inc");
    step(1, 0, 0, 0, 12'd0, 12'h000, "inc wraps");
    for (int i = 0; i < 200; i++) begin
      logic [11:0] t;
      t = 12'($urandom);
      step(1, 1, 0, 0, t, t, "random jump");
      step(1, 0, 0, 0, 12'd0, t + 12'd1, "random inc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
