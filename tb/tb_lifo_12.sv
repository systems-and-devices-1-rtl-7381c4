// tb_lifo_12: replays the published nested-subroutine example on the return-address
// stack (pushes of 1, 3, 5, 7 then four pops returning 7, 5, 3, 1, with the write/read
// pointer values shown at each step), then runs random push/pop traffic against a
// circular reference model, including wrap-around after more than four pushes.
module tb_lifo_12;
  logic        clk = 0, clr, push, pop;
  logic [11:0] data_in, data_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lifo_12 dut (.clk(clk), .clr(clr), .push(push), .pop(pop),
               .data_in(data_in), .data_out(data_out));

  // reference: circular buffer of four entries with a write pointer
  logic [11:0] model [4];
  int          wp;

  task automatic check_ptrs(int exp_wr, int exp_rd, string what);
    checks++;
    if (dut.wr_ptr !== 2'(exp_wr) || dut.rd_ptr !== 2'(exp_rd)) begin
      failures++;
      $display("FAIL %s: WR=%0d RD=%0d expected WR=%0d RD=%0d", what, dut.wr_ptr, dut.rd_ptr,
               exp_wr, exp_rd);
    end
  endtask

  task automatic do_push(logic [11:0] v);
    @(negedge clk); push = 1; pop = 0; data_in = v;
    model[wp] = v; wp = (wp + 1) % 4;
    @(posedge clk); #1; push = 0;
  endtask

  task automatic do_pop();
    logic [11:0] expv;
    @(negedge clk); push = 0; pop = 1;
    wp = (wp + 3) % 4; expv = model[wp];
    #1;
    checks++;
    if (data_out !== expv) begin
      failures++;
      $display("FAIL pop data_out=%0d expected %0d", data_out, expv);
    end
    @(posedge clk); #1; pop = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; push = 0; pop = 0; data_in = '0; wp = 0;
    #12 clr = 0;
    check_ptrs(0, 3, "reset");
    do_push(12'd1); check_ptrs(1, 0, "CALL SubA");
    do_push(12'd3); check_ptrs(2, 1, "CALL SubB");
    do_push(12'd5); check_ptrs(3, 2, "CALL SubC");
    do_push(12'd7); check_ptrs(0, 3, "CALL SubD");
    checks++;
    if (data_out !== 12'd7) begin failures++; $display("FAIL top after four pushes"); end
    do_pop(); check_ptrs(3, 2, "RET from SubD");
    do_pop(); check_ptrs(2, 1, "RET from SubC");
    do_pop(); check_ptrs(1, 0, "RET from SubB");
    do_pop(); check_ptrs(0, 3, "RET from SubA");
    // random traffic, depth wraps modulo 4
    for (int i = 0; i < 500; i++) begin
      if ($urandom_range(0, 1) == 1) do_push(12'($urandom));
      else do_pop();
      check_ptrs(wp, (wp + 3) % 4, "random");
    end
    // idle cycles do not move the stack
    @(negedge clk); push = 0; pop = 0;
    repeat (3) @(posedge clk);
    #1 check_ptrs(wp, (wp + 3) % 4, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
