// tb_simple_computer: end-to-end test of the whole machine at its full size (4096-word
// memory, no parameter overrides).  A program exercising every mechanism of the CPU is
// placed in memory and run from reset:
//   - 16-bit data: 255 + 255 + 255 = 765 built with ADD immediate and ADDM;
//   - 12-bit addressing: LOAD/STORE/ADDM at 0x19A (410) and 0xFFF, beyond 8-bit reach;
//   - immediate widening: MOVE sign-extends (0xAA -> 0xFFAA), AND/OR zero-extend;
//   - the ten-instruction sequence MOVE, 8 x SL0, OR that builds 0xAAAA;
//   - register-indirect STORE and LOAD through RC, register-register SUB and ADD;
//   - conditional jumps taken and not taken on ZERO and CARRY;
//   - the published four-deep nested CALL/RET example.
// Monitors count how often each mechanism happens; one that never happens is a failure.
// Final registers and memory are compared with values worked out by hand, and the
// cycle at which the final STORE happens is checked against 3 cycles per instruction.
module tb_simple_computer;
  import simple_cpu_pkg::*;
  logic        clk = 0, clr;
  logic [11:0] bus_addr;
  logic [15:0] bus_rdata, bus_wdata;
  logic        bus_wr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  simple_computer dut (.clk(clk), .clr(clr), .bus_addr(bus_addr), .bus_rdata(bus_rdata),
                       .bus_wdata(bus_wdata), .bus_wr(bus_wr));

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, exp_v);
    end
  endtask

  // ---------------- mechanism monitors ----------------
  int n_push, n_pop, depth, max_depth, n_abs_high, n_indirect, n_taken, n_not_taken;
  int n_store, n_sext, n_zext, n_flag [5];
  int cyc, final_store_cyc;
  ctrl_t c;
  logic [15:0] ir;
  assign c  = dut.u_cpu.ctrl;
  assign ir = dut.u_cpu.ir;

  always @(posedge clk) begin
    if (!clr) begin
      cyc++;
      if (c.pc_en) begin   // EXECUTE
        if (c.pc_push) begin n_push++; depth++; if (depth > max_depth) max_depth = depth; end
        if (c.pc_pop)  begin n_pop++; depth--; end
        if (c.asel == ASEL_IR && bus_addr > 12'd255) n_abs_high++;
        if (c.asel == ASEL_RY && (c.rf_en || c.ram_wr)) n_indirect++;
        if (ir[15:12] inside {OP_JUMPZ, OP_JUMPNZ, OP_JUMPC}) begin
          if (c.pc_ld) n_taken++; else n_not_taken++;
        end
        if (c.rf_en && c.dsel == DSEL_SEXT && c.alu_op == ALU_PASSB && ir[7]) n_sext++;
        if (c.rf_en && c.dsel == DSEL_ZEXT) n_zext++;
        if (c.status_en) for (int k = 0; k < 5; k++) if (dut.u_cpu.flags[k]) n_flag[k]++;
      end
      if (bus_wr) begin
        n_store++;
        if (bus_addr == 12'h1b0) final_store_cyc = cyc;
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] p [int];
    string flag_name [5];
    flag_name = '{"ZERO", "CARRY", "OVERFLOW", "POSITIVE", "NEGATIVE"};
    n_push = 0; n_pop = 0; depth = 0; max_depth = 0; n_abs_high = 0; n_indirect = 0;
    n_taken = 0; n_not_taken = 0; n_store = 0; n_sext = 0; n_zext = 0; cyc = 0;
    final_store_cyc = -1;
    foreach (n_flag[k]) n_flag[k] = 0;
    clr = 1;

    p[0]  = enc_imm(OP_MOVE, 2'd0, 8'h7f);    // RA = 0x007F
    p[1]  = enc_imm(OP_ADD,  2'd0, 8'h7f);    // RA = 0x00FE
    p[2]  = enc_imm(OP_ADD,  2'd0, 8'h01);    // RA = 0x00FF = 255
    p[3]  = enc_abs(OP_STORE, 12'h19a);       // M[410] = 255
    p[4]  = enc_abs(OP_ADDM,  12'h19a);       // RA = 510
    p[5]  = enc_abs(OP_ADDM,  12'h19a);       // RA = 765
    p[6]  = enc_abs(OP_STORE, 12'hfff);       // M[4095] = 765
    p[7]  = enc_imm(OP_MOVE, 2'd1, 8'haa);    // RB = 0xFFAA (sign-extended)
    for (int k = 8; k < 16; k++) p[k] = enc_reg(RG_SL0, 2'd1, 2'd0);  // RB = 0xAA00
    p[16] = enc_imm(OP_OR,   2'd1, 8'haa);    // RB = 0xAAAA
    p[17] = enc_imm(OP_MOVE, 2'd2, 8'h40);    // RC = 0x0040 (pointer)
    p[18] = enc_reg(RG_STORE, 2'd1, 2'd2);    // M[RC] = RB
    p[19] = enc_reg(RG_LOAD,  2'd3, 2'd2);    // RD = M[RC]
    p[20] = enc_reg(RG_SUB,   2'd3, 2'd1);    // RD = RD - RB = 0 : ZERO, CARRY
    p[21] = enc_abs(OP_JUMPNZ, 12'h100);      // not taken
    p[22] = enc_abs(OP_JUMPZ,  12'd24);       // taken
    p[23] = enc_imm(OP_MOVE, 2'd3, 8'h55);    // skipped
    p[24] = enc_abs(OP_LOAD,  12'h1a0);       // RA = 0x7FFF
    p[25] = enc_imm(OP_ADD,  2'd0, 8'h01);    // RA = 0x8000 : OVERFLOW, NEGATIVE
    p[26] = enc_abs(OP_JUMPC,  12'h100);      // not taken (CARRY = 0)
    p[27] = enc_reg(RG_ADD,   2'd0, 2'd0);    // RA = 0x0000 : CARRY, OVERFLOW, ZERO
    p[28] = enc_abs(OP_JUMPC,  12'd30);       // taken
    p[29] = enc_imm(OP_MOVE, 2'd3, 8'h66);    // skipped
    p[30] = enc_abs(OP_CALL,  12'h200);       // CALL SubA
    p[31] = enc_abs(OP_STORE, 12'h1b0);       // M[0x1B0] = RA (1, set by SubD)
    p[32] = enc_abs(OP_JUMPU, 12'd32);        // halt
    p['h200] = enc_abs(OP_CALL, 12'h210);   // SubA
    p['h201] = enc_reg(RG_RET, 2'd0, 2'd0);
    p['h210] = enc_abs(OP_CALL, 12'h220);   // SubB
    p['h211] = enc_reg(RG_RET, 2'd0, 2'd0);
    p['h220] = enc_abs(OP_CALL, 12'h230);   // SubC
    p['h221] = enc_reg(RG_RET, 2'd0, 2'd0);
    p['h230] = enc_imm(OP_MOVE, 2'd0, 8'h01); // SubD
    p['h231] = enc_reg(RG_RET, 2'd0, 2'd0);
    p['h1a0] = 16'h7fff;                    // data

    for (int k = 0; k < 4096; k++) dut.u_mem.mem[k] = p.exists(k) ? p[k] : 16'h0000;
    #12;
    @(negedge clk); clr = 0;

    // 38 instructions up to and including the STORE to 0x1B0, 3 cycles each
    repeat (3 * 38 + 9) @(posedge clk);
    #1;

    expect_eq("RA", dut.u_cpu.u_regs.r[0], 16'h0001);
    expect_eq("RB", dut.u_cpu.u_regs.r[1], 16'haaaa);
    expect_eq("RC", dut.u_cpu.u_regs.r[2], 16'h0040);
    expect_eq("RD", dut.u_cpu.u_regs.r[3], 16'h0000);
    expect_eq("M[0x19A]", dut.u_mem.mem[12'h19a], 16'd255);
    expect_eq("M[0xFFF]", dut.u_mem.mem[12'hfff], 16'd765);
    expect_eq("M[0x040]", dut.u_mem.mem[12'h040], 16'haaaa);
    expect_eq("M[0x1B0]", dut.u_mem.mem[12'h1b0], 16'h0001);
    expect_eq("PC (halt loop)", 16'(dut.u_cpu.pc), 16'd32);
    expect_eq("final STORE cycle", 16'(final_store_cyc), 16'(3 * 38));
    expect_eq("stores", 16'(n_store), 16'd4);

    // every mechanism must have happened
    begin
      int counts [string];
      counts["CALL push"]             = n_push;
      counts["RET pop"]               = n_pop;
      counts["stack depth 4 reached"] = int'(max_depth == 4);
      counts["address above 255"]     = n_abs_high;
      counts["register indirect"]     = n_indirect;
      counts["jump taken"]            = n_taken;
      counts["jump not taken"]        = n_not_taken;
      counts["sign-extended MOVE"]    = n_sext;
      counts["zero-extended AND/OR"]  = n_zext;
      for (int k = 0; k < 5; k++) counts[{"flag ", flag_name[k]}] = n_flag[k];
      foreach (counts[name]) begin
        $display("mechanism %-24s %0d", name, counts[name]);
        checks++;
        if (counts[name] == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
      end
    end
    expect_eq("pushes", 16'(n_push), 16'd4);
    expect_eq("pops", 16'(n_pop), 16'd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
