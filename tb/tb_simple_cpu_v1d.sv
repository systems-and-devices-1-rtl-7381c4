// tb_simple_cpu_v1d: instruction-level check of the CPU against a reference model.
// The testbench holds the memory (asynchronous read, synchronous write, as memory_4k).
// Part 1 runs the published nested-subroutine program (CALL SubA .. SubD, MOVE RA 0x01,
// four RETs, JUMP Start) and checks the PC after every instruction against the published
// sequence, and that each instruction takes exactly three clock cycles.
// Part 2 runs random programs of every non-control instruction, followed by random
// conditional jumps, and after every instruction compares PC, the four registers, the
// status register and the memory words written with a reference instruction-set model.
module tb_simple_cpu_v1d;
  import simple_cpu_pkg::*;
  logic        clk = 0, clr;
  logic [15:0] data_in, data_out;
  logic [11:0] addr;
  logic        ram_wr;
  logic [15:0] mem [4096];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  simple_cpu_v1d dut (.clk(clk), .clr(clr), .data_in(data_in), .data_out(data_out),
                      .addr(addr), .ram_wr(ram_wr));

  assign data_in = mem[addr];
  always @(posedge clk) if (ram_wr) mem[addr] <= data_out;

  // ---------------- reference model ----------------
  logic [15:0] r_reg [4];
  logic [15:0] r_mem [4096];
  logic [11:0] r_pc;
  logic [4:0]  r_st;          // {N, P, V, C, Z}
  logic [11:0] r_stk [4];
  int          r_sp;

  function automatic logic [4:0] flags_of(logic [15:0] y, logic c, logic v);
    return {y[15], (!y[15] && y !== 0), v, c, (y == 0)};
  endfunction

  task automatic ref_step();
    logic [15:0] i, x, b, y;
    logic [3:0]  op;
    logic [1:0]  rx, ry;
    logic [16:0] w;
    logic        upd, c, v;
    i = r_mem[r_pc]; op = i[15:12]; rx = i[11:10]; ry = i[9:8];
    upd = 0; c = 0; v = 0; y = 0;
    r_pc = r_pc + 1;
    case (op)
      4'h0: r_reg[rx] = {{8{i[7]}}, i[7:0]};
      4'h1, 4'h2, 4'h6, 4'h7: begin
        if (op == 4'h1 || op == 4'h2) begin x = r_reg[rx]; b = {{8{i[7]}}, i[7:0]}; end
        else begin rx = 0; x = r_reg[0]; b = r_mem[i[11:0]]; end
        if (op == 4'h1 || op == 4'h6) begin
          w = {1'b0, x} + {1'b0, b}; y = w[15:0]; c = w[16];
          v = (x[15] == b[15]) && (y[15] !== x[15]);
        end else begin
          y = x - b; c = (x >= b);
          v = (x[15] !== b[15]) && (y[15] !== x[15]);
        end
        r_reg[rx] = y; upd = 1;
      end
      4'h3: begin y = r_reg[rx] & {8'h00, i[7:0]}; r_reg[rx] = y; upd = 1; end
      4'hd: begin y = r_reg[rx] | {8'h00, i[7:0]}; r_reg[rx] = y; upd = 1; end
      4'h4: r_reg[0] = r_mem[i[11:0]];
      4'h5: r_mem[i[11:0]] = r_reg[0];
      4'h8: r_pc = i[11:0];
      4'h9: if (r_st[0]) r_pc = i[11:0];
      4'ha: if (!r_st[0]) r_pc = i[11:0];
      4'hb: if (r_st[1]) r_pc = i[11:0];
      4'hc: begin r_stk[r_sp % 4] = r_pc; r_sp++; r_pc = i[11:0]; end
      4'hf: begin
        x = r_reg[rx]; b = r_reg[ry];
        case (i[3:0])
          4'h0: r_reg[rx] = b;
          4'h1: r_reg[rx] = r_mem[b[11:0]];
          4'h2: r_mem[b[11:0]] = x;
          4'h4: begin
            w = {1'b0, x} + {1'b0, b}; y = w[15:0]; c = w[16];
            v = (x[15] == b[15]) && (y[15] !== x[15]); upd = 1;
          end
          4'h6: begin
            y = x - b; c = (x >= b); v = (x[15] !== b[15]) && (y[15] !== x[15]); upd = 1;
          end
          4'h7: begin y = x & b; upd = 1; end
          4'h8: begin y = x | b; upd = 1; end
          4'ha: begin y = {x[14:0], 1'b0}; c = x[15]; upd = 1; end
          4'hf: begin r_sp--; r_pc = r_stk[(r_sp + 4) % 4]; end
          default: ;
        endcase
        if (upd) r_reg[rx] = y;
      end
      default: ;
    endcase
    if (upd) r_st = flags_of(y, c, v);
  endtask

  task automatic compare(string what);
    logic ok;
    ok = (dut.pc === r_pc) && (dut.status === status_t'(r_st));
    for (int k = 0; k < 4; k++) ok &= (dut.u_regs.r[k] === r_reg[k]);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: PC=%h/%h ST=%b/%b R=%h %h %h %h / %h %h %h %h", what, dut.pc, r_pc,
                 dut.status, r_st, dut.u_regs.r[0], dut.u_regs.r[1], dut.u_regs.r[2],
                 dut.u_regs.r[3], r_reg[0], r_reg[1], r_reg[2], r_reg[3]);
    end
  endtask

  // one instruction = three clocks
  task automatic run_instr(string what);
    repeat (3) @(posedge clk);
    #1;
    ref_step();
    compare(what);
    checks++;
    if (dut.state !== S_FETCH) begin failures++; $display("FAIL %s: not back in FETCH", what); end
  endtask

  task automatic reset_all();
    clr = 1;
    foreach (r_reg[k]) r_reg[k] = '0;
    r_pc = 0; r_st = 0; r_sp = 0;
    foreach (r_stk[k]) r_stk[k] = '0;
    #12;
    foreach (mem[k]) r_mem[k] = mem[k];
    @(negedge clk); clr = 0;
  endtask

  logic [15:0] rand_instr;
  function automatic logic [15:0] random_instr();
    int kind;
    logic [1:0] rx, ry;
    rx = 2'($urandom); ry = 2'($urandom);
    kind = $urandom_range(0, 13);
    case (kind)
      0: return enc_imm(OP_MOVE, rx, 8'($urandom));
      1: return enc_imm(OP_ADD,  rx, 8'($urandom));
      2: return enc_imm(OP_SUB,  rx, 8'($urandom));
      3: return enc_imm(OP_AND,  rx, 8'($urandom));
      4: return enc_imm(OP_OR,   rx, 8'($urandom));
      5: return enc_abs(opcode_t'($urandom_range(4, 7)), 12'($urandom_range(3000, 4095)));
      6: return enc_reg(RG_MOVE, rx, ry);
      7: return enc_reg(RG_ADD, rx, ry);
      8: return enc_reg(RG_SUB, rx, ry);
      9: return enc_reg(RG_AND, rx, ry);
      10: return enc_reg(RG_OR, rx, ry);
      11: return enc_reg(RG_SL0, rx, ry);
      12: return enc_reg(subop_t'($urandom_range(1, 2)), rx, ry);   // indirect LOAD/STORE
      default: return enc_imm(OP_RSVD, rx, 8'($urandom));
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_pc [$];
    clr = 1;
    // ---------- part 1: published nested-call program ----------
    foreach (mem[k]) mem[k] = '0;
    mem[0] = enc_abs(OP_CALL, 12'd2);      // Start: CALL SubA
    mem[1] = enc_abs(OP_JUMPU, 12'd0);     //        JUMP Start
    mem[2] = enc_abs(OP_CALL, 12'd4);      // SubA:  CALL SubB
    mem[3] = enc_reg(RG_RET, 2'd0, 2'd0);  //        RET
    mem[4] = enc_abs(OP_CALL, 12'd6);      // SubB:  CALL SubC
    mem[5] = enc_reg(RG_RET, 2'd0, 2'd0);  //        RET
    mem[6] = enc_abs(OP_CALL, 12'd8);      // SubC:  CALL SubD
    mem[7] = enc_reg(RG_RET, 2'd0, 2'd0);  //        RET
    mem[8] = enc_imm(OP_MOVE, 2'd0, 8'h01);// SubD:  MOVE RA 0x01
    mem[9] = enc_reg(RG_RET, 2'd0, 2'd0);  //        RET
    reset_all();
    exp_pc = '{2, 4, 6, 8, 9, 7, 5, 3, 1, 0, 2};
    foreach (exp_pc[k]) begin
      run_instr("nested calls");
      checks++;
      if (dut.pc !== 12'(exp_pc[k])) begin
        failures++;
        $display("FAIL nested call step %0d PC=%0d expected %0d", k, dut.pc, exp_pc[k]);
      end
    end
    checks++;
    if (dut.u_regs.r[0] !== 16'h0001) begin failures++; $display("FAIL RA after SubD"); end

    // ---------- part 2: random straight-line programs ----------
    for (int prog = 0; prog < 20; prog++) begin
      clr = 1;
      foreach (mem[k]) mem[k] = 16'($urandom);
      for (int k = 0; k < 64; k++) begin
        rand_instr = random_instr();
        mem[k] = rand_instr;
      end
      // conditional jumps forward by one (taken or not, both land on k+1)
      for (int k = 64; k < 80; k++)
        mem[k] = (k % 2 == 0) ? enc_imm(opcode_t'($urandom_range(0, 4) == 0 ? 1 : 2), 2'($urandom), 8'($urandom))
                              : enc_abs(opcode_t'($urandom_range(9, 11)), 12'(k + 1));
      mem[80] = enc_abs(OP_JUMPU, 12'd80);
      reset_all();
      for (int k = 0; k < 82; k++) run_instr($sformatf("program %0d instr %0d", prog, k));
      for (int k = 2048; k < 4096; k++) begin
        checks++;
        if (mem[k] !== r_mem[k]) begin
          failures++;
          if (failures < 20) $display("FAIL memory %h = %h expected %h", k, mem[k], r_mem[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
