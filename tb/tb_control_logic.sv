// tb_control_logic: drives instruction words into the control logic and checks the
// three-state sequence and the control lines in every state: FETCH selects the PC and
// loads the IR, DECODE writes nothing, EXECUTE asserts the lines of the instruction.
// Conditional jumps are checked with the tested flag both set and clear.
module tb_control_logic;
  import simple_cpu_pkg::*;
  logic        clk = 0, clr;
  logic [15:0] ir;
  status_t     status;
  ctrl_t       ctrl;
  state_t      state;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  control_logic dut (.clk(clk), .clr(clr), .ir(ir), .status(status), .ctrl(ctrl), .state(state));

  // expected EXECUTE lines: asel dsel alu rf_en status_en ram_wr ld push pop sel_x
  typedef struct {
    string       name;
    logic [15:0] ir;
    status_t     st;
    asel_t       asel;
    dsel_t       dsel;
    alu_op_t     alu;
    logic        rf_en, status_en, ram_wr, ld, push, pop;
    logic [1:0]  sel_x;
  } vec_t;

  task automatic run(vec_t v);
    @(negedge clk);
    // wait for FETCH
    while (state !== S_FETCH) @(negedge clk);
    ir = v.ir; status = v.st;
    checks++;
    if (!(ctrl.ir_en && ctrl.asel == ASEL_PC && !ctrl.rf_en && !ctrl.ram_wr && !ctrl.pc_en &&
          !ctrl.status_en)) begin
      failures++; $display("FAIL %s FETCH lines %p", v.name, ctrl);
    end
    @(negedge clk);
    checks++;
    if (state !== S_DECODE || ctrl.ir_en || ctrl.rf_en || ctrl.ram_wr || ctrl.pc_en ||
        ctrl.status_en || ctrl.pc_push || ctrl.pc_pop || ctrl.asel !== v.asel) begin
      failures++; $display("FAIL %s DECODE lines %p", v.name, ctrl);
    end
    @(negedge clk);
    checks++;
    if (state !== S_EXECUTE || ctrl.ir_en || !ctrl.pc_en || ctrl.asel !== v.asel ||
        ctrl.rf_en !== v.rf_en || ctrl.status_en !== v.status_en || ctrl.ram_wr !== v.ram_wr ||
        ctrl.pc_ld !== v.ld || ctrl.pc_push !== v.push || ctrl.pc_pop !== v.pop ||
        (v.rf_en && (ctrl.dsel !== v.dsel || ctrl.alu_op !== v.alu)) ||
        ((v.rf_en || v.ram_wr) && ctrl.sel_x !== v.sel_x)) begin
      failures++; $display("FAIL %s EXECUTE lines %p", v.name, ctrl);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    status_t z, c, none;
    vec_t v [$];
    z = '0; z.zero = 1; c = '0; c.carry = 1; none = '0;
    //        name           ir                        st    asel     dsel       alu        rf st wr ld pu po sx
    v.push_back('{"MOVE RB",  16'b0000_01_00_1001_1010, none, ASEL_PC, DSEL_SEXT, ALU_PASSB, 1, 0, 0, 0, 0, 0, 2'd1});
    v.push_back('{"ADD RC",   16'b0001_10_00_0000_0011, none, ASEL_PC, DSEL_SEXT, ALU_ADD,   1, 1, 0, 0, 0, 0, 2'd2});
    v.push_back('{"SUB RD",   16'b0010_11_00_0000_0011, none, ASEL_PC, DSEL_SEXT, ALU_SUB,   1, 1, 0, 0, 0, 0, 2'd3});
    v.push_back('{"AND RA",   16'b0011_00_00_1111_1111, none, ASEL_PC, DSEL_ZEXT, ALU_AND,   1, 1, 0, 0, 0, 0, 2'd0});
    v.push_back('{"LOAD",     16'h419a,                 none, ASEL_IR, DSEL_MEM,  ALU_PASSB, 1, 0, 0, 0, 0, 0, 2'd0});
    v.push_back('{"STORE",    16'h5ddd,                 none, ASEL_IR, DSEL_MEM,  ALU_PASSB, 0, 0, 1, 0, 0, 0, 2'd0});
    v.push_back('{"ADDM",     16'h6fff,                 none, ASEL_IR, DSEL_MEM,  ALU_ADD,   1, 1, 0, 0, 0, 0, 2'd0});
    v.push_back('{"SUBM",     16'h7c01,                 none, ASEL_IR, DSEL_MEM,  ALU_SUB,   1, 1, 0, 0, 0, 0, 2'd0});
    v.push_back('{"JUMPU",    16'h8123,                 none, ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 1, 0, 0, 2'd0});
    v.push_back('{"JUMPZ t",  16'h9123,                 z,    ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 1, 0, 0, 2'd0});
    v.push_back('{"JUMPZ f",  16'h9123,                 c,    ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 0, 0, 0, 2'd0});
    v.push_back('{"JUMPNZ t", 16'ha123,                 c,    ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 1, 0, 0, 2'd0});
    v.push_back('{"JUMPNZ f", 16'ha123,                 z,    ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 0, 0, 0, 2'd0});
    v.push_back('{"JUMPC t",  16'hb123,                 c,    ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 1, 0, 0, 2'd0});
    v.push_back('{"JUMPC f",  16'hb123,                 z,    ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 0, 0, 0, 2'd0});
    v.push_back('{"CALL",     16'hc002,                 none, ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 1, 1, 0, 2'd0});
    v.push_back('{"OR RB",    16'b1101_01_00_1010_1010, none, ASEL_PC, DSEL_ZEXT, ALU_OR,    1, 1, 0, 0, 0, 0, 2'd1});
    v.push_back('{"RSVD",     16'he123,                 none, ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 0, 0, 0, 2'd0});
    v.push_back('{"MOVE RX RY", 16'b1111_10_01_0000_0000, none, ASEL_PC, DSEL_RY, ALU_PASSB, 1, 0, 0, 0, 0, 0, 2'd2});
    v.push_back('{"LOAD (RY)",  16'b1111_10_01_0000_0001, none, ASEL_RY, DSEL_MEM, ALU_PASSB, 1, 0, 0, 0, 0, 0, 2'd2});
    v.push_back('{"STORE (RY)", 16'b1111_11_01_0000_0010, none, ASEL_RY, DSEL_MEM, ALU_PASSB, 0, 0, 1, 0, 0, 0, 2'd3});
    v.push_back('{"ADD RX RY",  16'b1111_01_10_0000_0100, none, ASEL_PC, DSEL_RY, ALU_ADD,   1, 1, 0, 0, 0, 0, 2'd1});
    v.push_back('{"SUB RX RY",  16'b1111_01_10_0000_0110, none, ASEL_PC, DSEL_RY, ALU_SUB,   1, 1, 0, 0, 0, 0, 2'd1});
    v.push_back('{"AND RX RY",  16'b1111_01_10_0000_0111, none, ASEL_PC, DSEL_RY, ALU_AND,   1, 1, 0, 0, 0, 0, 2'd1});
    v.push_back('{"OR RX RY",   16'b1111_01_10_0000_1000, none, ASEL_PC, DSEL_RY, ALU_OR,    1, 1, 0, 0, 0, 0, 2'd1});
    v.push_back('{"SL0 RX",     16'b1111_11_00_0000_1010, none, ASEL_PC, DSEL_SEXT, ALU_SL0, 1, 1, 0, 0, 0, 0, 2'd3});
    v.push_back('{"RET",        16'b1111_00_00_0000_1111, none, ASEL_PC, DSEL_SEXT, ALU_PASSB, 0, 0, 0, 0, 0, 1, 2'd0});
    clr = 1; ir = '0; status = '0;
    #12 clr = 0;
    checks++;
    if (state !== S_FETCH) begin failures++; $display("FAIL reset state"); end
    foreach (v[i]) run(v[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
