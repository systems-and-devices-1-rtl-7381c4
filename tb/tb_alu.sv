// tb_alu: random and corner-case check of every ALU operation and of the five status
// flags, against a reference computed with 32-bit integer arithmetic.
module tb_alu;
  import simple_cpu_pkg::*;
  alu_op_t     op;
  logic [15:0] a, b, y;
  status_t     flags;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu dut (.op(op), .a(a), .b(b), .y(y), .flags(flags));

  task automatic check_one();
    int ua, ub, sa, sb, r, sr;
    logic [15:0] ey;
    logic ez, ec, ev, ep, en;
    ua = int'(a); ub = int'(b);
    sa = int'($signed(a)); sb = int'($signed(b));
    ec = 0; ev = 0;
    case (op)
      ALU_ADD: begin
        r = ua + ub; ey = r[15:0]; ec = (r > 65535);
        sr = sa + sb; ev = (sr > 32767) || (sr < -32768);
      end
      ALU_SUB: begin
        r = ua - ub; ey = r[15:0]; ec = (ua >= ub);
        sr = sa - sb; ev = (sr > 32767) || (sr < -32768);
      end
      ALU_AND: ey = a & b;
      ALU_OR:  ey = a | b;
      ALU_SL0: begin r = ua * 2; ey = r[15:0]; ec = (r > 65535); end
      default: ey = b;
    endcase
    ez = (ey == 0);
    en = ($signed(ey) < 0);
    ep = ($signed(ey) > 0);
    #1;
    checks++;
    if (y !== ey || flags.zero !== ez || flags.carry !== ec || flags.overflow !== ev ||
        flags.positive !== ep || flags.negative !== en) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h/%h flags=%b expected NPVCZ=%b%b%b%b%b",
               op.name(), a, b, y, ey, flags, en, ep, ev, ec, ez);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [6];
    corner = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h00ff};
    for (int o = 0; o < 6; o++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          op = alu_op_t'(o); a = corner[i]; b = corner[j];
          check_one();
        end
    for (int k = 0; k < 3000; k++) begin
      op = alu_op_t'($urandom_range(0, 5));
      a = 16'($urandom); b = 16'($urandom);
      check_one();
    end
    // Document example: RGB sum 255+255+255 = 765 needs 16 bits
    op = ALU_ADD; a = 16'd510; b = 16'd255; check_one();
    if (y !== 16'd765) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
