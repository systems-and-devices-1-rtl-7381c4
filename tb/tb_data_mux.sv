// tb_data_mux: checks the four data-multiplexer inputs, in particular sign extension
// (MOVE RA 0xFF gives 0xFFFF) and zero extension (AND RA 0xFF uses 0x00FF).
module tb_data_mux;
  import simple_cpu_pkg::*;
  dsel_t       sel;
  logic [7:0]  imm;
  logic [15:0] mem, ry, y, exp_y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  data_mux dut (.sel(sel), .imm(imm), .mem(mem), .ry(ry), .y(y));

  task automatic check(string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s sel=%0d imm=%h y=%h expected %h", what, sel, imm, y, exp_y);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem = 16'h1234; ry = 16'hbeef;
    sel = DSEL_SEXT; imm = 8'hff; exp_y = 16'hffff; check("sext 0xFF");
    sel = DSEL_SEXT; imm = 8'h7f; exp_y = 16'h007f; check("sext 0x7F");
    sel = DSEL_ZEXT; imm = 8'hff; exp_y = 16'h00ff; check("zext 0xFF");
    for (int i = 0; i < 300; i++) begin
      imm = 8'($urandom); mem = 16'($urandom); ry = 16'($urandom);
      sel = dsel_t'(i % 4);
      case (i % 4)
        0: exp_y = (imm >= 8'h80) ? (16'hff00 | 16'(imm)) : 16'(imm);
        1: exp_y = 16'(imm);
        2: exp_y = mem;
        default: exp_y = ry;
      endcase
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
