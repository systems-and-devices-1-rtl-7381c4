// simple_computer: the complete machine, the simple_cpu_v1d CPU wired to its 4096 x 16
// memory (memory_4k), which holds program and data.  After CLR the CPU starts executing
// at address 0.  The memory bus is brought out as outputs so that the machine's activity
// (fetches, loads, stores) can be observed; a program is placed in the memory array
// (u_mem.mem) before CLR is released.  The parameters only size the memory; the CPU itself
// is fixed at a 12-bit address and 16-bit data path.
module simple_computer
  import simple_cpu_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  output logic [ADDR_W-1:0] bus_addr,   // address bus
  output logic [DATA_W-1:0] bus_rdata,  // memory -> CPU
  output logic [DATA_W-1:0] bus_wdata,  // CPU -> memory
  output logic              bus_wr      // memory write strobe
);
  simple_cpu_v1d u_cpu (
    .clk(clk), .clr(clr), .data_in(bus_rdata), .data_out(bus_wdata),
    .addr(bus_addr), .ram_wr(bus_wr)
  );

  memory_4k #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
    .clk(clk), .we(bus_wr), .addr(bus_addr), .din(bus_wdata), .dout(bus_rdata)
  );
endmodule
