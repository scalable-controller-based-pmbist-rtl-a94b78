// pmbist_system - programmable memory BIST connected to the memories it tests.
//
// NUM_MEMS dual-port memories of one type hang off a single pmbist. They
// share its read address, write address and write data; each has its own
// read and write strobe, so the controller can test them all at once or one
// after another. Only the processor register bus and the BIST status are
// ports: the memories are reached through the BIST alone.
//
// The structure (register block, controller, memory) follows the design's
// architecture diagram, which draws one memory; the sharing of the address
// counter among several memories of one type is the design's stated aim.
// The default of two memories is this design's choice.
module pmbist_system
  import pmbist_pkg::*;
#(
  parameter int unsigned ADDR_W   = 4,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned NUM_MEMS = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  reg_wr,
  input  logic                  reg_rd,
  input  logic [3:0]            reg_be,
  input  logic [REG_W-1:0]      reg_wdata,
  input  logic [REG_ADDR_W-1:0] reg_addr,
  output logic [REG_W-1:0]      reg_rdata,
  output logic                  bist_pass,
  output logic                  bist_done,
  output logic [REG_W-1:0]      error_state
);

  logic [NUM_MEMS-1:0]             mem_wr, mem_rd;
  logic [ADDR_W-1:0]               mem_waddr, mem_raddr;
  logic [DATA_W-1:0]               mem_wdata;
  logic [NUM_MEMS-1:0][DATA_W-1:0] mem_rdata;

  pmbist #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_MEMS(NUM_MEMS)) u_pmbist (
    .clk, .rst,
    .reg_wr, .reg_rd, .reg_be, .reg_wdata, .reg_addr, .reg_rdata,
    .bist_pass, .bist_done, .error_state,
    .mem_wr, .mem_rd, .mem_waddr, .mem_raddr, .mem_wdata, .mem_rdata
  );

  for (genvar m = 0; m < NUM_MEMS; m++) begin : g_mem
    dp_sram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
      .clk, .rst,
      .mem_wr    (mem_wr[m]),
      .mem_waddr,
      .mem_wdata,
      .mem_rd    (mem_rd[m]),
      .mem_raddr,
      .mem_rdata (mem_rdata[m])
    );
  end

endmodule
