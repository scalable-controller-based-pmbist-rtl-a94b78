// pmbist - programmable memory BIST: instruction register block plus BIST
// controller.
//
// The processor programs the test through the register bus of pmbist_ir
// (instruction at address 7, then the enable bit at address 0) and reads
// back pass/done, the error state and the failing location. The register
// fields drive bist_ctrl, whose memory ports are this module's memory ports:
// one write strobe and one read strobe per memory, and an address and write
// word shared by all memories under test. The controller's clear_resume
// pulse clears the resume bit of the control register.
//
// Timing is that of the two parts: register writes act at the clock edge,
// register reads return one cycle later, and the controller starts the
// cycle after the enable bit is written.
//
// The split into an instruction register and a controller and the signals
// between them follow the design's architecture diagram; the paused flag and
// the failing memory and address that also pass between them are this
// design's additions.
module pmbist
  import pmbist_pkg::*;
#(
  parameter int unsigned ADDR_W   = 4,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned NUM_MEMS = 2
) (
  input  logic                            clk,
  input  logic                            rst,
  // processor register bus
  input  logic                            reg_wr,
  input  logic                            reg_rd,
  input  logic [3:0]                      reg_be,
  input  logic [REG_W-1:0]                reg_wdata,
  input  logic [REG_ADDR_W-1:0]           reg_addr,
  output logic [REG_W-1:0]                reg_rdata,
  // status brought out as well
  output logic                            bist_pass,
  output logic                            bist_done,
  output logic [REG_W-1:0]                error_state,
  // memories under test
  output logic [NUM_MEMS-1:0]             mem_wr,
  output logic [NUM_MEMS-1:0]             mem_rd,
  output logic [ADDR_W-1:0]               mem_waddr,
  output logic [ADDR_W-1:0]               mem_raddr,
  output logic [DATA_W-1:0]               mem_wdata,
  input  logic [NUM_MEMS-1:0][DATA_W-1:0] mem_rdata
);

  logic             bist_enable, bist_resume, bist_stop, up_count, serial_test;
  logic             bist_paused, clear_resume;
  logic [1:0]       pattern_sel;
  logic [7:0]       march_array, fail_mem;
  logic [ADDR_W-1:0] fail_addr;
  logic [REG_W-1:0] mem_data_width;

  pmbist_ir #(.MEM_DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_ir (
    .clk, .rst,
    .reg_wr, .reg_rd, .reg_be, .reg_wdata, .reg_addr, .reg_rdata,
    .bist_pass, .bist_done, .bist_paused,
    .clr_resume (clear_resume),
    .error_state, .fail_mem, .fail_addr,
    .bist_enable, .bist_resume, .bist_stop, .up_count, .pattern_sel,
    .march_array, .serial_test, .mem_data_width
  );

  bist_ctrl #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_MEMS(NUM_MEMS)) u_ctrl (
    .clk, .rst,
    .mem_data_width, .bist_enable, .bist_resume, .bist_stop, .up_count,
    .pattern_sel, .march_array, .serial_test,
    .error_state, .bist_pass, .bist_done, .bist_paused, .clear_resume,
    .fail_mem, .fail_addr,
    .mem_wr, .mem_rd, .mem_waddr, .mem_raddr, .mem_wdata, .mem_rdata
  );

endmodule
