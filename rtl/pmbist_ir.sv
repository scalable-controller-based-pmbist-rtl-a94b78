// pmbist_ir - instruction register block: the processor's window on the BIST.
//
// A small register file on a 32-bit processor bus. The processor writes
// words with reg_wr, reg_addr and reg_be (one enable per byte lane, 4'hF for
// a whole word, so an 8-bit host can fill a word a byte at a time) and reads
// them with reg_rd. The register fields drive the BIST controller directly.
//
//   addr  register              access  fields
//   0     BIST control          r/w     [0] enable machine, [7] resume, [8] stop
//   1     BIST status           r       [0] pass, [1] paused on error, [2] done,
//                                       [15:8] failing memory, [31:16] failing address
//   7     instruction           r/w     [0] up count, [2:1] pattern select,
//                                       [3] serial test, [15:8] march array
//   10    test status           r       error state from the controller
//   11    memory data width     r/w     active data bits of the memory words
//
// Timing: a write takes effect at the clock edge where reg_wr is high. A
// read registers the addressed word at the edge where reg_rd is high; it is
// on reg_rdata from the next cycle until the next read. Reading an unmapped
// address returns 0; writes to read-only or unmapped addresses are dropped.
// When the controller pulses clr_resume (it has acted on a resume request)
// the resume bit is cleared; a processor write in the same cycle wins.
//
// The register addresses, field positions, byte enables and signal set
// follow the design's register diagrams. The read-only status fields besides
// pass and done, the read latency, the reset values (all zero, memory data
// width = MEM_DATA_W) and the self-clearing resume bit are this design's
// choices.
module pmbist_ir
  import pmbist_pkg::*;
#(
  parameter int unsigned MEM_DATA_W = 32,  // reset value of the data width register
  parameter int unsigned ADDR_W     = 4    // width of the failing-address status field used
) (
  input  logic                  clk,
  input  logic                  rst,         // synchronous, active high
  // processor bus
  input  logic                  reg_wr,
  input  logic                  reg_rd,
  input  logic [3:0]            reg_be,
  input  logic [REG_W-1:0]      reg_wdata,
  input  logic [REG_ADDR_W-1:0] reg_addr,
  output logic [REG_W-1:0]      reg_rdata,
  // from the BIST controller
  input  logic                  bist_pass,
  input  logic                  bist_done,
  input  logic                  bist_paused,
  input  logic                  clr_resume,
  input  logic [REG_W-1:0]      error_state,
  input  logic [7:0]            fail_mem,
  input  logic [ADDR_W-1:0]     fail_addr,
  // to the BIST controller
  output logic                  bist_enable,
  output logic                  bist_resume,
  output logic                  bist_stop,
  output logic                  up_count,
  output logic [1:0]            pattern_sel,
  output logic [7:0]            march_array,
  output logic                  serial_test,
  output logic [REG_W-1:0]      mem_data_width
);

  logic [REG_W-1:0] ctrl_q, instr_q, mwidth_q, status_w;

  initial assert (ADDR_W <= 16) else $error("failing address field holds 16 bits");

  // Byte-lane merge of a write into the old register value.
  function automatic logic [REG_W-1:0] merge(logic [REG_W-1:0] old, logic [REG_W-1:0] wd,
                                             logic [3:0] be);
    logic [REG_W-1:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? wd[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_q   <= '0;
      instr_q  <= '0;
      mwidth_q <= REG_W'(MEM_DATA_W);
    end else begin
      if (clr_resume) ctrl_q[CTRL_RESUME] <= 1'b0;
      if (reg_wr) begin
        case (reg_addr)
          ADDR_CTRL:   ctrl_q   <= merge(ctrl_q, reg_wdata, reg_be);
          ADDR_INSTR:  instr_q  <= merge(instr_q, reg_wdata, reg_be);
          ADDR_MWIDTH: mwidth_q <= merge(mwidth_q, reg_wdata, reg_be);
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    status_w = '0;
    status_w[STAT_PASS]   = bist_pass;
    status_w[STAT_PAUSED] = bist_paused;
    status_w[STAT_DONE]   = bist_done;
    status_w[STAT_FMEM_LSB +: 8] = fail_mem;
    status_w[STAT_FADR_LSB +: 16] = 16'(fail_addr);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rdata <= '0;
    end else if (reg_rd) begin
      case (reg_addr)
        ADDR_CTRL:   reg_rdata <= ctrl_q;
        ADDR_STATUS: reg_rdata <= status_w;
        ADDR_INSTR:  reg_rdata <= instr_q;
        ADDR_TSTAT:  reg_rdata <= error_state;
        ADDR_MWIDTH: reg_rdata <= mwidth_q;
        default:     reg_rdata <= '0;
      endcase
    end
  end

  assign bist_enable    = ctrl_q[CTRL_ENABLE];
  assign bist_resume    = ctrl_q[CTRL_RESUME];
  assign bist_stop      = ctrl_q[CTRL_STOP];
  assign up_count       = instr_q[INSTR_UPCOUNT];
  assign pattern_sel    = instr_q[INSTR_PAT_LSB +: 2];
  assign serial_test    = instr_q[INSTR_SERIAL];
  assign march_array    = instr_q[INSTR_MARCH_LSB +: 8];
  assign mem_data_width = mwidth_q;

endmodule
