// pmbist_pkg - types and constants shared by the programmable memory BIST.
//
// Holds the processor-visible register map of the instruction register
// block (word addresses 0, 1, 7, 10 and 11 and the bit positions of the
// control, status and instruction fields), the March element codes, the
// pattern-select meaning and the operation encoding the BIST controller
// steps through. Register addresses and field positions are the ones the
// design's register diagrams print; the extra status fields (paused flag,
// failing memory and address) and the operation table are this design's
// own choices.
package pmbist_pkg;

  // Processor register bus: 32-bit words, 4-bit word address.
  localparam int unsigned REG_W      = 32;
  localparam int unsigned REG_ADDR_W = 4;

  // Register word addresses.
  localparam logic [REG_ADDR_W-1:0] ADDR_CTRL   = 4'd0;   // BIST control register
  localparam logic [REG_ADDR_W-1:0] ADDR_STATUS = 4'd1;   // BIST status register
  localparam logic [REG_ADDR_W-1:0] ADDR_INSTR  = 4'd7;   // instruction register
  localparam logic [REG_ADDR_W-1:0] ADDR_TSTAT  = 4'd10;  // test status (error state)
  localparam logic [REG_ADDR_W-1:0] ADDR_MWIDTH = 4'd11;  // memory data width

  // BIST control register bits.
  localparam int unsigned CTRL_ENABLE = 0;
  localparam int unsigned CTRL_RESUME = 7;
  localparam int unsigned CTRL_STOP   = 8;

  // BIST status register bits and fields.
  localparam int unsigned STAT_PASS     = 0;
  localparam int unsigned STAT_PAUSED   = 1;
  localparam int unsigned STAT_DONE     = 2;
  localparam int unsigned STAT_FMEM_LSB = 8;   // failing memory index [15:8]
  localparam int unsigned STAT_FADR_LSB = 16;  // failing address     [31:16]

  // Instruction register fields.
  localparam int unsigned INSTR_UPCOUNT   = 0;
  localparam int unsigned INSTR_PAT_LSB   = 1;  // pattern select [2:1]
  localparam int unsigned INSTR_SERIAL    = 3;
  localparam int unsigned INSTR_MARCH_LSB = 8;  // march array [15:8]

  // March element codes (march array field).
  typedef enum logic [7:0] {
    MARCH_R   = 8'h00,  // m0: read
    MARCH_WR  = 8'h01,  // m1: write, then read
    MARCH_RW  = 8'h02,  // m2: read, then write
    MARCH_RWR = 8'h03   // m3: read, write, read
  } march_e;

  // Data a single memory operation writes or expects to read.
  typedef enum logic [1:0] {
    DSEL_WDATA  = 2'd0,  // write background: pattern_sel[1] on every bit
    DSEL_RDATA  = 2'd1,  // read background:  pattern_sel[0] on every bit
    DSEL_NWDATA = 2'd2   // complement of the write background
  } dsel_e;

  typedef struct packed {
    logic  is_write;
    dsel_e dsel;
  } mop_t;

  // Number of operations in a March element; 0 for an unknown code.
  function automatic int unsigned march_len(logic [7:0] code);
    case (code)
      MARCH_R:   return 1;
      MARCH_WR:  return 2;
      MARCH_RW:  return 2;
      MARCH_RWR: return 3;
      default:   return 0;
    endcase
  endfunction

  // Operation number idx of a March element.
  function automatic mop_t march_op(logic [7:0] code, logic [1:0] idx);
    mop_t op;
    op = '{is_write: 1'b0, dsel: DSEL_RDATA};
    case (code)
      MARCH_WR:  if (idx == 2'd0) op = '{is_write: 1'b1, dsel: DSEL_WDATA};
      MARCH_RW:  if (idx == 2'd1) op = '{is_write: 1'b1, dsel: DSEL_WDATA};
      MARCH_RWR: begin
        if (idx == 2'd0)      op = '{is_write: 1'b0, dsel: DSEL_NWDATA};
        else if (idx == 2'd1) op = '{is_write: 1'b1, dsel: DSEL_WDATA};
      end
      default: ;
    endcase
    return op;
  endfunction

endpackage
