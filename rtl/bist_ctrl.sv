// bist_ctrl - BIST controller: runs one programmed March element over the
// memories under test and reports faults.
//
// One address counter serves every memory: the memories are of one type and
// share the read address, write address and write data. The instruction
// selects the March element (march_array), the background values
// (pattern_sel), the address order (up_count) and whether the memories are
// tested one after another (serial_test = 1) or all at once (serial_test = 0).
//
// March elements, with D = pattern_sel[1] and E = pattern_sel[0] repeated on
// every data bit:
//   8'h00  m0  (rE)            8'h02  m2  (rE, wD)
//   8'h01  m1  (wD, rE)        8'h03  m3  (r~D, wD, rE)
// Any other code ends the test at once with done high and pass low.
//
// Sequencing. bist_enable high in IDLE latches the instruction and starts
// at address 0 (up count) or the last address (down count). Each address
// receives every operation of the element before the counter moves on. A
// write takes one cycle. A read takes two: the read strobe, then a compare
// cycle where the read word of each memory under test is XORed with the
// expected word, masked to the low mem_data_width bits (0, or a value of
// DATA_W or more, selects the whole word). A non-zero result pauses the
// controller: error_state takes the result (32-bit slices ORed together
// when DATA_W is wider), fail_mem and fail_addr the lowest failing memory
// and the address, and pass is lost for this test. bist_resume high while
// paused continues with the next operation; clear_resume is high in that
// same cycle so the register block can clear its resume bit. After the last
// address of the last memory, bist_stop high ends the test (DONE: done
// high, pass high if nothing failed); bist_stop low repeats the element
// from the first address, so a processor can loop a test until it sets
// stop. bist_enable low aborts a test from any state and leaves DONE; the
// memory strobes drop in the same cycle, so no operation follows an abort.
//
// Cycle count of one pass, from the cycle after the start to the cycle
// before DONE: N * (writes + 2 * reads) per memory, N = 2**ADDR_W, times
// NUM_MEMS in serial mode, plus one cycle per pause. DONE is entered one
// cycle after the last operation.
//
// The signal set, the element codes m0..m3, the pattern-select values, the
// XOR compare and the pause/resume behaviour come from the design's
// description of its controller. The meaning of stop, the expected value of
// the first read of m3, the reserved codes, the two-cycle read, the
// mem_data_width mask and the failing-memory/address outputs are this
// design's choices.
module bist_ctrl
  import pmbist_pkg::*;
#(
  parameter int unsigned ADDR_W   = 4,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned NUM_MEMS = 2
) (
  input  logic                             clk,
  input  logic                             rst,          // synchronous, active high
  // from the instruction register block
  input  logic [REG_W-1:0]                 mem_data_width,
  input  logic                             bist_enable,
  input  logic                             bist_resume,
  input  logic                             bist_stop,
  input  logic                             up_count,
  input  logic [1:0]                       pattern_sel,
  input  logic [7:0]                       march_array,
  input  logic                             serial_test,
  // to the instruction register block
  output logic [REG_W-1:0]                 error_state,
  output logic                             bist_pass,
  output logic                             bist_done,
  output logic                             bist_paused,
  output logic                             clear_resume,
  output logic [7:0]                       fail_mem,
  output logic [ADDR_W-1:0]                fail_addr,
  // memories under test
  output logic [NUM_MEMS-1:0]              mem_wr,
  output logic [NUM_MEMS-1:0]              mem_rd,
  output logic [ADDR_W-1:0]                mem_waddr,
  output logic [ADDR_W-1:0]                mem_raddr,
  output logic [DATA_W-1:0]                mem_wdata,
  input  logic [NUM_MEMS-1:0][DATA_W-1:0]  mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_OP, S_CMP, S_PAUSE, S_DONE} state_e;

  localparam logic [ADDR_W-1:0] LAST_ADDR = '1;
  localparam int unsigned MSEL_W = (NUM_MEMS > 1) ? $clog2(NUM_MEMS) : 1;
  localparam int unsigned NSLICE = (DATA_W + REG_W - 1) / REG_W;

  initial assert (NUM_MEMS >= 1 && NUM_MEMS <= 256) else $error("NUM_MEMS out of range");

  state_e            state;
  logic [ADDR_W-1:0] addr;
  logic [1:0]        op_idx;
  logic [MSEL_W-1:0] mem_sel;
  logic              err_seen;
  // instruction latched at the start of a test
  logic [7:0]        code_q;
  logic              up_q, serial_q;
  logic [DATA_W-1:0] wbg_q, rbg_q, mask_q, exp_q;

  // ---------------------------------------------------------------- decode
  mop_t              cur_op;
  logic [1:0]        last_idx;
  logic [DATA_W-1:0] op_data;
  logic [NUM_MEMS-1:0] active;

  always_comb begin
    cur_op   = march_op(code_q, op_idx);
    last_idx = 2'(march_len(code_q) - 1);
    case (cur_op.dsel)
      DSEL_WDATA:  op_data = wbg_q;
      DSEL_RDATA:  op_data = rbg_q;
      default:     op_data = ~wbg_q;
    endcase
    for (int m = 0; m < NUM_MEMS; m++)
      active[m] = !serial_q || (MSEL_W'(m) == mem_sel);
  end

  // ------------------------------------------------- next position (advance)
  logic [ADDR_W-1:0] start_addr, adv_addr;
  logic [1:0]        adv_idx;
  logic [MSEL_W-1:0] adv_sel;
  logic              adv_end;   // the pass is complete

  always_comb begin
    start_addr = up_q ? '0 : LAST_ADDR;
    adv_addr = addr;
    adv_idx  = op_idx;
    adv_sel  = mem_sel;
    adv_end  = 1'b0;
    if (op_idx != last_idx) begin
      adv_idx = op_idx + 2'd1;
    end else begin
      adv_idx = 2'd0;
      if (addr != (up_q ? LAST_ADDR : '0)) begin
        adv_addr = up_q ? addr + 1'b1 : addr - 1'b1;
      end else begin
        adv_addr = start_addr;
        if (serial_q && (int'(mem_sel) != NUM_MEMS - 1)) begin
          adv_sel = mem_sel + 1'b1;
        end else begin
          adv_sel = '0;
          adv_end = 1'b1;
        end
      end
    end
  end

  // --------------------------------------------------------------- compare
  logic [NUM_MEMS-1:0]             mis;
  logic [NUM_MEMS-1:0][DATA_W-1:0] synd;
  logic                            any_mis;
  logic [7:0]                      first_mis;
  logic [REG_W-1:0]                fold;

  always_comb begin
    any_mis   = 1'b0;
    first_mis = '0;
    fold      = '0;
    for (int m = 0; m < NUM_MEMS; m++) begin
      synd[m] = (mem_rdata[m] ^ exp_q) & mask_q;
      mis[m]  = active[m] && (synd[m] != '0);
    end
    for (int m = NUM_MEMS - 1; m >= 0; m--)
      if (mis[m]) begin
        any_mis   = 1'b1;
        first_mis = 8'(m);
      end
    for (int s = 0; s < NSLICE; s++)
      for (int b = 0; b < REG_W; b++)
        if (s * REG_W + b < DATA_W)
          fold[b] = fold[b] | synd[first_mis[MSEL_W-1:0]][s * REG_W + b];
  end

  // Data-width mask from the memory data width register.
  function automatic logic [DATA_W-1:0] width_mask(logic [REG_W-1:0] w);
    logic [DATA_W-1:0] m;
    for (int b = 0; b < DATA_W; b++) m[b] = (w == '0) || (b < w);
    return m;
  endfunction

  // ------------------------------------------------------------- sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      addr        <= '0;
      op_idx      <= '0;
      mem_sel     <= '0;
      err_seen    <= 1'b0;
      code_q      <= '0;
      up_q        <= 1'b1;
      serial_q    <= 1'b0;
      wbg_q       <= '0;
      rbg_q       <= '0;
      mask_q      <= '1;
      exp_q       <= '0;
      error_state <= '0;
      fail_mem    <= '0;
      fail_addr   <= '0;
    end else if (!bist_enable) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE: begin
          code_q      <= march_array;
          up_q        <= up_count;
          serial_q    <= serial_test;
          wbg_q       <= {DATA_W{pattern_sel[1]}};
          rbg_q       <= {DATA_W{pattern_sel[0]}};
          mask_q      <= width_mask(mem_data_width);
          addr        <= up_count ? '0 : LAST_ADDR;
          op_idx      <= '0;
          mem_sel     <= '0;
          err_seen    <= 1'b0;
          error_state <= '0;
          fail_mem    <= '0;
          fail_addr   <= '0;
          if (march_len(march_array) == 0) begin
            err_seen <= 1'b1;
            state    <= S_DONE;
          end else begin
            state <= S_OP;
          end
        end
        S_OP: begin
          if (cur_op.is_write) begin
            addr    <= adv_addr;
            op_idx  <= adv_idx;
            mem_sel <= adv_sel;
            if (adv_end && bist_stop) state <= S_DONE;
          end else begin
            exp_q <= op_data;
            state <= S_CMP;
          end
        end
        S_CMP: begin
          if (any_mis) begin
            err_seen    <= 1'b1;
            error_state <= fold;
            fail_mem    <= first_mis;
            fail_addr   <= addr;
            state       <= S_PAUSE;
          end else begin
            addr    <= adv_addr;
            op_idx  <= adv_idx;
            mem_sel <= adv_sel;
            state   <= (adv_end && bist_stop) ? S_DONE : S_OP;
          end
        end
        S_PAUSE: begin
          if (bist_resume) begin
            addr    <= adv_addr;
            op_idx  <= adv_idx;
            mem_sel <= adv_sel;
            state   <= (adv_end && bist_stop) ? S_DONE : S_OP;
          end
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------------- outputs
  always_comb begin
    for (int m = 0; m < NUM_MEMS; m++) begin
      mem_wr[m] = bist_enable && (state == S_OP) && cur_op.is_write && active[m];
      mem_rd[m] = bist_enable && (state == S_OP) && !cur_op.is_write && active[m];
    end
  end

  assign mem_waddr    = addr;
  assign mem_raddr    = addr;
  assign mem_wdata    = op_data;
  assign bist_done    = (state == S_DONE);
  assign bist_pass    = (state == S_DONE) && !err_seen;
  assign bist_paused  = (state == S_PAUSE);
  assign clear_resume = (state == S_PAUSE) && bist_enable && bist_resume;

  // ------------------------------------------------------------ assertions
  // A memory is never read and written in the same cycle; in serial mode at
  // most one memory is strobed; a resume is only acknowledged while paused.
  a_rw_exclusive: assert property (@(posedge clk) disable iff (rst) (mem_wr & mem_rd) == '0);
  a_serial_one:   assert property (@(posedge clk) disable iff (rst)
                                   serial_q |-> $onehot0(mem_wr | mem_rd));
  a_clr_paused:   assert property (@(posedge clk) disable iff (rst) clear_resume |-> bist_paused);
  a_done_quiet:   assert property (@(posedge clk) disable iff (rst)
                                   bist_done |-> (mem_wr | mem_rd) == '0);

endmodule
