// tb_pmbist_ir - self-checking testbench for the instruction register block.
//
// Plays the processor on the register bus. A shadow copy of the writable
// registers, updated with the testbench's own byte-lane merge, is the
// reference for read-back and for the decoded fields driven to the
// controller. Covers reset values, whole-word and single-byte writes,
// writes to read-only and unmapped addresses, the status and test status
// words built from controller inputs, the one-cycle read latency and the
// clearing of the resume bit by clr_resume.
module tb_pmbist_ir;
  import pmbist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic                  rst = 1'b1;
  logic                  reg_wr = 1'b0, reg_rd = 1'b0;
  logic [3:0]            reg_be = 4'hF;
  logic [REG_W-1:0]      reg_wdata = '0;
  logic [REG_ADDR_W-1:0] reg_addr = '0;
  logic [REG_W-1:0]      reg_rdata;
  logic                  bist_pass = 1'b0, bist_done = 1'b0, bist_paused = 1'b0, clr_resume = 1'b0;
  logic [REG_W-1:0]      error_state = '0;
  logic [7:0]            fail_mem = '0;
  logic [3:0]            fail_addr = '0;
  logic                  bist_enable, bist_resume, bist_stop, up_count, serial_test;
  logic [1:0]            pattern_sel;
  logic [7:0]            march_array;
  logic [REG_W-1:0]      mem_data_width;

  pmbist_ir dut (.*);

  logic [31:0] sh [16];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit writable(int a);
    return a == 0 || a == 7 || a == 11;
  endfunction

  task automatic wr(int a, logic [31:0] d, logic [3:0] be);
    reg_wr = 1'b1; reg_addr = 4'(a); reg_wdata = d; reg_be = be;
    @(negedge clk);
    reg_wr = 1'b0;
    if (writable(a))
      for (int b = 0; b < 4; b++) if (be[b]) sh[a][b*8 +: 8] = d[b*8 +: 8];
  endtask

  function automatic logic [31:0] expect_word(int a);
    if (a == 1) return {12'h000, fail_addr, fail_mem, 5'b0, bist_done, bist_paused, bist_pass};
    if (a == 10) return error_state;
    if (writable(a)) return sh[a];
    return '0;
  endfunction

  task automatic rd_check(int a);
    logic [31:0] e;
    e = expect_word(a);
    reg_rd = 1'b1; reg_addr = 4'(a);
    @(negedge clk);
    reg_rd = 1'b0;
    check(reg_rdata == e, $sformatf("read %0d: %h vs %h", a, reg_rdata, e));
  endtask

  task automatic check_fields();
    check(bist_enable == sh[0][0] && bist_resume == sh[0][7] && bist_stop == sh[0][8],
          $sformatf("control fields from %h", sh[0]));
    check(up_count == sh[7][0] && pattern_sel == sh[7][2:1] && serial_test == sh[7][3]
          && march_array == sh[7][15:8], $sformatf("instruction fields from %h", sh[7]));
    check(mem_data_width == sh[11], "memory data width");
  endtask

  initial begin
    for (int a = 0; a < 16; a++) sh[a] = '0;
    sh[11] = 32;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check_fields();
    for (int a = 0; a < 16; a++) rd_check(a);
    // whole words
    wr(7, 32'h0000_0309, 4'hF);   // m3, pattern 00, serial, up
    check_fields();
    check(march_array == 8'h03 && serial_test && up_count && pattern_sel == 2'b00, "instruction decode");
    wr(0, 32'h0000_0181, 4'hF);   // stop, resume, enable
    check_fields();
    check(bist_enable && bist_resume && bist_stop, "control decode");
    // byte lanes
    wr(11, 32'hAABB_CCDD, 4'b0001);
    wr(11, 32'h1122_3344, 4'b0100);
    wr(11, 32'h5566_7788, 4'b1000);
    wr(11, 32'h99EE_FF00, 4'b0010);
    check(mem_data_width == 32'h5522_FFDD, $sformatf("byte-lane merge %h", mem_data_width));
    check_fields();
    for (int i = 0; i < 60; i++) begin
      int a;
      a = $urandom_range(0, 15);
      wr(a, $urandom(), 4'($urandom()));
      check_fields();
      rd_check($urandom_range(0, 15));
    end
    // status and test status from the controller
    bist_pass = 1'b1; bist_done = 1'b1; bist_paused = 1'b0; fail_mem = 8'h02; fail_addr = 4'hB;
    error_state = 32'hDEAD_BEEF;
    rd_check(1);
    rd_check(10);
    bist_pass = 1'b0; bist_paused = 1'b1;
    rd_check(1);
    // read-only words ignore writes
    wr(1, '1, 4'hF);
    wr(10, '1, 4'hF);
    rd_check(1);
    rd_check(10);
    // read latency: the word appears after the read edge and then holds
    wr(7, 32'h0000_1234, 4'hF);
    reg_rd = 1'b1; reg_addr = 4'd7;
    #1 check(reg_rdata != 32'h0000_1234, "read data not combinational");
    @(negedge clk);
    reg_rd = 1'b0;
    check(reg_rdata == 32'h0000_1234, "read data after one cycle");
    reg_addr = 4'd0;
    repeat (2) @(negedge clk);
    check(reg_rdata == 32'h0000_1234, "read data holds");
    // clr_resume clears only the resume bit
    wr(0, 32'h0000_0181, 4'hF);
    clr_resume = 1'b1;
    @(negedge clk);
    clr_resume = 1'b0;
    sh[0][7] = 1'b0;
    check_fields();
    check(!bist_resume && bist_enable && bist_stop, "resume cleared");
    // a processor write in the same cycle wins
    clr_resume = 1'b1;
    wr(0, 32'h0000_0080, 4'h1);
    clr_resume = 1'b0;
    check(bist_resume, "write wins over clear");
    rd_check(0);
    // reset
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int a = 0; a < 16; a++) sh[a] = '0;
    sh[11] = 32;
    check_fields();
    rd_check(0); rd_check(7); rd_check(11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
