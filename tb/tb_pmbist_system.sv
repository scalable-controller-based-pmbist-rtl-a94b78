// tb_pmbist_system - end-to-end testbench of the memory BIST with its memories,
// at the default parameters (two 16 x 32-bit memories).
//
// The testbench is the host processor: it programs the instruction and
// control registers over the register bus, polls the status register and
// reads the error state, exactly as software would. The expected outcome of
// each test (pass or fail, the number of pauses, the first failing address
// and the test length in cycles) comes from a reference model of the
// memories' contents kept in the testbench.
//
// Mechanisms made to happen, and counted: each March element m0..m3, up and
// down count, parallel and serial testing, pause on error with resume (and
// the resume bit clearing itself), looping with stop low until stop is set,
// abort by clearing enable, the data-width mask, byte-wise programming by an
// 8-bit host, and a reserved element code. A mechanism that never happened
// is a failure.
module tb_pmbist_system;
  import pmbist_pkg::*;

  localparam int unsigned N = 16;   // words per memory at the default ADDR_W
  localparam int unsigned M = 2;    // memories at the default NUM_MEMS

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic                  rst = 1'b1;
  logic                  reg_wr = 1'b0, reg_rd = 1'b0;
  logic [3:0]            reg_be = 4'hF;
  logic [REG_W-1:0]      reg_wdata = '0;
  logic [REG_ADDR_W-1:0] reg_addr = '0;
  logic [REG_W-1:0]      reg_rdata;
  logic                  bist_pass, bist_done;
  logic [REG_W-1:0]      error_state;

  pmbist_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // mechanism counters
  int n_elem[4], n_up, n_down, n_par, n_ser, n_pause, n_resume_clr, n_loop, n_abort;
  int n_mask, n_bytewise, n_reserved;
  logic [31:0] exp_err = 32'hFFFF_FFFF;  // error state of an all-bits mismatch under the width mask

  // reference contents of the memories (one value per word, all bits equal)
  bit ref_mem [M][N];

  // ------------------------------------------------------------ host bus
  task automatic bus_wr(logic [3:0] a, logic [31:0] d, logic [3:0] be = 4'hF);
    reg_wr = 1'b1; reg_addr = a; reg_wdata = d; reg_be = be;
    @(negedge clk);
    reg_wr = 1'b0;
  endtask

  task automatic bus_rd(logic [3:0] a, output logic [31:0] d);
    reg_rd = 1'b1; reg_addr = a;
    @(negedge clk);
    reg_rd = 1'b0;
    d = reg_rdata;
  endtask

  function automatic logic [31:0] instr(int code, logic [1:0] pat, bit up, bit serial);
    return {16'h0, 8'(code), 4'h0, serial, pat, up};
  endfunction

  // ------------------------------------------------------ reference model
  // One pass of an element over the reference contents; returns the number
  // of failing reads that pause the controller and the first one's address.
  function automatic int ref_pass(int code, logic [1:0] pat, bit up, bit serial,
                                  output int first_addr, output int first_mem,
                                  output int cycles);
    int fails = 0;
    bit d, e;
    d = pat[1]; e = pat[0];
    first_addr = -1; first_mem = -1; cycles = 0;
    for (int g = 0; g < (serial ? M : 1); g++)
      for (int k = 0; k < N; k++) begin
        int a;
        a = up ? k : N - 1 - k;
        for (int i = 0; i < ((code == 0) ? 1 : (code == 3) ? 3 : 2); i++) begin
          bit is_w, v;
          is_w = (code == 1 && i == 0) || (code == 2 && i == 1) || (code == 3 && i == 1);
          v = is_w ? d : (code == 3 && i == 0) ? !d : e;
          cycles += is_w ? 1 : 2;
          if (is_w) begin
            for (int m = 0; m < M; m++) if (!serial || m == g) ref_mem[m][a] = v;
          end else begin
            int fm;
            fm = -1;
            for (int m = M - 1; m >= 0; m--) if ((!serial || m == g) && ref_mem[m][a] != v) fm = m;
            if (fm >= 0) begin
              fails++;
              if (first_addr < 0) begin first_addr = a; first_mem = fm; end
            end
          end
        end
      end
    return fails;
  endfunction

  // ---------------------------------------------------------- one test
  task automatic run_test(int code, logic [1:0] pat, bit up, bit serial, bit bytewise = 0);
    int fails, fa, fm, cyc, pauses, t;
    bit seen_first;
    logic [31:0] st, es, ctl, iw;
    fails = ref_pass(code, pat, up, serial, fa, fm, cyc);
    iw = instr(code, pat, up, serial);
    if (bytewise) begin
      for (int b = 0; b < 4; b++) bus_wr(ADDR_INSTR, {4{iw[8*b +: 8]}}, 4'(1 << b));
      n_bytewise++;
    end else begin
      bus_wr(ADDR_INSTR, iw);
    end
    bus_rd(ADDR_INSTR, st);
    check(st == iw, "instruction read back");
    // enable with stop set: one pass
    bus_wr(ADDR_CTRL, 32'h0000_0101);
    t = 0; pauses = 0; seen_first = 0;
    while (!bist_done && t < 20000) begin
      // poll the status word; one read per cycle
      bus_rd(ADDR_STATUS, st);
      t++;
      if (st[STAT_PAUSED]) begin
        // host reads what failed, then resumes
        check(!st[STAT_DONE], "no done while paused");
        bus_rd(ADDR_TSTAT, es);
        check(es == exp_err, $sformatf("error state %h", es));
        if (!seen_first) begin
          check(int'(st[31:16]) == fa && int'(st[15:8]) == fm,
                $sformatf("first failure at mem %0d addr %0d, expected %0d/%0d",
                          st[15:8], st[31:16], fm, fa));
          seen_first = 1;
        end
        pauses++;
        bus_wr(ADDR_CTRL, 32'h0000_0181);
        @(negedge clk);  // the controller acts on resume at this edge
        bus_rd(ADDR_CTRL, ctl);
        if (!ctl[CTRL_RESUME]) n_resume_clr++;
        check(!ctl[CTRL_RESUME] && ctl[CTRL_ENABLE], "resume bit cleared by the controller");
        t += 4;
      end
    end
    check(bist_done, $sformatf("element %0d finished", code));
    check(bist_pass == (fails == 0), $sformatf("element %0d pat %b pass %b, %0d failing reads",
                                               code, pat, bist_pass, fails));
    check(pauses == fails, $sformatf("pauses %0d vs %0d", pauses, fails));
    if (fails == 0) check(t == cyc + 1, $sformatf("element %0d cycles %0d vs %0d", code, t, cyc + 1));
    bus_rd(ADDR_STATUS, st);
    check(st[STAT_DONE] && st[STAT_PASS] == (fails == 0) && !st[STAT_PAUSED], "status word at done");
    bus_wr(ADDR_CTRL, 32'h0);
    @(negedge clk);
    check(!bist_done, "done cleared");
    n_elem[code]++;
    if (up) n_up++; else n_down++;
    if (serial) n_ser++; else n_par++;
    n_pause += pauses;
  endtask

  initial begin
    logic [31:0] st, w;
    int fa, fm, cyc, fails;
    for (int m = 0; m < M; m++) for (int a = 0; a < N; a++) ref_mem[m][a] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    bus_rd(ADDR_MWIDTH, w);
    check(w == 32, "memory data width after reset");

    // the element of the design's worked example: up, pattern 11, (r0, w1, r1)
    run_test(3, 2'b11, 1, 0);
    run_test(0, 2'b11, 0, 1);          // (r1) down, serial
    run_test(2, 2'b10, 1, 1, 1);       // (r1...) fails everywhere: memories hold 1
    run_test(1, 2'b00, 0, 0);          // (w0, r0)
    run_test(2, 2'b10, 0, 0);          // (r0, w1)
    run_test(1, 2'b01, 1, 1);          // (w0, r1): every read fails
    run_test(3, 2'b11, 0, 0, 1);       // (r0, w1, r1)

    // data-width mask: width 0 hides no bits, and a mismatch on every bit
    // is still seen with only one active bit
    bus_wr(ADDR_MWIDTH, 32'd1);
    exp_err = 32'h1;
    run_test(0, 2'b00, 1, 0);          // memories hold 1: fails everywhere
    n_mask++;
    bus_wr(ADDR_MWIDTH, 32'd32);
    exp_err = 32'hFFFF_FFFF;

    // looping with stop low: two passes of (w1, r1), then stop
    bus_wr(ADDR_INSTR, instr(1, 2'b11, 1, 0));
    bus_wr(ADDR_CTRL, 32'h0000_0001);
    fails = ref_pass(1, 2'b11, 1, 0, fa, fm, cyc);
    repeat (cyc + 10) @(negedge clk);
    check(!bist_done, "stop low: no done after one pass");
    bus_wr(ADDR_CTRL, 32'h0000_0101);
    repeat (2 * cyc) begin
      if (!bist_done) @(negedge clk);
    end
    check(bist_done && bist_pass, "looping test ends once stop is set");
    if (bist_done) n_loop++;
    bus_wr(ADDR_CTRL, 32'h0);

    // abort a (w0, r0) test after a few addresses: the rest still hold 1
    bus_wr(ADDR_INSTR, instr(1, 2'b00, 1, 0));
    bus_wr(ADDR_CTRL, 32'h0000_0101);
    repeat (1 + 3 * 5 - 1) @(negedge clk);  // start, then 3 cycles per address (w, r)
    bus_wr(ADDR_CTRL, 32'h0);
    @(negedge clk);
    bus_rd(ADDR_STATUS, st);
    check(!st[STAT_DONE] && !st[STAT_PAUSED] && !bist_done, "aborted");
    n_abort++;
    for (int a = 0; a < N; a++) for (int m = 0; m < M; m++) ref_mem[m][a] = (a >= 5) ? 1 : 0;
    // the first word the test did not reach is the first to fail
    run_test(0, 2'b00, 1, 0);

    // reserved element code
    bus_wr(ADDR_INSTR, instr(32'h42, 2'b00, 1, 0));
    bus_wr(ADDR_CTRL, 32'h0000_0101);
    repeat (3) @(negedge clk);
    bus_rd(ADDR_STATUS, st);
    check(st[STAT_DONE] && !st[STAT_PASS], "reserved element code fails");
    if (st[STAT_DONE]) n_reserved++;
    bus_wr(ADDR_CTRL, 32'h0);

    for (int c = 0; c < 4; c++) check(n_elem[c] > 0, $sformatf("element m%0d run", c));
    check(n_up > 0 && n_down > 0, "up and down count");
    check(n_par > 0 && n_ser > 0, "parallel and serial test");
    check(n_pause > 0 && n_resume_clr == n_pause, $sformatf("pauses %0d, resume cleared %0d",
                                                            n_pause, n_resume_clr));
    check(n_loop > 0, "loop until stop");
    check(n_abort > 0, "abort");
    check(n_mask > 0, "width mask");
    check(n_bytewise > 0, "byte-wise programming");
    check(n_reserved > 0, "reserved code");
    $display("mechanisms: m0=%0d m1=%0d m2=%0d m3=%0d up=%0d down=%0d parallel=%0d serial=%0d pauses=%0d loop=%0d abort=%0d",
             n_elem[0], n_elem[1], n_elem[2], n_elem[3], n_up, n_down, n_par, n_ser, n_pause, n_loop, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
