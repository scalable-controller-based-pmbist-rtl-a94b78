// tb_bist_ctrl - self-checking testbench for the BIST controller.
//
// The controller drives a model of NUM_MEMS synchronous-read memories in
// which single bits can be made stuck at one. An independent reference
// model in this testbench works out, for each test, the exact sequence of
// memory operations (write or read, address, data, which memories), the
// value a fault-free read must return, and where the controller has to
// pause with what error state. Every operation and every pause the
// controller makes is compared against that list, and the length of a test
// in cycles is compared with 1 + N * (writes + 2 * reads) per memory pass.
//
// Covered: all four March elements, all pattern selects, up and down count,
// parallel and serial testing, pause on error with delayed and pre-set
// resume, the clear_resume pulse, the data-width mask, looping with stop
// low, abort by dropping enable, and a reserved element code.
module tb_bist_ctrl;
  import pmbist_pkg::*;

  localparam int unsigned ADDR_W   = 3;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned NUM_MEMS = 3;
  localparam int unsigned DEPTH    = 1 << ADDR_W;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [REG_W-1:0]  mem_data_width = REG_W'(DATA_W);
  logic              bist_enable = 1'b0, bist_resume = 1'b0, bist_stop = 1'b1;
  logic              up_count = 1'b1, serial_test = 1'b0;
  logic [1:0]        pattern_sel = 2'b00;
  logic [7:0]        march_array = 8'h00;
  logic [REG_W-1:0]  error_state;
  logic              bist_pass, bist_done, bist_paused, clear_resume;
  logic [7:0]        fail_mem;
  logic [ADDR_W-1:0] fail_addr;
  logic [NUM_MEMS-1:0] mem_wr, mem_rd;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr;
  logic [DATA_W-1:0] mem_wdata;
  logic [NUM_MEMS-1:0][DATA_W-1:0] mem_rdata;

  bist_ctrl #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_MEMS(NUM_MEMS)) dut (.*);

  // ------------------------------------------------------- memory model
  logic [DATA_W-1:0] tmem  [NUM_MEMS][DEPTH];
  logic [DATA_W-1:0] stuck [NUM_MEMS][DEPTH];

  always @(posedge clk) begin
    for (int m = 0; m < NUM_MEMS; m++) begin
      if (mem_wr[m]) tmem[m][mem_waddr] <= mem_wdata;
      if (mem_rd[m]) mem_rdata[m] <= tmem[m][mem_raddr] | stuck[m][mem_raddr];
    end
  end

  // --------------------------------------------------- reference model
  typedef enum {EV_W, EV_R, EV_PAUSE} ev_kind_e;
  typedef struct {
    ev_kind_e            kind;
    int                  addr;
    logic [DATA_W-1:0]   data;
    logic [NUM_MEMS-1:0] mask;
    int                  fmem;
    logic [REG_W-1:0]    est;
  } ev_t;

  ev_t exp_q[$];
  logic [DATA_W-1:0] rmem [NUM_MEMS][DEPTH];  // what the memories should hold
  int unsigned exp_cycles, exp_pass;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Operations of element code, as (is_write, which data): 0 D, 1 E, 2 ~D.
  function automatic int nops(int code);
    case (code) 0: return 1; 1: return 2; 2: return 2; 3: return 3; default: return 0; endcase
  endfunction
  function automatic bit op_w(int code, int i);
    return (code == 1 && i == 0) || (code == 2 && i == 1) || (code == 3 && i == 1);
  endfunction
  function automatic int op_d(int code, int i);
    if (op_w(code, i)) return 0;
    if (code == 3 && i == 0) return 2;
    return 1;
  endfunction

  // Appends one pass of the element to exp_q and updates rmem.
  task automatic gen_pass(int code, logic [1:0] pat, bit up, bit serial, int width);
    logic [DATA_W-1:0] d, e, v, msk, syn;
    int groups;
    d = {DATA_W{pat[1]}};
    e = {DATA_W{pat[0]}};
    for (int b = 0; b < DATA_W; b++) msk[b] = (width == 0) || (b < width);
    groups = serial ? NUM_MEMS : 1;
    for (int g = 0; g < groups; g++) begin
      for (int k = 0; k < DEPTH; k++) begin
        int a;
        a = up ? k : DEPTH - 1 - k;
        for (int i = 0; i < nops(code); i++) begin
          ev_t ev;
          logic [NUM_MEMS-1:0] mm;
          mm = serial ? NUM_MEMS'(1) << g : '1;
          v = (op_d(code, i) == 0) ? d : (op_d(code, i) == 1) ? e : ~d;
          ev = '{kind: op_w(code, i) ? EV_W : EV_R, addr: a, data: v, mask: mm, fmem: 0, est: '0};
          exp_q.push_back(ev);
          exp_cycles += op_w(code, i) ? 1 : 2;
          if (op_w(code, i)) begin
            for (int m = 0; m < NUM_MEMS; m++) if (mm[m]) rmem[m][a] = v;
          end else begin
            for (int m = NUM_MEMS - 1; m >= 0; m--) if (mm[m]) begin
              syn = ((rmem[m][a] | stuck[m][a]) ^ v) & msk;
              if (syn != '0) begin
                ev.kind = EV_PAUSE; ev.fmem = m; ev.est = syn[REG_W-1:0];
              end
            end
            if (ev.kind == EV_PAUSE) begin
              exp_q.push_back(ev);
              exp_pass = 0;
            end
          end
        end
      end
    end
  endtask

  // --------------------------------------------------------------- monitor
  int unsigned run_cycles, pause_cycles, ops_seen, pauses_seen, resume_delay;
  int unsigned clr_pulses, looped;
  bit          in_test, was_paused, auto_resume, watch_ops = 1;

  always @(negedge clk) begin
    if (!rst) begin
      if (in_test && bist_enable && !bist_done) begin
        run_cycles++;
        if (bist_paused) pause_cycles++;
      end
      if (watch_ops && (|mem_wr || |mem_rd)) begin
        ev_t ev;
        ops_seen++;
        check(!(|(mem_wr & mem_rd)), "read and write in one cycle");
        if (exp_q.size() == 0 || exp_q[0].kind == EV_PAUSE) begin
          check(0, "unexpected memory operation");
        end else begin
          ev = exp_q.pop_front();
          check((ev.kind == EV_W) == (|mem_wr), $sformatf("op kind @%0d", ev.addr));
          check((|mem_wr ? mem_wr : mem_rd) == ev.mask,
                $sformatf("memories selected @%0d: %b vs %b", ev.addr, mem_wr | mem_rd, ev.mask));
          check(int'(mem_waddr) == ev.addr && int'(mem_raddr) == ev.addr,
                $sformatf("address %0d vs %0d", mem_raddr, ev.addr));
          if (ev.kind == EV_W) check(mem_wdata == ev.data, $sformatf("write data @%0d", ev.addr));
        end
      end
      if (bist_paused && !was_paused) pauses_seen++;
      if (watch_ops && bist_paused && !was_paused) begin
        ev_t ev;
        if (exp_q.size() == 0 || exp_q[0].kind != EV_PAUSE) begin
          check(0, "unexpected pause");
        end else begin
          ev = exp_q.pop_front();
          check(int'(fail_addr) == ev.addr, $sformatf("fail_addr %0d vs %0d", fail_addr, ev.addr));
          check(int'(fail_mem) == ev.fmem, $sformatf("fail_mem %0d vs %0d", fail_mem, ev.fmem));
          check(error_state == ev.est, $sformatf("error_state %h vs %h", error_state, ev.est));
        end
        resume_delay = $urandom_range(0, 3);
      end
      if (bist_paused && auto_resume) begin
        if (resume_delay == 0) bist_resume = 1'b1;
        else resume_delay--;
      end
      was_paused = bist_paused;
    end
  end

  // resume bit cleared by clear_resume, as the register block does
  always @(posedge clk)
    if (clear_resume) begin
      clr_pulses++;
      check(bist_paused && bist_resume, "clear_resume outside a resumed pause");
      bist_resume <= 1'b0;
    end

  // ------------------------------------------------------------ test runs
  task automatic run(int code, logic [1:0] pat, bit up, bit serial, int width, bit expect_pass);
    int unsigned wd;
    exp_cycles = 1;
    exp_pass = 1;
    gen_pass(code, pat, up, serial, width);
    @(negedge clk);
    march_array = 8'(code); pattern_sel = pat; up_count = up; serial_test = serial;
    mem_data_width = REG_W'(width);
    run_cycles = 0; pause_cycles = 0; in_test = 1;
    bist_enable = 1'b1;
    wd = 0;
    while (!bist_done && wd < 10000) begin @(negedge clk); wd++; end
    in_test = 0;
    check(bist_done, $sformatf("code %0d finished", code));
    check(exp_q.size() == 0, $sformatf("code %0d: %0d expected events left", code, exp_q.size()));
    check(bist_pass == exp_pass[0], $sformatf("code %0d pat %b pass=%b", code, pat, bist_pass));
    check(expect_pass == exp_pass[0], $sformatf("code %0d pat %b scenario pass", code, pat));
    check(run_cycles - pause_cycles == exp_cycles,
          $sformatf("code %0d cycles %0d vs %0d", code, run_cycles - pause_cycles, exp_cycles));
    exp_q.delete();
    bist_enable = 1'b0;
    @(negedge clk);
    check(!bist_done && !bist_pass, "done and pass cleared with enable low");
  endtask

  initial begin
    int unsigned c0, p0;
    for (int m = 0; m < NUM_MEMS; m++)
      for (int a = 0; a < DEPTH; a++) begin
        tmem[m][a] = '0; rmem[m][a] = '0; stuck[m][a] = '0;
      end
    mem_rdata = '0;
    auto_resume = 1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!bist_done && !bist_pass && !bist_paused && mem_wr == '0 && mem_rd == '0, "idle after reset");

    // fault-free memories
    run(3, 2'b11, 1, 0, DATA_W, 1);   // (r0, w1, r1) up, parallel
    run(0, 2'b01, 0, 0, DATA_W, 1);   // (r1) down
    run(2, 2'b01, 1, 1, DATA_W, 1);   // (r1, w0) up, serial
    run(1, 2'b11, 0, 1, DATA_W, 1);   // (w1, r1) down, serial
    run(1, 2'b00, 1, 0, 0, 1);        // (w0, r0), width 0 = whole word
    run(2, 2'b10, 0, 0, DATA_W, 1);   // (r0, w1) down
    // mismatching pattern: every read fails
    run(1, 2'b01, 1, 0, DATA_W, 0);   // (w0, r1)
    run(3, 2'b11, 1, 1, DATA_W, 1);   // (r0, w1, r1): memories still hold 0
    run(3, 2'b11, 0, 0, DATA_W, 0);   // again: r0 now finds ones everywhere
    // stuck-at faults
    stuck[1][5] = 32'h0000_0008;
    stuck[2][5] = 32'h0100_0000;
    run(1, 2'b00, 1, 0, DATA_W, 0);   // both fail at 5, lowest memory reported
    run(1, 2'b00, 0, 1, DATA_W, 0);   // serial: two separate pauses
    run(1, 2'b00, 1, 0, 3, 1);        // width 3 hides bit 3 and bit 24
    run(1, 2'b00, 1, 0, 4, 0);        // width 4 sees bit 3 only
    stuck[1][5] = '0; stuck[2][5] = '0;
    stuck[0][0] = 32'h8000_0000;
    auto_resume = 0;                  // pre-set resume: one-cycle pause
    bist_resume = 1'b1;
    run(0, 2'b00, 1, 0, DATA_W, 0);
    check(!bist_resume, "pre-set resume cleared");
    auto_resume = 1;
    stuck[0][0] = '0;

    // reserved element code
    @(negedge clk);
    march_array = 8'h07; bist_enable = 1'b1;
    @(negedge clk); @(negedge clk);
    check(bist_done && !bist_pass && mem_wr == '0 && mem_rd == '0, "reserved code fails at once");
    bist_enable = 1'b0;
    @(negedge clk);

    // stop low: the element repeats until stop is set
    exp_cycles = 1; exp_pass = 1;
    gen_pass(1, 2'b11, 1, 0, DATA_W);
    c0 = exp_q.size();
    gen_pass(1, 2'b11, 1, 0, DATA_W);
    march_array = 8'h01; pattern_sel = 2'b11; up_count = 1; serial_test = 0;
    mem_data_width = REG_W'(DATA_W);
    bist_stop = 1'b0; run_cycles = 0; pause_cycles = 0; in_test = 1; bist_enable = 1'b1;
    p0 = ops_seen;
    while (ops_seen - p0 < c0 + 1) @(negedge clk);
    looped++;
    check(!bist_done, "no done while looping");
    bist_stop = 1'b1;
    while (!bist_done && run_cycles < 1000) @(negedge clk);
    in_test = 0;
    check(bist_done && bist_pass, "looped test ends with stop");
    check(exp_q.size() == 0, "two passes of operations");
    check(run_cycles == exp_cycles - 1 + 1, $sformatf("loop cycles %0d vs %0d", run_cycles, exp_cycles));
    bist_enable = 1'b0;
    exp_q.delete();
    @(negedge clk);

    // abort with enable low in the middle of a test
    watch_ops = 0;
    march_array = 8'h03; bist_enable = 1'b1;
    repeat (7) @(negedge clk);
    check(|mem_rd || |mem_wr || !bist_done, "test running");
    bist_enable = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(mem_wr == '0 && mem_rd == '0 && !bist_done && !bist_paused, "aborted to idle");
    watch_ops = 1;
    // memories now hold a mix; restore a known background and check again
    for (int m = 0; m < NUM_MEMS; m++)
      for (int a = 0; a < DEPTH; a++) rmem[m][a] = tmem[m][a];
    run(1, 2'b00, 1, 0, DATA_W, 1);
    run(3, 2'b11, 0, 0, DATA_W, 1);

    check(pauses_seen >= 10, $sformatf("pauses seen %0d", pauses_seen));
    check(clr_pulses == pauses_seen, $sformatf("clear_resume pulses %0d vs pauses %0d", clr_pulses, pauses_seen));
    check(looped == 1, "loop exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
