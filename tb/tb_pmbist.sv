// tb_pmbist - self-checking testbench for the BIST (register block plus
// controller), with 64-bit memories of eight words as the memory model.
//
// The testbench is the host on the register bus and also holds three
// synchronous-read memories in which single bits can be stuck at one. The
// first scenario is the (r1, w0, r1) run with pattern 01 on all-zero
// memories: every read fails, so the host must see a pause at every read,
// in address order, with the whole word reported. The others place
// stuck bits and check the reported memory, address and error state (the
// upper 32 bits of a 64-bit syndrome fold onto the lower ones), the
// data-width mask, serial testing, a resume bit set before the start, and
// the test length in cycles of fault-free runs (5 cycles per address for
// (r, w, r), times 3 memories in serial mode, plus the start cycle).
module tb_pmbist;
  import pmbist_pkg::*;

  localparam int unsigned ADDR_W = 3, DATA_W = 64, NUM_MEMS = 3, N = 8;

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
  logic [NUM_MEMS-1:0]   mem_wr, mem_rd;
  logic [ADDR_W-1:0]     mem_waddr, mem_raddr;
  logic [DATA_W-1:0]     mem_wdata;
  logic [NUM_MEMS-1:0][DATA_W-1:0] mem_rdata;

  pmbist #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_MEMS(NUM_MEMS)) dut (.*);

  logic [DATA_W-1:0] tmem [NUM_MEMS][N];
  logic [DATA_W-1:0] stuck [NUM_MEMS][N];
  always @(posedge clk)
    for (int m = 0; m < NUM_MEMS; m++) begin
      if (mem_wr[m]) tmem[m][mem_waddr] <= mem_wdata;
      if (mem_rd[m]) mem_rdata[m] <= tmem[m][mem_raddr] | stuck[m][mem_raddr];
    end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic bus_wr(logic [3:0] a, logic [31:0] d);
    reg_wr = 1'b1; reg_addr = a; reg_wdata = d; reg_be = 4'hF;
    @(negedge clk);
    reg_wr = 1'b0;
  endtask
  task automatic bus_rd(logic [3:0] a, output logic [31:0] d);
    reg_rd = 1'b1; reg_addr = a;
    @(negedge clk);
    reg_rd = 1'b0;
    d = reg_rdata;
  endtask

  typedef struct { int mem; int addr; logic [31:0] est; } fail_t;
  fail_t seen[$];
  int    cycles;

  // Starts a test, resumes every pause after recording it, waits for done.
  task automatic run(int code, logic [1:0] pat, bit up, bit serial, logic [31:0] ctrl = 32'h101,
                     bit host_resumes = 1);
    logic [31:0] st, es;
    seen.delete();
    bus_wr(ADDR_INSTR, {16'h0, 8'(code), 4'h0, serial, pat, up});
    bus_wr(ADDR_CTRL, ctrl);
    cycles = 0;
    while (!host_resumes && !bist_done && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    while (!bist_done && cycles < 5000) begin
      bus_rd(ADDR_STATUS, st);
      cycles++;
      if (st[STAT_PAUSED]) begin
        bus_rd(ADDR_TSTAT, es);
        seen.push_back('{mem: int'(st[15:8]), addr: int'(st[31:16]), est: es});
        bus_wr(ADDR_CTRL, 32'h181);
        @(negedge clk);  // the controller acts on resume at the next edge
        cycles += 3;
      end
    end
    check(bist_done, "test finished");
  endtask

  task automatic clear_mems();
    for (int m = 0; m < NUM_MEMS; m++)
      for (int a = 0; a < N; a++) begin tmem[m][a] = '0; stuck[m][a] = '0; end
  endtask

  initial begin
    logic [31:0] w;
    clear_mems();
    mem_rdata = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    bus_rd(ADDR_MWIDTH, w);
    check(w == 64, "data width register resets to the memory width");

    // A: (r1, w0, r1) on zeros, up, parallel: two failing reads per address
    run(3, 2'b01, 1, 0);
    check(!bist_pass, "A fails");
    check(seen.size() == 2 * N, $sformatf("A pauses %0d", seen.size()));
    foreach (seen[i])
      check(seen[i].addr == i / 2 && seen[i].mem == 0 && seen[i].est == 32'hFFFF_FFFF,
            $sformatf("A pause %0d: mem %0d addr %0d est %h", i, seen[i].mem, seen[i].addr, seen[i].est));
    bus_wr(ADDR_CTRL, 0);

    // B: stuck bit 40 of memory 2 word 6; (w0, r0) down, serial
    clear_mems();
    stuck[2][6] = 64'h0000_0100_0000_0000;
    run(1, 2'b00, 0, 1);
    check(!bist_pass && seen.size() == 1, $sformatf("B one pause, %0d", seen.size()));
    if (seen.size() == 1)
      check(seen[0].mem == 2 && seen[0].addr == 6 && seen[0].est == 32'h0000_0100,
            $sformatf("B: mem %0d addr %0d est %h", seen[0].mem, seen[0].addr, seen[0].est));
    bus_wr(ADDR_CTRL, 0);

    // C: the width mask hides bit 40 with 40 active bits, not with 41
    bus_wr(ADDR_MWIDTH, 40);
    run(1, 2'b00, 1, 0);
    check(bist_pass && seen.size() == 0, "C width 40 passes");
    bus_wr(ADDR_CTRL, 0);
    bus_wr(ADDR_MWIDTH, 41);
    run(1, 2'b00, 1, 0);
    check(!bist_pass && seen.size() == 1, "C width 41 fails");
    bus_wr(ADDR_CTRL, 0);
    bus_wr(ADDR_MWIDTH, 0);

    // D: two memories fail at one word: the lower one is reported
    clear_mems();
    stuck[1][3] = 64'h20;
    stuck[2][3] = 64'h8000_0000_0000_0000;
    run(0, 2'b00, 0, 0);
    check(seen.size() == 1, "D one pause");
    if (seen.size() == 1)
      check(seen[0].mem == 1 && seen[0].addr == 3 && seen[0].est == 32'h20, "D reports memory 1");
    bus_wr(ADDR_CTRL, 0);

    // E: resume set before the start: the pause ends by itself, bit clears
    clear_mems();
    stuck[0][0] = 64'h1;
    run(0, 2'b00, 1, 0, 32'h181, 0);
    check(!bist_pass && seen.size() == 0, "E no pause left for the host");
    bus_rd(ADDR_CTRL, w);
    check(!w[CTRL_RESUME] && w[CTRL_ENABLE], "E resume bit cleared");
    bus_rd(ADDR_STATUS, w);
    check(w[STAT_DONE] && !w[STAT_PASS] && w[31:16] == 0 && w[15:8] == 0, "E status");
    check(error_state == 32'h1, "E error state");
    bus_wr(ADDR_CTRL, 0);

    // F: fault-free (r0, w1, r1), cycle counts from the done port
    clear_mems();
    for (bit s = 0; ; s = 1) begin
      int t;
      for (int m = 0; m < NUM_MEMS; m++) for (int a = 0; a < N; a++) tmem[m][a] = '0;
      bus_wr(ADDR_INSTR, {16'h0, 8'h03, 4'h0, 1'(s), 2'b11, 1'b1});
      bus_wr(ADDR_CTRL, 32'h101);
      t = 0;
      while (!bist_done && t < 1000) begin @(negedge clk); t++; end
      check(bist_pass, "F passes");
      check(t == (s ? NUM_MEMS : 1) * N * 5 + 1, $sformatf("F cycles %0d", t));
      for (int m = 0; m < NUM_MEMS; m++) for (int a = 0; a < N; a++)
        check(tmem[m][a] == '1, "F memories hold ones");
      bus_wr(ADDR_CTRL, 0);
      if (s) break;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
