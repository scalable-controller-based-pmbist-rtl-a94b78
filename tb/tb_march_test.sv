// tb_march_test - runs a three-element March test through the BIST, at the
// default sizes (two 16 x 32-bit memories), on good and on faulty memories.
//
// The algorithm is {up(w0), up(r0, w1), down(r1)}. It has no pure write
// element, so the first element runs as m1 with pattern 00, (w0, r0): 5N
// operations instead of 4N. The elements are issued one instruction at a
// time by the host, which reacts to each pause by recording the failure and
// resuming.
//
// The testbench holds the memories itself so it can make single bits stuck
// at 0 or at 1. Expected results, worked out by hand from the algorithm:
//   fault-free: every element passes; cycles 1 + 16 x (3, 3, 2) per element
//   bit stuck at 1: the first read (r0 of element 1) fails at that address
//                   in that memory, and so does r0 of element 2
//   bit stuck at 0: only the r1 of element 3 fails
// Each element is run once in parallel mode and once in serial mode.
module tb_march_test;
  import pmbist_pkg::*;

  localparam int unsigned ADDR_W = 4, DATA_W = 32, NUM_MEMS = 2, N = 16;

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

  pmbist dut (.*);

  // memories with stuck-at bits
  logic [DATA_W-1:0] tmem [NUM_MEMS][N];
  logic [DATA_W-1:0] sa1 [NUM_MEMS][N];
  logic [DATA_W-1:0] sa0 [NUM_MEMS][N];
  always @(posedge clk)
    for (int m = 0; m < NUM_MEMS; m++) begin
      if (mem_wr[m]) tmem[m][mem_waddr] <= (mem_wdata | sa1[m][mem_waddr]) & ~sa0[m][mem_waddr];
      if (mem_rd[m]) mem_rdata[m] <= tmem[m][mem_raddr];
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

  typedef struct { int elem; int mem; int addr; logic [31:0] syn; } fail_t;
  fail_t log_q[$];
  int    n_elements, n_detected;

  // One element: returns pass and its length in cycles (pauses excluded).
  task automatic element(int idx, int code, logic [1:0] pat, bit up, bit serial,
                         output bit pass, output int cycles);
    logic [31:0] st, es;
    bus_wr(ADDR_INSTR, {16'h0, 8'(code), 4'h0, serial, pat, up});
    bus_wr(ADDR_CTRL, 32'h101);
    cycles = 0;
    while (!bist_done && cycles < 10000) begin
      bus_rd(ADDR_STATUS, st);
      cycles++;
      if (st[STAT_PAUSED]) begin
        bus_rd(ADDR_TSTAT, es);
        log_q.push_back('{elem: idx, mem: int'(st[15:8]), addr: int'(st[31:16]), syn: es});
        bus_wr(ADDR_CTRL, 32'h181);
        @(negedge clk);
        cycles -= 1;  // the polling read that found the pause was a pause cycle
      end
    end
    pass = bist_pass;
    check(bist_done, $sformatf("element %0d done", idx));
    bus_wr(ADDR_CTRL, 32'h0);
    n_elements++;
  endtask

  // The whole March test; checks per-element pass and cycle counts.
  task automatic march(bit serial, bit [2:0] exp_pass, bit check_cycles);
    bit p;
    int c;
    int k;
    k = serial ? NUM_MEMS : 1;
    log_q.delete();
    element(1, 1, 2'b00, 1, serial, p, c);   // up (w0, r0)
    check(p == exp_pass[0], "element 1 pass");
    if (check_cycles) check(c == 1 + k * N * 3, $sformatf("element 1 cycles %0d", c));
    element(2, 2, 2'b10, 1, serial, p, c);   // up (r0, w1)
    check(p == exp_pass[1], "element 2 pass");
    if (check_cycles) check(c == 1 + k * N * 3, $sformatf("element 2 cycles %0d", c));
    element(3, 0, 2'b01, 0, serial, p, c);   // down (r1)
    check(p == exp_pass[2], "element 3 pass");
    if (check_cycles) check(c == 1 + k * N * 2, $sformatf("element 3 cycles %0d", c));
  endtask

  task automatic clear_faults();
    for (int m = 0; m < NUM_MEMS; m++)
      for (int a = 0; a < N; a++) begin sa0[m][a] = '0; sa1[m][a] = '0; end
  endtask

  initial begin
    for (int m = 0; m < NUM_MEMS; m++) for (int a = 0; a < N; a++) tmem[m][a] = $urandom();
    clear_faults();
    mem_rdata = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    for (int s = 0; s < 2; s++) begin
      // fault-free
      clear_faults();
      march(s != 0, 3'b111, 1);
      check(log_q.size() == 0, "fault-free: no failures");

      // bit 17 of memory 1, word 9, stuck at 1
      clear_faults();
      sa1[1][9] = 32'h0002_0000;
      march(s != 0, 3'b100, 0);
      check(log_q.size() == 2, $sformatf("SA1: %0d failures", log_q.size()));
      foreach (log_q[i])
        check(log_q[i].elem == i + 1 && log_q[i].mem == 1 && log_q[i].addr == 9
              && log_q[i].syn == 32'h0002_0000,
              $sformatf("SA1 failure %0d: elem %0d mem %0d addr %0d syn %h",
                        i, log_q[i].elem, log_q[i].mem, log_q[i].addr, log_q[i].syn));
      if (log_q.size() == 2) n_detected++;

      // bit 4 of memory 0, word 2, stuck at 0
      clear_faults();
      sa0[0][2] = 32'h0000_0010;
      march(s != 0, 3'b011, 0);
      check(log_q.size() == 1, $sformatf("SA0: %0d failures", log_q.size()));
      if (log_q.size() == 1) begin
        check(log_q[0].elem == 3 && log_q[0].mem == 0 && log_q[0].addr == 2
              && log_q[0].syn == 32'h0000_0010, "SA0 found by the final r1");
        n_detected++;
      end
    end
    check(n_elements == 18 && n_detected == 4, "all runs made and both faults found in both modes");
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
