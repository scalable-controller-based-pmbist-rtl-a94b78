// tb_dp_sram - self-checking testbench for the dual-port memory.
//
// Checks that reset clears every word, that random writes land at their
// address and are read back one cycle after the read strobe, that the read
// word holds while mem_rd is low, that a write with mem_wr low changes
// nothing, and that a read and write of one address in the same cycle
// returns the old word. A shadow array in the testbench is the reference.
module tb_dp_sram;

  localparam int unsigned ADDR_W = 4;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned DEPTH  = 1 << ADDR_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic              rst = 1'b1;
  logic              mem_wr = 1'b0, mem_rd = 1'b0;
  logic [ADDR_W-1:0] mem_waddr = '0, mem_raddr = '0;
  logic [DATA_W-1:0] mem_wdata = '0, mem_rdata;

  dp_sram dut (.*);

  logic [DATA_W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [DATA_W-1:0] d);
    mem_wr = 1'b1; mem_waddr = ADDR_W'(a); mem_wdata = d;
    @(negedge clk);
    mem_wr = 1'b0;
    shadow[a] = d;
  endtask

  task automatic rd_check(int a);
    mem_rd = 1'b1; mem_raddr = ADDR_W'(a);
    @(negedge clk);
    mem_rd = 1'b0;
    check(mem_rdata == shadow[a], $sformatf("read %0d: %h vs %h", a, mem_rdata, shadow[a]));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int a = 0; a < DEPTH; a++) shadow[a] = '0;
    check(mem_rdata == '0, "read register cleared by reset");
    for (int a = 0; a < DEPTH; a++) rd_check(a);
    for (int a = 0; a < DEPTH; a++) wr(a, $urandom());
    for (int a = DEPTH - 1; a >= 0; a--) rd_check(a);
    // random mix
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(0, 1) == 1) wr($urandom_range(0, DEPTH - 1), $urandom());
      else rd_check($urandom_range(0, DEPTH - 1));
    end
    // read word holds while mem_rd is low
    rd_check(3);
    mem_raddr = 4'd9;
    repeat (3) @(negedge clk);
    check(mem_rdata == shadow[3], "read word held");
    // write strobe low writes nothing
    mem_waddr = 4'd6; mem_wdata = ~shadow[6];
    @(negedge clk);
    rd_check(6);
    // same-address read and write in one cycle: old word, then new
    mem_wr = 1'b1; mem_rd = 1'b1; mem_waddr = 4'd12; mem_raddr = 4'd12;
    mem_wdata = ~shadow[12];
    @(negedge clk);
    mem_wr = 1'b0; mem_rd = 1'b0;
    check(mem_rdata == shadow[12], "read during write returns old word");
    shadow[12] = mem_wdata;
    rd_check(12);
    // reset clears the array
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int a = 0; a < DEPTH; a++) shadow[a] = '0;
    for (int a = 0; a < DEPTH; a++) rd_check(a);
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
