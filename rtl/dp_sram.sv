// dp_sram - dual-port memory under test: one write port, one read port.
//
// 2**ADDR_W words of DATA_W bits. The write port stores mem_wdata at
// mem_waddr on a clock edge where mem_wr is high. The read port is
// synchronous: on a clock edge where mem_rd is high, the word at mem_raddr
// is registered and appears on mem_rdata from the next cycle on, where it
// stays until the next read. A read and a write of the same address in the
// same cycle return the old word. Both ports run in one clock cycle, the
// same read/write cycle the BIST controller assumes.
//
// The port list (clock, reset, read and write strobes, separate 4-bit read
// and write addresses, 32-bit data) follows the design's memory diagram.
// The read latency and the behaviour of reset, which clears every word and
// the read register so that a test starts from an all-zero background, are
// this design's choices.
module dp_sram #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  input  logic              mem_wr,
  input  logic [ADDR_W-1:0] mem_waddr,
  input  logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_rd,
  input  logic [ADDR_W-1:0] mem_raddr,
  output logic [DATA_W-1:0] mem_rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      mem_rdata <= '0;
    end else begin
      if (mem_wr) mem[mem_waddr] <= mem_wdata;
      if (mem_rd) mem_rdata <= mem[mem_raddr];
    end
  end

endmodule
