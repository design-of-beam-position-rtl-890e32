// circ_buf_mem: block RAM of the circular beam-data buffer.
//
// Simple dual-port memory, one clock, written by the buffer controller and
// read by the AXI4 reader. The read port is registered and only loads when
// re is high, so read data stays stable while the AXI4 side waits for the
// master. 8192 records (8.192 ms at one record per microsecond) follow the
// original design; the 256-bit record is this design's choice.
//
// Timing: write on the clock edge with we high; rdata shows mem[raddr] one
// cycle after a cycle with re high (old data when the same address is
// written in that cycle).
module circ_buf_mem #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned W     = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
