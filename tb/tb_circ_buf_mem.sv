// tb_circ_buf_mem: fills the full 8192-record RAM with random data, reads
// every address back with random read-enable gaps (data must hold while re
// is low) and checks the one-cycle read latency.
module tb_circ_buf_mem;
  localparam int DEPTH = 8192, W = 256;
  logic clk = 0, we = 0, re = 0;
  logic [12:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  circ_buf_mem #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      for (int k = 0; k < W / 32; k++) wdata[32*k +: 32] = $urandom;
      ref_mem[a] = wdata;
      waddr = 13'(a); we = 1;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 37) % DEPTH;
      raddr = 13'(a); re = 1;
      @(posedge clk); #1;
      re = 0; raddr = 13'($urandom);
      checks++;
      if (rdata !== ref_mem[a]) failures++;
      @(posedge clk); #1;
      checks++;   // held while re is low
      if (rdata !== ref_mem[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
