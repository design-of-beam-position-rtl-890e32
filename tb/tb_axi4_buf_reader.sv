// tb_axi4_buf_reader: AXI4 read bursts from the buffer reader.
//
// The reader is connected to a real circ_buf_mem of 256 records filled with
// a known pattern (word w of record a = {a, w} with a marker), and rd_base is
// moved between bursts. Random INCR, WRAP and FIXED bursts of 1..16 beats
// are issued with random RREADY back-pressure; every beat's data, RID, RRESP
// and RLAST are compared with the address arithmetic, and the beat count
// with ARLEN+1. Counts stalls (RVALID while RREADY low) and each burst type.
module tb_axi4_buf_reader;
  import bpm_ilk_pkg::*;
  localparam int DEPTH = 256, AW = 8, ID_W = 4;
  logic clk = 0, rst_n = 0;
  logic [ID_W-1:0] s_axi_arid = '0, s_axi_rid;
  logic [31:0] s_axi_araddr = '0, s_axi_rdata;
  logic [7:0] s_axi_arlen = '0;
  logic [2:0] s_axi_arsize = 3'd2;
  logic [1:0] s_axi_arburst = 2'b01, s_axi_rresp;
  logic s_axi_arvalid = 0, s_axi_arready, s_axi_rlast, s_axi_rvalid, s_axi_rready = 0;
  logic [AW-1:0] rd_base = '0, mem_raddr, waddr = '0;
  logic mem_re, we = 0;
  rec_t mem_rdata, wdata = '0;
  int checks = 0, failures = 0, stalls = 0, beats = 0;
  int bursts [3] = '{0, 0, 0};

  axi4_buf_reader #(.DEPTH(DEPTH), .ID_W(ID_W)) dut (.*);
  circ_buf_mem #(.DEPTH(DEPTH), .W(REC_W)) u_mem (
    .clk, .we, .waddr, .wdata, .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pattern(int a, int w);
    return {8'hA5, 8'(w), 16'(a)};
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < DEPTH; a++) begin
      for (int w = 0; w < 8; w++) wdata[32*w +: 32] = pattern(a, w);
      waddr = AW'(a); we = 1;
      @(posedge clk); #1;
    end
    we = 0;
    for (int b = 0; b < 300; b++) begin
      int len, btype, id, n;
      logic [31:0] addr, a0;
      len   = $urandom_range(0, 15);
      btype = $urandom_range(0, 2);
      id    = $urandom_range(0, 15);
      a0    = {$urandom_range(0, 2 * DEPTH * 32 - 1)} & ~32'h3;
      rd_base = AW'($urandom);
      s_axi_araddr = a0; s_axi_arlen = 8'(len); s_axi_arburst = 2'(btype);
      s_axi_arid = ID_W'(id); s_axi_arvalid = 1;
      do @(posedge clk); while (!s_axi_arready);
      #1; s_axi_arvalid = 0;
      bursts[btype]++;
      addr = a0; n = 0;
      forever begin
        s_axi_rready = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (s_axi_rvalid && !s_axi_rready) stalls++;
        if (s_axi_rvalid && s_axi_rready) begin
          int rec, word;
          rec  = (int'(rd_base) + int'(addr[AW+4:5])) % DEPTH;
          word = int'(addr[4:2]);
          chk("rdata", s_axi_rdata, pattern(rec, word));
          chk("rid", 32'(s_axi_rid), 32'(id));
          chk("rresp", 32'(s_axi_rresp), 0);
          chk("rlast", 32'(s_axi_rlast), 32'(n == len));
          n++; beats++;
          if (btype != 0) addr += 4;
          if (s_axi_rlast || n > len) break;
        end
        #1;
      end
      #1; s_axi_rready = 0;
      chk("beats", 32'(n), 32'(len + 1));
    end
    checks++;
    if (stalls == 0 || bursts[0] == 0 || bursts[1] == 0 || bursts[2] == 0) begin
      failures++;
      $display("coverage: stalls=%0d", stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
