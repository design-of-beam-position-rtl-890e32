// tb_axil_regs: AXI4-Lite accesses to the register bank.
//
// Checks reset values, write/read-back of every parameter register with the
// configuration outputs, byte strobes, the one-cycle clear pulse, the test
// mode and trigger mode bits, the read-only status registers driven from
// random inputs, unmapped addresses, and B/R back-pressure (the master holds
// BREADY/RREADY low for random cycles).
module tb_axil_regs;
  import bpm_ilk_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0] s_axil_wstrb = '0;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_arready;
  logic s_axil_rvalid, s_axil_rready = 0;
  ilk_cfg_t cfg;
  logic clear, test_mode, ilk = 0;
  logic [N_ILK-1:0] latched = '0, live = '0;
  buf_state_e buf_state = BUF_WRITE;
  logic [12:0] lock_addr = '0, rd_base = '0;
  int checks = 0, failures = 0, clear_pulses = 0;

  axil_regs #(.BUF_AW(13)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (clear) clear_pulses++;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d, logic [3:0] be = 4'hF);
    s_axil_awaddr = a; s_axil_wdata = d; s_axil_wstrb = be;
    s_axil_awvalid = 1; s_axil_wvalid = 1;
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    #1; s_axil_awvalid = 0; s_axil_wvalid = 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1; s_axil_bready = 1;
    do @(posedge clk); while (!s_axil_bvalid);
    chk("bresp", 32'(s_axil_bresp), 0);
    #1; s_axil_bready = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    s_axil_araddr = a; s_axil_arvalid = 1;
    do @(posedge clk); while (!s_axil_arready);
    #1; s_axil_arvalid = 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1; s_axil_rready = 1;
    do @(posedge clk); while (!s_axil_rvalid);
    d = s_axil_rdata;
    chk("rresp", 32'(s_axil_rresp), 0);
    #1; s_axil_rready = 0;
  endtask

  task automatic rd_chk(logic [7:0] a, logic [31:0] exp);
    logic [31:0] d;
    rd(a, d);
    chk($sformatf("read %h", a), d, exp);
  endtask

  initial begin
    logic [15:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // reset values
    rd_chk(8'h18, 32'd200);
    rd_chk(8'h1C, 32'd1);
    rd_chk(8'h20, 32'hFFFF);
    rd_chk(8'h24, 32'h7FFF);
    rd_chk(8'h00, 32'h10);    // trigger mode SUM
    for (int q = 0; q < N_QTY; q++) begin
      rd_chk(8'(8'h40 + 8*q), 32'h7FFF);
      rd_chk(8'(8'h44 + 8*q), 32'h8000);
    end
    // parameter registers
    v = 16'($urandom); wr(8'h18, {16'hDEAD, v}); rd_chk(8'h18, 32'(v)); chk("cfg.beam_en_level", 32'(cfg.beam_en_level), 32'(v));
    v = 16'($urandom); wr(8'h1C, 32'(v)); rd_chk(8'h1C, 32'(v)); chk("cfg.over_time", 32'(cfg.over_time), 32'(v));
    v = 16'($urandom); wr(8'h20, 32'(v)); rd_chk(8'h20, 32'(v)); chk("cfg.pulse_max", 32'(cfg.pulse_max), 32'(v));
    v = 16'($urandom); wr(8'h24, 32'(v)); rd_chk(8'h24, 32'(v)); chk("cfg.adc_sat", 32'(cfg.adc_sat), 32'(v));
    for (int q = 0; q < N_QTY; q++) begin
      logic [15:0] h, l;
      h = 16'($urandom); l = 16'($urandom);
      wr(8'(8'h40 + 8*q), 32'(h));
      wr(8'(8'h44 + 8*q), 32'(l));
      chk("cfg.hi", 32'(cfg.hi[q]), 32'(h));
      chk("cfg.lo", 32'(cfg.lo[q]), 32'(l));
      rd_chk(8'(8'h40 + 8*q), 32'(h));
      rd_chk(8'(8'h44 + 8*q), 32'(l));
    end
    // byte strobe: only the high byte
    wr(8'h1C, 32'h0000_1234);
    wr(8'h1C, 32'h0000_AB99, 4'b0010);
    rd_chk(8'h1C, 32'h0000_AB34);
    // control: clear pulse, test mode, trigger mode
    clear_pulses = 0;
    wr(8'h00, 32'h0000_0033);
    chk("test_mode", 32'(test_mode), 1);
    chk("trig_mode", 32'(cfg.trig_mode), 32'(TRIG_SUM_EXT));
    chk("one clear pulse", 32'(clear_pulses), 1);
    rd_chk(8'h00, 32'h32);
    wr(8'h00, 32'h0000_0000);
    chk("test_mode off", 32'(test_mode), 0);
    chk("no clear", 32'(clear_pulses), 1);
    // status registers
    for (int i = 0; i < 20; i++) begin
      latched = N_ILK'($urandom); live = N_ILK'($urandom);
      buf_state = buf_state_e'($urandom_range(0, 2)); ilk = 1'($urandom);
      lock_addr = 13'($urandom); rd_base = 13'($urandom);
      rd_chk(8'h04, 32'(latched));
      rd_chk(8'h08, 32'(live));
      rd_chk(8'h0C, {23'd0, ilk, 6'd0, buf_state});
      rd_chk(8'h10, 32'(lock_addr));
      rd_chk(8'h14, 32'(rd_base));
    end
    // writes to read-only and unmapped addresses
    wr(8'h04, 32'hFFFF_FFFF);
    rd_chk(8'h04, 32'(latched));
    wr(8'h30, 32'h1234_5678);
    rd_chk(8'h30, 32'h0);
    rd_chk(8'hFC, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
