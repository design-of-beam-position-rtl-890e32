// tb_sine_record: the laboratory sine-wave test on the full-size design.
//
// A sine wave (period 1000 samples, amplitude 1000) is applied to the H1
// phase and to the four probe amplitudes, with a slowly growing offset on
// the phase so that, after more than one buffer length, the phase crosses a
// high limit of 1200 for three samples (overthreshold time 3) and trips the
// interlock. The ARM model then reads the whole 8.192 ms record over AXI4 and
// checks every record against the sine value of the sample it must hold:
// 4096 samples before the interlock sample and 4095 after it.
module tb_sine_record;
  import bpm_ilk_pkg::*;
  localparam int DEPTH = 8192, POST = 4096;

  logic clk = 0, rst_n = 0, sample_valid = 0, ext_trig = 0;
  beam_sample_t beam_in;
  logic ilk_out, irq, beam_en;
  logic [7:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0] s_axil_wstrb = 4'hF;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_arready;
  logic s_axil_rvalid, s_axil_rready = 0;
  logic [3:0] s_axi_arid = '0, s_axi_rid;
  logic [31:0] s_axi_araddr = '0, s_axi_rdata;
  logic [7:0] s_axi_arlen = '0;
  logic [2:0] s_axi_arsize = 3'd2;
  logic [1:0] s_axi_arburst = 2'b01, s_axi_rresp;
  logic s_axi_arvalid = 0, s_axi_arready, s_axi_rlast, s_axi_rvalid, s_axi_rready = 0;

  bpm_ilk_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // sine sample values; the phase offset grows by one every 50 samples
  function automatic val_t sine(int idx, int amp, int k);
    return val_t'($rtoi($floor(amp * $sin(2.0 * 3.14159265358979 * (idx + 125 * k) / 1000.0) + 0.5)));
  endfunction
  function automatic val_t phase_of(int idx);
    return val_t'(int'(sine(idx, 1000, 0)) + idx / 50);
  endfunction

  function automatic beam_sample_t mk(int idx);
    beam_sample_t b = '0;
    b.h1.sum   = 16'sd500;
    b.h1.phase = phase_of(idx);
    b.h2.sum   = 16'sd500;
    for (int k = 0; k < 4; k++) b.probe_amp[k] = sine(idx, 1000, k);
    return b;
  endfunction

  task automatic wr(logic [7:0] a, logic [31:0] d);
    s_axil_awaddr = a; s_axil_wdata = d;
    s_axil_awvalid = 1; s_axil_wvalid = 1; s_axil_bready = 1;
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    #1; s_axil_awvalid = 0; s_axil_wvalid = 0;
    do @(posedge clk); while (!s_axil_bvalid);
    #1; s_axil_bready = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    s_axil_araddr = a; s_axil_arvalid = 1; s_axil_rready = 1;
    do @(posedge clk); while (!s_axil_arready);
    #1; s_axil_arvalid = 0;
    while (!s_axil_rvalid) begin @(posedge clk); #1; end
    d = s_axil_rdata;
    @(posedge clk); #1; s_axil_rready = 0;
  endtask

  int n = 0, trip_n = -1;

  initial begin
    logic [31:0] d, lock, rdb;
    beam_in = mk(0);
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    wr(8'h1C, 32'd3);
    wr(8'h40 + 8*1, 32'd1200);     // H1 phase high limit
    // samples every four cycles until the record is complete
    while (!irq) begin
      beam_in = mk(n);
      sample_valid = 1;
      @(posedge clk); #1;
      sample_valid = 0;
      n++;
      repeat (3) @(posedge clk);
      #1;
      if (ilk_out && trip_n < 0) begin
        // the trip is registered two cycles after its sample
        trip_n = n - 1;
      end
    end
    // reference: first sample with phase > 1200 three times in a row
    begin
      int run = 0, first = -1;
      for (int i = 0; i < n && first < 0; i++) begin
        run = (int'(phase_of(i)) > 1200) ? run + 1 : 0;
        if (run == 3) first = i;
      end
      chk("trip sample", 32'(trip_n), 32'(first));
      chk("trip after a full buffer", 32'(first > DEPTH), 1);
      trip_n = first;
    end
    rd(8'h04, d); chk("latched = H1 phase high", d, 32'(1) << (ILK_QTY + 2));
    rd(8'h10, lock); chk("lock", lock, 32'(trip_n % DEPTH));
    rd(8'h14, rdb); chk("read start", rdb, 32'((trip_n + POST) % DEPTH));
    // read the whole record in bursts of 32 records (256 beats)
    for (int r = 0; r < DEPTH; r += 32) begin
      s_axi_araddr = 32'(r * 32); s_axi_arlen = 8'd255; s_axi_arvalid = 1;
      do @(posedge clk); while (!s_axi_arready);
      #1; s_axi_arvalid = 0; s_axi_rready = 1;
      for (int beat = 0; beat < 256; ) begin
        @(posedge clk);
        if (s_axi_rvalid) begin
          int rec, s, w;
          beam_sample_t b;
          rec_t e;
          rec = r + beat / 8; w = beat % 8;
          s = trip_n - (DEPTH - POST) + rec;
          b = mk(s);
          e = to_record(b);
          chk("record word", s_axi_rdata, e[32*w +: 32]);
          beat++;
        end
        #1;
      end
      s_axi_rready = 0;
    end
    wr(8'h00, 32'h11);
    @(posedge clk); #1;
    chk("cleared", 32'(ilk_out), 0);
    $display("sine test: interlock at sample %0d, %0d records read", trip_n, DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
