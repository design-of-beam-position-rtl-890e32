// tb_bpm_ilk_top: end-to-end test of the interlock system at its default
// size (8192-record buffer, 4096 records after the interlock).
//
// Beam samples arrive every four clock cycles. Every sample carries its own
// index n in H1 X/Y, so every stored record can be traced to its sample; the
// testbench keeps the record it expects for each n. The ARM side is modelled
// with AXI4-Lite and AXI4 master tasks. The sequence:
//   1. cyclic writing for more than one buffer length; a 2-sample H1 phase
//      excursion is filtered by an overthreshold time of 3, a 3-sample one
//      trips the interlock (H1 phase high);
//   2. the latched state holds after the excursion ends; a second fault while
//      locked is latched but does not move the lock address;
//   3. exactly 4095 more records are written, then irq, writes stop;
//   4. the ARM reads the lock address and all 8192 records over AXI4 with
//      back-pressure and checks they are samples lock-4096 .. lock+4095;
//   5. clear; then, one at a time with a clear in between: an H2 X low
//      excursion gated off by the SUM trigger mode and then tripping, ADC
//      saturation, an over-long beam pulse, the external trigger mode;
//   6. test mode: the accumulator source trips an X high limit, and the
//      records read around the lock address must count up by one.
// Each mechanism is counted; one that never happened is a failure.
module tb_bpm_ilk_top;
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
  // mechanism counters
  int n_filtered = 0, n_trip_hi = 0, n_trip_lo = 0, n_trip_adc = 0, n_trip_pulse = 0;
  int n_gated = 0, n_ext_mode = 0, n_held = 0, n_ignored = 0, n_post_done = 0;
  int n_writes_stopped = 0, n_clear = 0, n_axi_stall = 0, n_test_mode = 0, n_wrap = 0;

  initial begin
    #60_000_000;
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

  // ------------------------------------------------------------ beam source
  int n = 0;                 // index of the next sample
  val_t ovr_phase = 16'sd0, ovr_h2x = 16'sd0, ovr_sum = 16'sd300, ovr_adc0 = 16'sd0;
  rec_t exp_rec [int];       // expected record by sample index
  // model of the buffer write pointer: writes stop POST records after the
  // locked address until the next clear
  int mptr = 0, mlock = 0;
  bit mlocked = 0;
  int addr_of [int];         // buffer address of each written sample

  function automatic beam_sample_t mk(int idx);
    beam_sample_t b;
    b.h1.x     = val_t'(idx);
    b.h1.y     = val_t'(idx >>> 16);
    b.h1.phase = ovr_phase;
    b.h1.sum   = ovr_sum;
    b.h1.teff  = 16'sd90;
    b.h2.x     = ovr_h2x;
    b.h2.y     = val_t'(idx * 3);
    b.h2.phase = 16'sd5;
    b.h2.sum   = 16'sd280;
    b.h2.teff  = 16'sd85;
    for (int k = 0; k < 4; k++) begin
      b.probe_amp[k]   = val_t'(1000 + 100 * k + (idx & 63));
      b.probe_phase[k] = val_t'(-50 * k);
      b.adc_raw[k]     = val_t'(2000 * k);
    end
    b.adc_raw[0] = ovr_adc0;
    return b;
  endfunction

  // drive k samples, one every four cycles
  task automatic samples(int k);
    repeat (k) begin
      beam_in = mk(n);
      exp_rec[n] = to_record(beam_in);
      if (exp_rec.exists(n - 3 * DEPTH)) exp_rec.delete(n - 3 * DEPTH);
      if (!mlocked || mptr != (mlock + POST) % DEPTH) begin
        addr_of[n] = mptr;
        mptr = (mptr + 1) % DEPTH;
      end
      sample_valid = 1;
      @(posedge clk); #1;
      sample_valid = 0;
      n++;
      repeat (3) @(posedge clk);
      #1;
    end
  endtask

  // ------------------------------------------------------------ AXI4-Lite master
  task automatic wr(logic [7:0] a, logic [31:0] d);
    s_axil_awaddr = a; s_axil_wdata = d; s_axil_wstrb = 4'hF;
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

  // ------------------------------------------------------------ AXI4 burst read
  task automatic burst(logic [31:0] addr, int len, ref logic [31:0] q[$]);
    int got;
    s_axi_araddr = addr; s_axi_arlen = 8'(len - 1); s_axi_arburst = 2'b01;
    s_axi_arid = 4'(len); s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    #1; s_axi_arvalid = 0;
    got = 0;
    while (got < len) begin
      s_axi_rready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (s_axi_rvalid && !s_axi_rready) n_axi_stall++;
      if (s_axi_rvalid && s_axi_rready) begin
        q.push_back(s_axi_rdata);
        got++;
        checks++;
        if (s_axi_rlast !== (got == len) || s_axi_rid !== 4'(len)) failures++;
      end
      #1;
    end
    s_axi_rready = 0;
  endtask

  // read records [first, first+cnt) relative to the read start and compare
  // them with the samples they should hold
  task automatic check_records(int first, int cnt, int sample0);
    logic [31:0] q[$];
    for (int r = first; r < first + cnt; r += 32) begin
      int m;
      m = (first + cnt - r < 32) ? first + cnt - r : 32;
      burst(32'(r * 32), m * 8, q);
    end
    for (int i = 0; i < cnt; i++) begin
      rec_t e;
      int s;
      s = sample0 + i;
      e = exp_rec.exists(s) ? exp_rec[s] : '1;
      for (int w = 0; w < 8; w++) chk($sformatf("record %0d word %0d", first + i, w), q[8 * i + w], e[32 * w +: 32]);
    end
  endtask

  // ------------------------------------------------------------ helpers
  task automatic clear_ilk();
    logic [31:0] d;
    wr(8'h00, 32'h11);   // clear, trigger mode SUM
    mlocked = 0;
    @(posedge clk); #1;
    chk("ilk_out after clear", 32'(ilk_out), 0);
    rd(8'h0C, d);
    chk("buffer back to WRITE", d[1:0], 32'(BUF_WRITE));
    n_clear++;
  endtask

  // run until the record is complete, checking that it takes POST-1 samples
  task automatic finish_record(int trip_n);
    int extra;
    logic [31:0] lock;
    extra = 0;
    while (!irq && extra < POST + 10) begin samples(1); extra++; end
    // trip sample at n=trip_n; samples trip_n+1 .. trip_n+POST-1 written
    chk("samples to done", 32'(n - 1 - trip_n), 32'(POST - 1));
    rd(8'h10, lock);
    chk("lock address", lock, 32'(addr_of[trip_n]));
    n_post_done++;
  endtask

  // ------------------------------------------------------------ sequence
  initial begin
    logic [31:0] d, lock;
    int trip_n;
    beam_in = mk(0);
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;

    // limits: H1 phase within +-100, H2 X within -500..500, ADC saturation 30000
    wr(8'h1C, 32'd3);                    // overthreshold time 3 samples
    wr(8'h40 + 8*1, 32'd100);  wr(8'h44 + 8*1, 32'(-32'sd100) & 32'hFFFF);
    wr(8'h40 + 8*7, 32'd500);  wr(8'h44 + 8*7, 32'(-32'sd500) & 32'hFFFF);
    wr(8'h24, 32'd30000);
    rd(8'h18, d); chk("beam enable level", d, 200);

    // 1. more than a buffer length of clean data
    samples(DEPTH + 1500);
    n_wrap++;
    chk("no interlock on clean beam", 32'(ilk_out), 0);
    ovr_phase = 16'sd150; samples(2); ovr_phase = 16'sd0; samples(5);
    if (!ilk_out) n_filtered++;
    chk("2-sample excursion filtered", 32'(ilk_out), 0);
    ovr_phase = 16'sd150; samples(3); trip_n = n - 1; mlocked = 1; mlock = addr_of[trip_n]; ovr_phase = 16'sd0;
    samples(2);
    chk("interlock after 3 samples", 32'(ilk_out), 1);
    rd(8'h04, d);
    chk("latched = H1 phase high", d, 32'(1) << (ILK_QTY + 2 * 1));
    if (d[ILK_QTY + 2]) n_trip_hi++;
    // 2. held after the excursion; a second fault does not move the lock
    samples(20);
    rd(8'h08, d); chk("live clear again", d, 0);
    rd(8'h04, d);
    if (d != 0) n_held++;
    ovr_phase = -16'sd150; samples(4); ovr_phase = 16'sd0;
    rd(8'h04, d);
    chk("second state latched", d, (32'(1) << (ILK_QTY + 2)) | (32'(1) << (ILK_QTY + 3)));
    rd(8'h10, lock);
    chk("lock unchanged", lock, 32'(trip_n % DEPTH));
    if (lock == 32'(trip_n % DEPTH)) n_ignored++;
    if (d[ILK_QTY + 3]) n_trip_lo++;
    // 3. complete the record
    finish_record(trip_n);
    rd(8'h0C, d); chk("buffer DONE", d[1:0], 32'(BUF_DONE));
    rd(8'h14, d); chk("read start = lock - 4096", d, 32'((trip_n - 4096) % DEPTH));
    // 4. writes stop; read the whole buffer while samples keep arriving
    fork
      samples(300);
      check_records(0, DEPTH, trip_n - (DEPTH - POST));
    join
    n_writes_stopped++;
    check_records(DEPTH - POST - 2, 4, trip_n - 2);
    clear_ilk();

    // 5a. SUM trigger mode gates an H2 X low excursion while SUM < 200
    samples(50);
    ovr_sum = 16'sd100; ovr_h2x = -16'sd700; samples(10);
    chk("gated off without beam", 32'(ilk_out), 0);
    rd(8'h08, d);
    if (!ilk_out) n_gated++;
    ovr_sum = 16'sd300; samples(3); trip_n = n - 1; mlocked = 1; mlock = addr_of[trip_n]; ovr_h2x = 16'sd0;
    samples(2);
    rd(8'h04, d);
    chk("latched = H2 X low", d, 32'(1) << (ILK_QTY + 2 * 7 + 1));
    if (d[ILK_QTY + 15]) n_trip_lo++;
    finish_record(trip_n);
    check_records(DEPTH - POST - 3, 6, trip_n - 3);
    clear_ilk();

    // 5b. ADC saturation
    samples(10);
    ovr_adc0 = -16'sd31000; samples(3); trip_n = n - 1; mlocked = 1; mlock = addr_of[trip_n]; ovr_adc0 = 16'sd0;
    samples(2);
    rd(8'h04, d);
    chk("latched = ADC 0 saturation", d, 32'(1) << ILK_ADC_SAT);
    if (d[0]) n_trip_adc++;
    finish_record(trip_n);
    clear_ilk();

    // 5c. beam pulse longer than 40 samples
    wr(8'h20, 32'd40);
    ovr_sum = 16'sd100; samples(10);
    ovr_sum = 16'sd300; samples(30); ovr_sum = 16'sd100; samples(5);
    chk("short pulse accepted", 32'(ilk_out), 0);
    ovr_sum = 16'sd300; samples(41); trip_n = n - 1; mlocked = 1; mlock = addr_of[trip_n];
    samples(2);
    rd(8'h04, d);
    chk("latched = pulse width", d, 32'(1) << ILK_PULSE);
    if (d[ILK_PULSE]) n_trip_pulse++;
    wr(8'h20, 32'hFFFF);
    finish_record(trip_n);
    clear_ilk();

    // 5d. external trigger mode: excursion ignored until the gate opens
    wr(8'h00, 32'h20);
    ext_trig = 0; ovr_phase = 16'sd150; samples(10);
    chk("ext gate closed", 32'(ilk_out), 0);
    chk("beam_en low", 32'(beam_en), 0);
    ext_trig = 1; samples(3); trip_n = n - 1; mlocked = 1; mlock = addr_of[trip_n]; ovr_phase = 16'sd0;
    samples(2);
    chk("ext gate open trips", 32'(ilk_out), 1);
    if (ilk_out) n_ext_mode++;
    finish_record(trip_n);
    clear_ilk();
    ext_trig = 0;

    // 6. test mode: accumulator into H1 X (field 0) trips X high at 1000;
    // the other limits are opened so that only this state can trip
    wr(8'h40 + 8*1, 32'h7FFF);
    wr(8'h40 + 8*7, 32'h7FFF);
    wr(8'h40 + 8*2, 32'd1000);
    wr(8'h00, 32'h02);     // test mode, trigger mode ALWAYS
    samples(1001 + 3 + 2);
    chk("accumulator trips X high", 32'(ilk_out), 1);
    rd(8'h04, d);
    chk("latched = H1 X high", d, 32'(1) << (ILK_QTY + 4));
    rd(8'h10, lock);
    chk("test-mode lock address", lock, 32'(addr_of[n - 3]));
    mlocked = 1; mlock = int'(lock);
    while (!irq) samples(1);
    begin
      logic [31:0] q[$];
      // records around the lock must count up by one (field 0 = count)
      burst(32'((DEPTH - POST - 8) * 32), 16 * 8, q);
      for (int i = 1; i < 16; i++) chk("accumulator step", 32'(q[8*i][15:0] - q[8*(i-1)][15:0]), 1);
      chk("lock record holds count 1003", 32'(q[8*8][15:0]), 1003);
      n_test_mode++;
    end
    wr(8'h00, 32'h01);

    // mechanisms
    checks++;
    if (n_filtered == 0 || n_trip_hi == 0 || n_trip_lo < 2 || n_trip_adc == 0 || n_trip_pulse == 0 ||
        n_gated == 0 || n_ext_mode == 0 || n_held == 0 || n_ignored == 0 || n_post_done < 5 ||
        n_writes_stopped == 0 || n_clear < 5 || n_axi_stall == 0 || n_test_mode == 0 || n_wrap == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("filtered=%0d hi=%0d lo=%0d adc=%0d pulse=%0d gated=%0d ext=%0d held=%0d ignored=%0d done=%0d stopped=%0d clear=%0d stalls=%0d test=%0d",
             n_filtered, n_trip_hi, n_trip_lo, n_trip_adc, n_trip_pulse, n_gated, n_ext_mode, n_held,
             n_ignored, n_post_done, n_writes_stopped, n_clear, n_axi_stall, n_test_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
