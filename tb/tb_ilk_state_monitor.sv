// tb_ilk_state_monitor: all 25 live interlock states against a reference
// model written directly from the bit map (ADC saturation on |raw|, gated
// high/low limits of the ten quantities, beam pulse width).
//
// Limits, overthreshold time, pulse width limit and trigger mode are
// re-randomised every 400 samples; sample values are drawn close to the
// limits so that every state both trips and clears. After every strobe the
// whole live vector is compared; the test also counts that each of the 25
// states tripped at least once.
module tb_ilk_state_monitor;
  import bpm_ilk_pkg::*;
  logic clk = 0, rst_n = 0, sample_valid = 0, ext_trig = 0;
  beam_sample_t beam = '0;
  ilk_cfg_t cfg;
  logic beam_en;
  logic [N_ILK-1:0] live;
  int checks = 0, failures = 0;
  int trips [N_ILK];
  int run [N_ILK];
  int pw = 0;

  ilk_state_monitor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  // value near one of the limits of quantity q
  function automatic val_t near(int q);
    int base;
    base = $urandom_range(0, 1) ? int'($signed(cfg.hi[q])) : int'($signed(cfg.lo[q]));
    return val_t'(base + $signed($urandom_range(0, 8)) - 4);
  endfunction

  logic [N_ILK-1:0] exp_live;

  initial begin
    cfg = '0;
    cfg.trig_mode = TRIG_SUM;
    cfg.beam_en_level = 16'd200;
    cfg.over_time = 16'd1;
    cfg.pulse_max = 16'hFFFF;
    cfg.adc_sat = 16'h7FFF;
    foreach (run[i]) begin run[i] = 0; trips[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 30000; i++) begin
      logic en;
      if (i % 400 == 0) begin
        cfg.trig_mode = trig_mode_e'($urandom_range(0, 3));
        cfg.over_time = 16'($urandom_range(0, 3));
        cfg.pulse_max = 16'($urandom_range(3, 20));
        cfg.adc_sat   = 16'($urandom_range(100, 32767));
        for (int q = 0; q < N_QTY; q++) begin
          int lo;
          lo = $signed($urandom_range(0, 2000)) - 1000;
          cfg.lo[q] = 16'(lo);
          cfg.hi[q] = 16'(lo + $urandom_range(10, 500));
        end
        // H1 SUM (q=0) straddles the beam enable level
        cfg.lo[0] = 16'd150; cfg.hi[0] = 16'd260;
      end
      if ($urandom_range(0, 3) == 0) begin
        for (int q = 0; q < N_QTY; q++) begin
          val_t v;
          v = near(q);
          if (q >= 5) begin
            case (q % 5) 0: beam.h2.sum = v; 1: beam.h2.phase = v; 2: beam.h2.x = v; 3: beam.h2.y = v; default: beam.h2.teff = v; endcase
          end else begin
            case (q % 5) 0: beam.h1.sum = v; 1: beam.h1.phase = v; 2: beam.h1.x = v; 3: beam.h1.y = v; default: beam.h1.teff = v; endcase
          end
        end
        for (int c = 0; c < 4; c++) begin
          int m;
          m = int'(cfg.adc_sat) + $signed($urandom_range(0, 4)) - 2;
          if (m > 32767) m = 32767;
          beam.adc_raw[c] = val_t'($urandom_range(0, 1) ? m : -m);
          if ($urandom_range(0, 9) == 0) beam.adc_raw[c] = 16'sh8000;
        end
        // SUM hovering around the beam enable level for long pulses
        if ($urandom_range(0, 1)) beam.h1.sum = val_t'($urandom_range(195, 260));
      end
      if ($urandom_range(0, 9) == 0) ext_trig = ~ext_trig;
      sample_valid = ($urandom_range(0, 1) != 0);
      case (cfg.trig_mode)
        TRIG_ALWAYS: en = 1;
        TRIG_SUM:    en = int'(beam.h1.sum) >= 200;
        TRIG_EXT:    en = ext_trig;
        default:     en = (int'(beam.h1.sum) >= 200) && ext_trig;
      endcase
      if (sample_valid) begin
        int need;
        need = (cfg.over_time == 0) ? 1 : int'(cfg.over_time);
        for (int c = 0; c < 4; c++) begin
          run[c] = (iabs(int'(beam.adc_raw[c])) >= int'(cfg.adc_sat)) ? run[c] + 1 : 0;
          exp_live[c] = run[c] >= need;
        end
        for (int q = 0; q < N_QTY; q++) begin
          int v;
          v = int'(qty_value(beam, q));
          run[4 + 2*q]     = (en && v > int'($signed(cfg.hi[q]))) ? run[4 + 2*q] + 1 : 0;
          run[4 + 2*q + 1] = (en && v < int'($signed(cfg.lo[q]))) ? run[4 + 2*q + 1] + 1 : 0;
          exp_live[4 + 2*q]     = run[4 + 2*q] >= need;
          exp_live[4 + 2*q + 1] = run[4 + 2*q + 1] >= need;
        end
        pw = en ? pw + 1 : 0;
        exp_live[24] = pw > int'(cfg.pulse_max);
      end
      #1;
      checks++;
      if (beam_en !== en) failures++;
      @(posedge clk); #1;
      if (sample_valid) begin
        checks++;
        if (live !== exp_live) begin
          failures++;
          if (failures < 10) $display("%0t live %h expected %h", $time, live, exp_live);
        end
        for (int b = 0; b < N_ILK; b++) if (exp_live[b]) trips[b]++;
      end
      sample_valid = 0;
    end
    for (int b = 0; b < N_ILK; b++) begin
      checks++;
      if (trips[b] == 0) begin failures++; $display("state %0d never tripped", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
