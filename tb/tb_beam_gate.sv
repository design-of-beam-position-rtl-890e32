// tb_beam_gate: checks the beam-present reference in all four trigger modes
// and the beam pulse width measurement against a reference model.
//
// Random SUM values around the enable level (default 200) and a random
// external gate are applied with sample strobes; beam_en is checked every
// cycle, width and pulse_long after every strobe. Counts that every mode was
// used and that a pulse was flagged as too long.
module tb_beam_gate;
  import bpm_ilk_pkg::*;
  logic clk = 0, rst_n = 0, sample_valid = 0, ext_trig = 0;
  trig_mode_e mode = TRIG_ALWAYS;
  logic [15:0] level = BEAM_EN_LEVEL_DEFAULT, pulse_max = 16'd5;
  val_t sum = '0;
  logic beam_en, pulse_long;
  logic [15:0] width;
  int checks = 0, failures = 0, long_seen = 0;
  int mode_used [4] = '{0, 0, 0, 0};

  beam_gate dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d at %0t mode %0d", what, got, exp, $time, mode);
    end
  endtask

  int w = 0;
  logic en_exp, long_exp;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 20000; i++) begin
      if (i % 1000 == 0) begin
        mode      = trig_mode_e'(i / 1000 % 4);
        pulse_max = 16'($urandom_range(2, 12));
      end
      // slowly varying SUM so pulses last several samples
      if ($urandom_range(0, 7) == 0) sum = val_t'($urandom_range(150, 250));
      if ($urandom_range(0, 9) == 0) ext_trig = ~ext_trig;
      sample_valid = ($urandom_range(0, 1) != 0);
      #1;
      case (mode)
        TRIG_ALWAYS:  en_exp = 1;
        TRIG_SUM:     en_exp = sum >= 200;
        TRIG_EXT:     en_exp = ext_trig;
        default:      en_exp = (sum >= 200) && ext_trig;
      endcase
      check("beam_en", 16'(beam_en), 16'(en_exp));
      mode_used[mode]++;
      if (sample_valid) begin
        w = en_exp ? w + 1 : w;
        long_exp = en_exp && (w > pulse_max);
        if (!en_exp) w = 0;
      end
      @(posedge clk);
      #1;
      if (sample_valid) begin
        check("pulse_long", 16'(pulse_long), 16'(long_exp));
        if (en_exp) check("width", width, 16'(w));
        if (long_exp) long_seen++;
      end
      sample_valid = 0;
    end
    checks++;
    if (long_seen == 0 || mode_used[0] == 0 || mode_used[1] == 0 || mode_used[2] == 0 || mode_used[3] == 0) begin
      failures++;
      $display("coverage missing: long=%0d", long_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
