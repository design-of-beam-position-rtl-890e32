// tb_ilk_channel: random test of one interlock state channel.
//
// Drives random values, limits, directions, arming and overthreshold times,
// with sample strobes on a random subset of cycles, and compares the state
// after every strobe with a reference count of consecutive samples that met
// the condition. Also counts that both the filtered case (condition met for
// fewer samples than over_time) and the tripped case occurred.
module tb_ilk_channel;
  logic clk = 0, rst_n = 0, sample_valid = 0, arm = 0, is_high = 0;
  logic signed [15:0] value = 0, limit = 0;
  logic [15:0] over_time = 0;
  logic state;
  int checks = 0, failures = 0, filtered = 0, tripped = 0;

  ilk_channel #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int run = 0;
  logic exp_state;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 20000; i++) begin
      logic c;
      if (i % 500 == 0) begin
        over_time = 16'($urandom_range(0, 5));
        is_high   = 1'($urandom);
        limit     = 16'($urandom_range(0, 200)) - 16'sd100;
      end
      arm   = ($urandom_range(0, 9) != 0);
      value = limit + 16'($signed($urandom_range(0, 20)) - 10);
      sample_valid = ($urandom_range(0, 2) != 0);
      c = arm && (is_high ? value > limit : value < limit);
      if (sample_valid) begin
        run = c ? run + 1 : 0;
      end
      @(posedge clk);
      #1;
      if (sample_valid) begin
        exp_state = run >= ((over_time == 0) ? 1 : int'(over_time));
        checks++;
        if (state !== exp_state) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: run=%0d ot=%0d state=%b", i, run, over_time, state);
        end
        if (run > 0 && !exp_state) filtered++;
        if (exp_state) tripped++;
      end
      sample_valid = 0;
    end
    checks++;
    if (filtered == 0 || tripped == 0) begin
      failures++;
      $display("coverage: filtered=%0d tripped=%0d", filtered, tripped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
