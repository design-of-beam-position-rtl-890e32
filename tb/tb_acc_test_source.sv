// tb_acc_test_source: checks that every field k of the test record equals
// the number of strobes since enable, plus k, and that disabling restarts it.
module tb_acc_test_source;
  import bpm_ilk_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, sample_valid = 0;
  beam_sample_t beam;
  int checks = 0, failures = 0;

  acc_test_source dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 5000; i++) begin
      if (i % 1000 == 0) en = 0; else en = 1;
      sample_valid = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      #1;
      if (!en) n = 0; else if (sample_valid) n++;
      for (int k = 0; k < $bits(beam_sample_t) / 16; k++) begin
        checks++;
        if (beam[16*k +: 16] !== 16'(n + k)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
