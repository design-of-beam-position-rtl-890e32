// tb_ilk_status_latch: random live states and clear pulses against a model
// of the sticky latch, its OR output and the first-interlock event pulse.
module tb_ilk_status_latch;
  localparam int N = 25;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [N-1:0] live = '0, latched;
  logic ilk, event_o;
  int checks = 0, failures = 0, events = 0, held = 0;

  ilk_status_latch #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] m = '0, prev;
  logic ev;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 10000; i++) begin
      live  = ($urandom_range(0, 5) == 0) ? N'(1) << $urandom_range(0, N-1) : '0;
      clear = ($urandom_range(0, 30) == 0);
      prev  = clear ? '0 : m;
      m     = prev | live;
      ev    = (prev == '0) && (m != '0);
      @(posedge clk);
      #1;
      checks += 3;
      if (latched !== m) failures++;
      if (ilk !== (m != '0)) failures++;
      if (event_o !== ev) failures++;
      if (ev) events++;
      if (m != '0 && live == '0) held++;
    end
    checks++;
    if (events < 5 || held == 0) begin failures++; $display("coverage: events=%0d held=%0d", events, held); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
