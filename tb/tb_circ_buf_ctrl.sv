// tb_circ_buf_ctrl: checks the circular-buffer write sequence at reduced
// size (DEPTH 64, POST 32) against a reference pointer model.
//
// Each round writes a random number of samples cyclically, raises an
// interlock event, and checks: the locked address is the last one written,
// exactly POST-1 further records are written (lock+1 .. lock+POST-1), the
// controller then reports done and stops writing however many strobes come,
// rd_base equals lock+POST mod DEPTH, events while locked are ignored, and a
// clear returns to cyclic writing from where the pointer stopped. One round
// clears early, during the post-interlock phase.
module tb_circ_buf_ctrl;
  import bpm_ilk_pkg::*;
  localparam int DEPTH = 64, POST = 32, AW = 6;
  logic clk = 0, rst_n = 0, sample_valid = 0, ilk_event = 0, clear = 0;
  logic we, done;
  logic [AW-1:0] waddr, lock_addr, rd_base;
  buf_state_e state;
  int checks = 0, failures = 0, rounds_done = 0, early_clears = 0, ignored_events = 0;

  circ_buf_ctrl #(.DEPTH(DEPTH), .POST(POST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  int ptr = 0;   // model write pointer

  // one strobe; returns whether a write happened, checks its address
  task automatic strobe(output bit wrote);
    sample_valid = 1;
    #1;
    wrote = we;
    if (we) begin
      chk("waddr", int'(waddr), ptr);
      ptr = (ptr + 1) % DEPTH;
    end
    @(posedge clk); #1;
    sample_valid = 0;
    repeat ($urandom_range(1, 3)) @(posedge clk);
    #1;
  endtask

  initial begin
    bit w;
    int lock, post_writes;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int r = 0; r < 12; r++) begin
      int pre;
      pre = $urandom_range(5, 150);
      for (int i = 0; i < pre; i++) begin
        strobe(w);
        chk("write in WRITE", w, 1);
      end
      lock = (ptr + DEPTH - 1) % DEPTH;
      ilk_event = 1;
      @(posedge clk); #1;
      ilk_event = 0;
      chk("state POST", state, BUF_POST);
      chk("lock_addr", lock_addr, lock);
      chk("rd_base", rd_base, (lock + POST) % DEPTH);
      if (r == 5) begin
        // early clear during the post-interlock phase
        repeat (4) strobe(w);
        clear = 1; @(posedge clk); #1; clear = 0;
        chk("early clear -> WRITE", state, BUF_WRITE);
        early_clears++;
        continue;
      end
      post_writes = 0;
      for (int i = 0; i < POST + 20; i++) begin
        if (i == 7) begin
          ilk_event = 1; @(posedge clk); #1; ilk_event = 0;
          chk("event ignored", lock_addr, lock);
          ignored_events++;
        end
        strobe(w);
        if (w) post_writes++;
      end
      chk("post writes", post_writes, POST - 1);
      chk("done", done, 1);
      chk("state DONE", state, BUF_DONE);
      chk("pointer stopped at lock+POST", ptr, (lock + POST) % DEPTH);
      rounds_done++;
      clear = 1; @(posedge clk); #1; clear = 0;
      chk("clear -> WRITE", state, BUF_WRITE);
    end
    checks++;
    if (rounds_done == 0 || early_clears == 0 || ignored_events == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
