// circ_buf_ctrl: write-side controller of the circular beam-data buffer.
//
// With no interlock the buffer is written cyclically, one record per sample
// strobe (BUF_WRITE). On an interlock event the address of the most recently
// written record is locked (lock_addr) and writing goes on (BUF_POST) until
// the write pointer is POST records past the lock address; that record is not
// written and the controller stops (BUF_DONE), so the buffer then holds
// DEPTH-POST records before the interlock sample and POST records from it on.
// The oldest record, where the ARM starts reading, is rd_base = lock_addr +
// POST modulo DEPTH, i.e. lock_addr - 4096 for the original design's 8192/4096.
// A clear from the ARM returns to cyclic writing. This sequence is the one
// the original design gives; the exact cycle at which the address is locked is this
// design's choice.
//
// Interface: we/waddr drive the BRAM write port in the cycle of a sample
// strobe. Events while in BUF_POST or BUF_DONE are ignored. done is high in
// BUF_DONE and serves as the read interrupt to the ARM.
module circ_buf_ctrl
  import bpm_ilk_pkg::*;
#(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned POST  = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_valid,
  input  logic          ilk_event,
  input  logic          clear,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [AW-1:0] lock_addr,
  output logic [AW-1:0] rd_base,
  output buf_state_e    state,
  output logic          done
);

  localparam logic [AW-1:0] POST_A = AW'(POST);

  logic [AW-1:0] wr_ptr, wr_ptr_inc;
  assign wr_ptr_inc = wr_ptr + 1'b1;

  logic post_end;
  assign post_end = wr_ptr == lock_addr + POST_A;
  assign we       = sample_valid &&
                    (state == BUF_WRITE || (state == BUF_POST && !post_end));
  assign waddr   = wr_ptr;
  assign rd_base = lock_addr + POST_A;
  assign done    = state == BUF_DONE;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      lock_addr <= '0;
      state     <= BUF_WRITE;
    end else begin
      if (we) wr_ptr <= wr_ptr_inc;
      unique case (state)
        BUF_WRITE: begin
          if (ilk_event && !clear) begin
            lock_addr <= wr_ptr - 1'b1;
            state     <= BUF_POST;
          end
        end
        BUF_POST: begin
          if (clear) state <= BUF_WRITE;
          else if (post_end) state <= BUF_DONE;
        end
        BUF_DONE: begin
          if (clear) state <= BUF_WRITE;
        end
        default: state <= BUF_WRITE;
      endcase
    end
  end

  initial begin
    assert (POST >= 2 && POST <= DEPTH) else $error("POST must be in 2..DEPTH");
    assert ((1 << AW) == DEPTH) else $error("DEPTH must be a power of two");
  end

endmodule
