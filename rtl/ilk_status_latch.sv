// ilk_status_latch: latches the interlock states until the ARM clears them.
//
// Each live state sets its latched bit, which then holds until a clear
// pulse. A state still active in the clear cycle stays latched, so a clear
// cannot hide a fault that persists. ilk, the OR of the latched bits, is the
// interlock sent to the machine protection system; event pulses for one cycle
// when the latch goes from all-clear to any bit set, which is what locks the
// circular buffer address. Latching the status follows the original design; the
// clear rule and the event pulse are this design's choices.
//
// Timing: latched, ilk and event are registered, one cycle after live.
module ilk_status_latch #(
  parameter int unsigned N = 25
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] live,
  input  logic         clear,
  output logic [N-1:0] latched,
  output logic         ilk,
  output logic         event_o
);

  logic [N-1:0] kept, nxt;
  assign kept = clear ? '0 : latched;
  assign nxt  = kept | live;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      latched <= '0;
      event_o <= 1'b0;
    end else begin
      latched <= nxt;
      event_o <= (kept == '0) && (nxt != '0);
    end
  end

  assign ilk = |latched;

endmodule
