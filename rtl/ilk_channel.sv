// ilk_channel: one monitored interlock state.
//
// On every sample strobe the value is compared with its limit: above it for
// a "high" state, below it for a "low" state, and only while the reference
// (arm) is high. The state is asserted once the condition has held for
// over_time consecutive samples (0 acts as 1), the original design's "overthreshold
// time", which keeps single noisy samples from tripping the interlock. Any
// sample that does not meet the condition restarts the count and drops the
// state; holding the state is the job of the status latch that follows.
//
// Timing: state is registered; it changes on the clock edge at which
// sample_valid is high, for the sample presented in that cycle.
module ilk_channel #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_valid,
  input  logic                arm,
  input  logic signed [W-1:0] value,
  input  logic signed [W-1:0] limit,
  input  logic                is_high,
  input  logic [15:0]         over_time,
  output logic                state
);

  logic        cond;
  logic [15:0] cnt, cnt_next, need;

  assign cond     = arm && (is_high ? (value > limit) : (value < limit));
  assign cnt_next = (cnt == 16'hFFFF) ? cnt : cnt + 16'd1;
  assign need     = (over_time == 16'd0) ? 16'd1 : over_time;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      state <= 1'b0;
    end else if (sample_valid) begin
      if (cond) begin
        cnt   <= cnt_next;
        state <= cnt_next >= need;
      end else begin
        cnt   <= '0;
        state <= 1'b0;
      end
    end
  end

endmodule
