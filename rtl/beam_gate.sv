// beam_gate: beam-present reference and beam pulse width check.
//
// The threshold checks of the interlock system only make sense while beam is
// present. This block forms that reference signal (beam_en) from the trigger
// mode: always on, H1 SUM at or above the beam enable level (default 200, the
// level the original design's parameter interface shows), an external gate, or SUM
// level and external gate together. The reference is combinational from the
// current sample so the checks of a sample use that sample's own reference.
//
// It also measures the width of each beam pulse, in samples, as the number of
// consecutive samples with beam_en high, and raises pulse_long (registered on
// the sample strobe) while the running width exceeds pulse_max. This is the
// original design's "beam width of the pulsed beam" quantity; the way it is measured
// here is this design's choice.
//
// Timing: beam_en follows the inputs in the same cycle; pulse_long and
// width update on the clock edge at which sample_valid is high.
module beam_gate
  import bpm_ilk_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample_valid,
  input  trig_mode_e  mode,
  input  logic [15:0] level,       // signed beam enable level
  input  val_t        sum,         // H1 SUM of the current sample
  input  logic        ext_trig,    // external beam gate
  input  logic [15:0] pulse_max,   // pulse width limit in samples
  output logic        beam_en,
  output logic [15:0] width,       // width of the current (or last) pulse
  output logic        pulse_long
);

  logic sum_ok;
  assign sum_ok = sum >= $signed(level);

  always_comb begin
    unique case (mode)
      TRIG_ALWAYS:  beam_en = 1'b1;
      TRIG_SUM:     beam_en = sum_ok;
      TRIG_EXT:     beam_en = ext_trig;
      TRIG_SUM_EXT: beam_en = sum_ok && ext_trig;
      default:      beam_en = 1'b1;
    endcase
  end

  logic        in_pulse;
  logic [15:0] width_next;
  assign width_next = (width == 16'hFFFF) ? width : width + 16'd1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pulse   <= 1'b0;
      width      <= '0;
      pulse_long <= 1'b0;
    end else if (sample_valid) begin
      in_pulse <= beam_en;
      if (beam_en) begin
        // a new pulse restarts the count at 1
        width      <= in_pulse ? width_next : 16'd1;
        pulse_long <= (in_pulse ? width_next : 16'd1) > pulse_max;
      end else begin
        pulse_long <= 1'b0;
      end
    end
  end

endmodule
