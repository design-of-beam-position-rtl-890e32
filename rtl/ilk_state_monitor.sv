// ilk_state_monitor: the 25 live interlock states of the system.
//
// Instantiates the beam gate and one ilk_channel per monitored state:
//   bits 0..3   ADC raw value saturation (|raw| >= adc_sat), not gated by
//               the beam reference, since saturation matters with or without
//               beam;
//   bits 4..23  high and low limits of beam intensity (SUM), phase,
//               horizontal and vertical position and transmission efficiency,
//               for H1 and H2 (bit 4 + 2q is the high state of quantity q,
//               bit 5 + 2q its low state, q as in bpm_ilk_pkg), gated by the
//               beam reference;
//   bit 24      beam pulse width above its limit.
// The list of quantities follows the original design's table of monitored states;
// the bit order and the reading of the 25th state as the pulse width are
// this design's choices. All limits share one overthreshold time.
//
// Timing: live is registered, valid from the cycle after a sample strobe.
module ilk_state_monitor
  import bpm_ilk_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample_valid,
  input  beam_sample_t      beam,
  input  logic              ext_trig,
  input  ilk_cfg_t          cfg,
  output logic              beam_en,
  output logic [N_ILK-1:0]  live
);

  logic [15:0] width;

  beam_gate u_gate (
    .clk, .rst_n, .sample_valid,
    .mode      (cfg.trig_mode),
    .level     (cfg.beam_en_level),
    .sum       (beam.h1.sum),
    .ext_trig,
    .pulse_max (cfg.pulse_max),
    .beam_en,
    .width,
    .pulse_long(live[ILK_PULSE])
  );

  // ADC saturation: |raw| > adc_sat - 1, compared on 17 bits so that the
  // magnitude of -32768 and a limit of 0 are both representable.
  for (genvar c = 0; c < 4; c++) begin : g_adc
    logic signed [16:0] mag, lim;
    assign mag = beam.adc_raw[c][15] ? -{beam.adc_raw[c][15], beam.adc_raw[c]}
                                     :  {1'b0, beam.adc_raw[c]};
    assign lim = $signed({1'b0, cfg.adc_sat}) - 17'sd1;
    ilk_channel #(.W(17)) u_ch (
      .clk, .rst_n, .sample_valid,
      .arm      (1'b1),
      .value    (mag),
      .limit    (lim),
      .is_high  (1'b1),
      .over_time(cfg.over_time),
      .state    (live[ILK_ADC_SAT + c])
    );
  end

  for (genvar q = 0; q < N_QTY; q++) begin : g_qty
    val_t v;
    assign v = qty_value(beam, q);
    ilk_channel #(.W(VW)) u_hi (
      .clk, .rst_n, .sample_valid,
      .arm      (beam_en),
      .value    (v),
      .limit    ($signed(cfg.hi[q])),
      .is_high  (1'b1),
      .over_time(cfg.over_time),
      .state    (live[ILK_QTY + 2*q])
    );
    ilk_channel #(.W(VW)) u_lo (
      .clk, .rst_n, .sample_valid,
      .arm      (beam_en),
      .value    (v),
      .limit    ($signed(cfg.lo[q])),
      .is_high  (1'b0),
      .over_time(cfg.over_time),
      .state    (live[ILK_QTY + 2*q + 1])
    );
  end

endmodule
