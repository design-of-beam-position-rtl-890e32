// bpm_ilk_pkg: types and constants shared by the beam position/phase
// interlock design.
//
// A beam-data sample carries, for each of the two monitored sets H1 and H2,
// the horizontal and vertical position, the phase, the SUM (beam intensity)
// and the transmission efficiency, plus the amplitude and phase sensed on the
// four pick-up probes and the four raw ADC values. All values are signed
// 16-bit numbers; the widths are this design's choice.
//
// The circular buffer stores a 256-bit record per sample: H1/H2 position,
// phase and SUM and the four probe amplitudes and phases (16 fields of 16
// bits, field 0 in the low bits). On the 32-bit AXI4 read bus a record is
// eight words; word w holds fields 2w (low half) and 2w+1 (high half).
//
// Interlock state bit map (25 states):
//   0..3    ADC raw value saturation, channel 0..3
//   4..13   H1: intensity hi/lo, phase hi/lo, X hi/lo, Y hi/lo, transm. eff. hi/lo
//   14..23  H2: same order
//   24      beam pulse width above its limit
package bpm_ilk_pkg;

  localparam int unsigned VW       = 16;   // width of every beam value
  localparam int unsigned N_ILK    = 25;   // interlock states
  localparam int unsigned N_QTY    = 10;   // thresholded quantities (5 per set x 2 sets)
  localparam int unsigned N_FIELDS = 16;   // fields per stored record
  localparam int unsigned REC_W    = N_FIELDS * VW;

  // Quantity index within a set (q = set*5 + k)
  localparam int unsigned Q_SUM   = 0;
  localparam int unsigned Q_PHASE = 1;
  localparam int unsigned Q_X     = 2;
  localparam int unsigned Q_Y     = 3;
  localparam int unsigned Q_TEFF  = 4;

  localparam int unsigned ILK_ADC_SAT = 0;
  localparam int unsigned ILK_QTY     = 4;
  localparam int unsigned ILK_PULSE   = 24;

  localparam logic [15:0] BEAM_EN_LEVEL_DEFAULT = 16'd200;

  typedef logic signed [VW-1:0] val_t;

  typedef struct packed {
    val_t teff;     // transmission efficiency
    val_t sum;      // SUM signal, beam intensity
    val_t phase;
    val_t y;
    val_t x;
  } set_t;

  typedef struct packed {
    val_t [3:0] adc_raw;
    val_t [3:0] probe_phase;
    val_t [3:0] probe_amp;
    set_t       h2;
    set_t       h1;
  } beam_sample_t;

  typedef logic [REC_W-1:0] rec_t;

  typedef enum logic [1:0] {
    TRIG_ALWAYS  = 2'd0,   // checks armed all the time
    TRIG_SUM     = 2'd1,   // armed while H1 SUM >= beam enable level
    TRIG_EXT     = 2'd2,   // armed while the external gate is high
    TRIG_SUM_EXT = 2'd3    // both
  } trig_mode_e;

  typedef struct packed {
    trig_mode_e          trig_mode;
    logic [15:0]         beam_en_level;  // signed compare against SUM
    logic [15:0]         over_time;      // consecutive samples before a state trips
    logic [15:0]         pulse_max;      // beam pulse width limit in samples
    logic [15:0]         adc_sat;        // |raw| at or above this is saturation
    logic [N_QTY-1:0][15:0] hi;          // high limits, signed
    logic [N_QTY-1:0][15:0] lo;          // low limits, signed
  } ilk_cfg_t;

  typedef enum logic [1:0] {
    BUF_WRITE = 2'd0,   // cyclic write, no interlock
    BUF_POST  = 2'd1,   // interlock seen, writing the post-interlock half
    BUF_DONE  = 2'd2    // record complete, writes stopped, ARM may read
  } buf_state_e;

  // Value of quantity q (0..9) of a sample.
  function automatic val_t qty_value(beam_sample_t s, int unsigned q);
    set_t st;
    st = (q >= 5) ? s.h2 : s.h1;
    case (q % 5)
      Q_SUM:   return st.sum;
      Q_PHASE: return st.phase;
      Q_X:     return st.x;
      Q_Y:     return st.y;
      default: return st.teff;
    endcase
  endfunction

  // Record stored in the circular buffer for a sample.
  function automatic rec_t to_record(beam_sample_t s);
    return {s.probe_phase, s.probe_amp,
            s.h2.sum, s.h2.phase, s.h2.y, s.h2.x,
            s.h1.sum, s.h1.phase, s.h1.y, s.h1.x};
  endfunction

endpackage
