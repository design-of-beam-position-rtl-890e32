// acc_test_source: accumulator test source for the beam-data path.
//
// In the test mode the beam input is replaced by this source, as done in the
// original design's laboratory tests with a cumulative number: a counter advances by
// one on every sample strobe, and field k of the sample (16-bit fields, field
// 0 in the low bits of beam_sample_t) carries count + k. Any lost, doubled or
// reordered record in the buffer then shows as a step other than one between
// consecutive records. Putting count + k into every field is this design's
// choice. The counter restarts from zero while en is low.
//
// Timing: beam is registered and changes on the clock edge of a sample
// strobe, so sample n is presented after the n-th strobe.
module acc_test_source
  import bpm_ilk_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sample_valid,
  output beam_sample_t beam
);

  localparam int unsigned NF = $bits(beam_sample_t) / VW;

  logic [VW-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) count <= '0;
    else if (sample_valid) count <= count + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < NF; k++) beam[VW*k +: VW] = count + VW'(k);
  end

endmodule
