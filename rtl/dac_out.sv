// dac_out: two monitor DAC channels. Each channel shows one processed
// quantity chosen by its select input (sum, horizontal position, vertical
// position or phase, see bpm_pkg::quantity_e), so that a signal can be
// watched on an oscilloscope or spectrum analyser without the host.
// Signed quantities are converted to offset binary (mid-scale = 0) and
// truncated to the DAC_W most significant bits; the sum is unsigned and
// goes out as its top DAC_W bits.
//
// The two DAC outputs appear in the document's block diagram; what they
// carry, their width and coding are this design's choice.
//
// Timing: outputs registered, one clock after the input sample; they hold
// their value while in_valid is low.
module dac_out
  import bpm_pkg::proc_sample_t, bpm_pkg::quantity_e, bpm_pkg::sum_word,
         bpm_pkg::SEL_SUM, bpm_pkg::SEL_X, bpm_pkg::SEL_Y, bpm_pkg::SEL_PHASE;
#(
  parameter int DAC_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  proc_sample_t     in,
  input  quantity_e        sel0,
  input  quantity_e        sel1,
  output logic [DAC_W-1:0] dac0,
  output logic [DAC_W-1:0] dac1
);

  function automatic logic [DAC_W-1:0] code(input quantity_e sel, input proc_sample_t s);
    logic [15:0] w;
    unique case (sel)
      SEL_SUM:   w = sum_word(s.sum);
      SEL_X:     w = {~s.x[15], s.x[14:0]};
      SEL_Y:     w = {~s.y[15], s.y[14:0]};
      SEL_PHASE: w = {~s.phase[15], s.phase[14:0]};
      default:   w = '0;
    endcase
    return w[15 -: DAC_W];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac0 <= DAC_W'(1) << (DAC_W - 1);  // mid-scale
      dac1 <= DAC_W'(1) << (DAC_W - 1);
    end else if (in_valid) begin
      dac0 <= code(sel0, in);
      dac1 <= code(sel1, in);
    end
  end

endmodule
