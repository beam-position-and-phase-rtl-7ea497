// bpm_top: FPGA processing of the four pick-up signals of a beam position
// monitor, giving beam position and beam phase.
//
// The RF front end down-converts the electrode signals A, B, C, D from a
// 10 MHz band around 352.2 MHz to a 73.85 MHz IF, which the ADCs sample at
// fs = 22.72 MHz, a clock derived from the RF (2 * 352.2 MHz / 31). The IF
// then aliases to fs/4, so the processing (bpm_processor) is a synchronous
// I/Q demodulation followed by amplitude and phase detection, sum and
// difference/sum position, one result per clock. The result stream goes to
// the acquisition memory (acq_buffer), which starts on the revolution clock
// after an acquisition trigger and holds four blocks of 2048 words for the
// host, and to two monitor DACs (dac_out). The stream itself is also
// brought out.
//
// The ADCs, RF front end, clock generation and the compact PCI host link are
// outside the FPGA; this module has the FPGA's pins: four 12-bit ADC buses
// (two's complement, one sample per clock), the revolution clock and the
// trigger (asynchronous, synchronised inside), a host read port and the DAC
// codes.
//
// Timing: processed output 37 clocks after the ADC sample; host_data one
// clock after host_blk/host_addr.
module bpm_top
  import bpm_pkg::proc_sample_t, bpm_pkg::quantity_e;
#(
  parameter int ADC_W     = bpm_pkg::ADC_W,
  parameter int BLOCK_LEN = bpm_pkg::BLOCK_LEN,
  parameter int N_BLOCKS  = bpm_pkg::N_BLOCKS,
  parameter int DAC_W     = 12
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic signed [ADC_W-1:0]      adc_a,
  input  logic signed [ADC_W-1:0]      adc_b,
  input  logic signed [ADC_W-1:0]      adc_c,
  input  logic signed [ADC_W-1:0]      adc_d,
  input  logic                         rev_clk,
  input  logic                         acq_trig,
  input  logic                         turn_mode,
  input  logic                         amp_mode,
  input  logic [6:0]                   turn_offset,
  input  quantity_e                    dac0_sel,
  input  quantity_e                    dac1_sel,
  input  logic [$clog2(N_BLOCKS)-1:0]  host_blk,
  input  logic [$clog2(BLOCK_LEN)-1:0] host_addr,
  output logic [15:0]                  host_data,
  output logic                         acq_armed,
  output logic                         acq_busy,
  output logic                         acq_done,
  output logic                         rev_seen,
  output logic [DAC_W-1:0]             dac0,
  output logic [DAC_W-1:0]             dac1,
  output logic                         proc_valid,
  output proc_sample_t                 proc
);

  bpm_processor #(.ADC_W(ADC_W)) u_proc (
    .clk, .rst_n, .in_valid(1'b1),
    .adc_a, .adc_b, .adc_c, .adc_d,
    .out_valid(proc_valid), .out(proc)
  );

  acq_buffer #(.BLOCK_LEN(BLOCK_LEN), .N_BLOCKS(N_BLOCKS), .DATA_W(bpm_pkg::DATA_W), .OFF_W(7)) u_acq (
    .clk, .rst_n, .rev_clk, .acq_trig, .turn_mode, .amp_mode, .turn_offset,
    .in_valid(proc_valid), .in(proc),
    .host_blk, .host_addr, .host_data,
    .busy(acq_busy), .done(acq_done), .armed(acq_armed), .rev_seen
  );

  dac_out #(.DAC_W(DAC_W)) u_dac (
    .clk, .rst_n, .in_valid(proc_valid), .in(proc),
    .sel0(dac0_sel), .sel1(dac1_sel), .dac0, .dac1
  );

endmodule
