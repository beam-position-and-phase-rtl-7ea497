// bpm_processor: the complete per-sample processing chain of the monitor.
//
// Four electrode channels A, B, C, D are demodulated synchronously into I/Q
// pairs (iq_demod). The amplitude of each channel comes from a vectoring
// CORDIC; the four I/Q pairs are also added into one sum vector whose angle,
// from a fifth CORDIC, is the beam phase relative to the RF-locked sampling
// clock. The amplitudes give the sum and the horizontal and vertical
// differences (sum_diff), which two pipelined dividers (pos_div) normalise
// into positions. Sum, phase and the four electrode amplitudes are delayed
// to line up with the positions.
//
// Synchronous I/Q demodulation, amplitude and phase detection and the
// difference/sum position signals follow the document; taking the phase from
// the sum of the four vectors, and all pipelining and number formats, are
// this design's choice.
//
// Interface: four signed ADC_W-bit samples with one in_valid, one sample set
// per clock at full rate. out is a bpm_pkg::proc_sample_t with out_valid;
// latency LATENCY = 37 clocks (1 demodulator + 17 CORDIC + 1 sum/difference
// + 18 divider), throughput one result per clock.
module bpm_processor
  import bpm_pkg::proc_sample_t, bpm_pkg::POS_W, bpm_pkg::SUM_W, bpm_pkg::PHASE_W, bpm_pkg::MAG_W;
#(
  parameter int ADC_W = bpm_pkg::ADC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] adc_a,
  input  logic signed [ADC_W-1:0] adc_b,
  input  logic signed [ADC_W-1:0] adc_c,
  input  logic signed [ADC_W-1:0] adc_d,
  output logic                    out_valid,
  output proc_sample_t            out
);

  localparam int IW     = ADC_W + 2;  // I/Q width
  localparam int ITER   = 16;
  localparam int CW     = IW + 2;     // magnitude width
  localparam int SW     = CW + 2;     // sum width
  localparam int DIV_LAT = POS_W + 2;

  // ---- synchronous I/Q demodulation
  logic signed [ADC_W-1:0] adc [4];
  logic signed [IW-1:0]    i_ch [4];
  logic signed [IW-1:0]    q_ch [4];
  logic [3:0]              iq_v;

  assign adc[0] = adc_a;
  assign adc[1] = adc_b;
  assign adc[2] = adc_c;
  assign adc[3] = adc_d;

  for (genvar ch = 0; ch < 4; ch++) begin : g_ch
    iq_demod #(.ADC_W(ADC_W)) u_iq (
      .clk, .rst_n, .in_valid,
      .x(adc[ch]), .out_valid(iq_v[ch]), .i_out(i_ch[ch]), .q_out(q_ch[ch])
    );
  end

  // ---- amplitudes
  logic [CW-1:0] mag [4];
  logic [3:0]    mag_v;
  logic signed [15:0] unused_ph [4];

  for (genvar ch = 0; ch < 4; ch++) begin : g_amp
    cordic_vec #(.IN_W(IW), .ITER(ITER)) u_amp (
      .clk, .rst_n, .in_valid(iq_v[ch]),
      .i_in(i_ch[ch]), .q_in(q_ch[ch]),
      .out_valid(mag_v[ch]), .mag(mag[ch]), .phase(unused_ph[ch])
    );
  end

  // ---- phase of the summed vector
  logic signed [IW+1:0] i_sum, q_sum;
  assign i_sum = (IW+2)'(i_ch[0]) + (IW+2)'(i_ch[1]) + (IW+2)'(i_ch[2]) + (IW+2)'(i_ch[3]);
  assign q_sum = (IW+2)'(q_ch[0]) + (IW+2)'(q_ch[1]) + (IW+2)'(q_ch[2]) + (IW+2)'(q_ch[3]);

  logic               ph_v;
  logic [IW+3:0]      unused_mag;
  logic signed [15:0] phase;

  cordic_vec #(.IN_W(IW+2), .ITER(ITER)) u_phase (
    .clk, .rst_n, .in_valid(iq_v[0]),
    .i_in(i_sum), .q_in(q_sum),
    .out_valid(ph_v), .mag(unused_mag), .phase(phase)
  );

  // ---- sum and differences
  logic                 sd_v;
  logic [SW-1:0]        sum;
  logic signed [SW-1:0] dx, dy;

  sum_diff #(.MAG_W(CW)) u_sd (
    .clk, .rst_n, .in_valid(mag_v[0]),
    .a(mag[0]), .b(mag[1]), .c(mag[2]), .d(mag[3]),
    .out_valid(sd_v), .sum(sum), .dx(dx), .dy(dy)
  );

  // ---- normalised positions
  logic                    x_v, y_v;
  logic signed [POS_W-1:0] x_pos, y_pos;

  pos_div #(.NUM_W(SW), .Q_W(POS_W)) u_div_x (
    .clk, .rst_n, .in_valid(sd_v), .num(dx), .den(sum),
    .out_valid(x_v), .quot(x_pos)
  );

  pos_div #(.NUM_W(SW), .Q_W(POS_W)) u_div_y (
    .clk, .rst_n, .in_valid(sd_v), .num(dy), .den(sum),
    .out_valid(y_v), .quot(y_pos)
  );

  // ---- align sum and phase with the positions
  logic [SW-1:0] sum_d;
  logic [15:0]   phase_d;

  delay_line #(.W(SW), .DEPTH(DIV_LAT)) u_dly_sum (
    .clk, .rst_n, .d(sum), .q(sum_d)
  );

  delay_line #(.W(16), .DEPTH(DIV_LAT + 1)) u_dly_ph (
    .clk, .rst_n, .d(phase), .q(phase_d)
  );

  logic [4*CW-1:0] amp_d;

  delay_line #(.W(4 * CW), .DEPTH(DIV_LAT + 1)) u_dly_amp (
    .clk, .rst_n, .d({mag[3], mag[2], mag[1], mag[0]}), .q(amp_d)
  );

  assign out_valid = x_v;
  always_comb begin
    for (int ch = 0; ch < 4; ch++) out.amp[ch] = MAG_W'(amp_d[ch*CW +: CW]);
    out.sum   = SUM_W'(sum_d);
    out.x     = x_pos;
    out.y     = y_pos;
    out.phase = PHASE_W'(phase_d);
  end

  // The unused outputs of the shared CORDIC/divider instances.
  logic unused_ok;
  assign unused_ok = ^{unused_ph[0], unused_ph[1], unused_ph[2], unused_ph[3],
                       unused_mag, mag_v[3:1], ph_v, y_v, iq_v[3:1]};

endmodule
