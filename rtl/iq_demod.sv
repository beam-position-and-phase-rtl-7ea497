// iq_demod: synchronous I/Q demodulator for one electrode channel.
//
// The IF is sampled at four samples per IF period (the 73.85 MHz IF aliases
// to fs/4 at fs = 22.72 MHz), so with x[n] = A cos(n*pi/2 + phi):
//   u[n] = x[n]   - x[n-2] = 2A cos(n*pi/2 + phi)
//   v[n] = x[n-1] - x[n-3] = 2A sin(n*pi/2 + phi)
// Rotating (u, v) back by n*pi/2 needs only swaps and sign changes, which
// gives I = 2A cos(phi), Q = 2A sin(phi) for every sample, so a uniformly
// filled ring yields a full-rate (22.72 Msps) stream of valid I/Q pairs. The
// differences also cancel any DC offset of the ADC.
//
// That the demodulation is synchronous and that the IF sits at fs/4 follows
// from the document's frequency plan; the sliding four-sample window and the
// rotation by a free-running 2-bit sample counter are this design's choice.
//
// Interface: x is a signed ADC sample accepted when in_valid is high. i_out
// and q_out are registered: one cycle of latency, one result per valid input.
// The first three outputs after reset use zero-initialised history.
module iq_demod #(
  parameter int ADC_W = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [ADC_W-1:0] x,
  output logic                   out_valid,
  output logic signed [ADC_W+1:0] i_out,
  output logic signed [ADC_W+1:0] q_out
);

  localparam int OW = ADC_W + 2;

  logic signed [ADC_W-1:0] x1, x2, x3;  // x[n-1], x[n-2], x[n-3]
  logic [1:0]              ph;          // n mod 4
  logic signed [OW-1:0]    u, v, i_c, q_c;

  always_comb begin
    u = OW'(x) - OW'(x2);
    v = OW'(x1) - OW'(x3);
    unique case (ph)
      2'd0: begin i_c =  u; q_c =  v; end
      2'd1: begin i_c =  v; q_c = -u; end
      2'd2: begin i_c = -u; q_c = -v; end
      default: begin i_c = -v; q_c =  u; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; x3 <= '0;
      ph <= '0;
      out_valid <= 1'b0;
      i_out <= '0;
      q_out <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= x; x2 <= x1; x3 <= x2;
        ph <= ph + 2'd1;
        i_out <= i_c;
        q_out <= q_c;
      end
    end
  end

endmodule
