// cordic_vec: pipelined vectoring CORDIC, magnitude and angle of (I, Q).
//
// Stage 0 folds the vector into the right half plane (negating it and
// starting the angle at pi when I < 0). Each of the ITER following stages
// rotates the vector by +/-atan(2^-k) towards the I axis and accumulates the
// rotation (a 20-bit angle, rounded to 16 bits at the output; the vector
// carries six guard bits). At the end the I component holds K*sqrt(I^2+Q^2), with the fixed
// CORDIC gain K = 1.6468, and the angle register holds atan2(Q, I).
//
// The document asks for amplitude and phase of the demodulated signals; the
// CORDIC algorithm, its length and the number formats are this design's
// choice. The gain K is common to all channels and cancels in the position
// ratios.
//
// Interface: i_in/q_in signed IN_W bits, accepted every clock with in_valid.
// mag is unsigned IN_W+2 bits (K times the modulus). phase is signed 16
// bits, 65536 units per 2*pi (0x8000 = -pi). Latency ITER+1 clocks,
// throughput one vector per clock.
module cordic_vec #(
  parameter int IN_W = 14,
  parameter int ITER = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  output logic                   out_valid,
  output logic [IN_W+1:0]        mag,
  output logic signed [15:0]     phase
);

  localparam int GUARD = 6;                 // extra fraction bits
  localparam int ZW    = 20;                // angle accumulator width
  localparam int XW    = IN_W + 3 + GUARD;  // sign + growth up to K*sqrt(2)

  // atan(2^-k) in units of 2*pi/2^20 (four fraction bits below the output).
  function automatic logic signed [ZW-1:0] atan_tab(input int k);
    case (k)
      0: return 20'sd131072;
      1: return 20'sd77376;
      2: return 20'sd40884;
      3: return 20'sd20753;
      4: return 20'sd10417;
      5: return 20'sd5213;
      6: return 20'sd2607;
      7: return 20'sd1304;
      8: return 20'sd652;
      9: return 20'sd326;
      10: return 20'sd163;
      11: return 20'sd81;
      12: return 20'sd41;
      13: return 20'sd20;
      14: return 20'sd10;
      15: return 20'sd5;
      16: return 20'sd3;
      17: return 20'sd1;
      18: return 20'sd1;
      default: return 20'sd0;
    endcase
  endfunction

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];

  // Stage 0: half-plane fold.
  logic signed [XW-1:0] xi, yi;
  assign xi = XW'(i_in) <<< GUARD;
  assign yi = XW'(q_in) <<< GUARD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (xi < 0) begin
        xs[0] <= -xi; ys[0] <= -yi; zs[0] <= ZW'(20'sh80000);  // pi
      end else begin
        xs[0] <= xi;  ys[0] <= yi;  zs[0] <= '0;
      end
    end
  end

  for (genvar k = 0; k < ITER; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[k+1] <= '0; ys[k+1] <= '0; zs[k+1] <= '0; vs[k+1] <= 1'b0;
      end else begin
        vs[k+1] <= vs[k];
        if (ys[k] < 0) begin  // rotate counter-clockwise
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - atan_tab(k);
        end else begin        // rotate clockwise
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + atan_tab(k);
        end
      end
    end
  end

  assign out_valid = vs[ITER];
  assign mag       = (IN_W+2)'(xs[ITER] >>> GUARD);
  // Round the accumulator to the 16-bit output.
  logic signed [ZW-1:0] z_rnd;
  assign z_rnd     = zs[ITER] + ZW'(1 << (ZW - 17));
  assign phase     = z_rnd[ZW-1 -: 16];

endmodule
