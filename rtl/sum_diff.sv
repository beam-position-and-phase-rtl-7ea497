// sum_diff: sum and difference signals of the four electrode amplitudes.
//
// Electrodes as seen on the pick-up block: A upper left, B upper right,
// C lower right, D lower left. From their amplitudes the block forms
//   sum = A + B + C + D
//   dx  = (A + D) - (B + C)   horizontal (left minus right)
//   dy  = (A + B) - (C + D)   vertical (top minus bottom)
// The electrode arrangement and the sum signal follow the document; the
// sign conventions of dx and dy are this design's choice.
//
// Interface: unsigned MAG_W-bit amplitudes in, sum unsigned MAG_W+2 bits,
// dx/dy signed MAG_W+2 bits. All outputs registered, latency one clock.
module sum_diff #(
  parameter int MAG_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [MAG_W-1:0]        a,
  input  logic [MAG_W-1:0]        b,
  input  logic [MAG_W-1:0]        c,
  input  logic [MAG_W-1:0]        d,
  output logic                    out_valid,
  output logic [MAG_W+1:0]        sum,
  output logic signed [MAG_W+1:0] dx,
  output logic signed [MAG_W+1:0] dy
);

  localparam int W = MAG_W + 2;

  logic signed [W-1:0] sa, sb, sc, sd;
  assign sa = W'(a);
  assign sb = W'(b);
  assign sc = W'(c);
  assign sd = W'(d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum <= '0; dx <= '0; dy <= '0;
    end else begin
      out_valid <= in_valid;
      sum <= W'(a) + W'(b) + W'(c) + W'(d);
      dx  <= (sa + sd) - (sb + sc);
      dy  <= (sa + sb) - (sc + sd);
    end
  end

endmodule
