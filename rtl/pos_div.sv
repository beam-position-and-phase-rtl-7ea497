// pos_div: pipelined signed fractional divider for the position signals.
//
// Computes quot = num / den as a signed Q1.(Q_W-1) fraction, the
// normalised beam position difference/sum. Since |num| <= den for
// difference/sum signals the result lies in [-1, +1]; it is saturated to
// +/-(2^(Q_W-1) - 1). The magnitude goes through restoring long division,
// one quotient bit per pipeline stage, so one division starts every clock.
// A zero denominator gives zero.
//
// The document asks for difference-over-sum position signals; the divider
// type and the number formats are this design's choice.
//
// Interface: num signed NUM_W bits, den unsigned NUM_W bits, accepted with
// in_valid. Latency Q_W + 2 clocks, throughput one result per clock.
module pos_div #(
  parameter int NUM_W = 18,
  parameter int Q_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [NUM_W-1:0] num,
  input  logic [NUM_W-1:0]        den,
  output logic                    out_valid,
  output logic signed [Q_W-1:0]   quot
);

  localparam int RW = NUM_W + 1;  // remainder, holds 2*r with r < den
  localparam int NS = Q_W;        // quotient bits: 1 integer + Q_W-1 fraction

  typedef struct packed {
    logic            v;
    logic            neg;
    logic            dz;
    logic [RW-1:0]   r;
    logic [RW-1:0]   d;
    logic [NS-1:0]   q;
  } stage_t;

  stage_t st [NS+1];

  // Stage 0: magnitudes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].v   <= in_valid;
      st[0].neg <= num < 0;
      st[0].dz  <= den == '0;
      st[0].r   <= (num < 0) ? RW'(-num) : RW'(num);
      st[0].d   <= RW'(den);
      st[0].q   <= '0;
    end
  end

  // Stage k+1 decides quotient bit NS-1-k. The first stage compares the
  // remainder itself (integer bit), later stages its double.
  for (genvar k = 0; k < NS; k++) begin : g_div
    logic [RW-1:0] trial;
    assign trial = (k == 0) ? st[k].r : (st[k].r << 1);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[k+1] <= '0;
      end else begin
        st[k+1] <= st[k];
        if (trial >= st[k].d && !st[k].dz) begin
          st[k+1].r <= trial - st[k].d;
          st[k+1].q[NS-1-k] <= 1'b1;
        end else begin
          st[k+1].r <= trial;
        end
      end
    end
  end

  // Output stage: saturate and apply the sign.
  localparam logic [NS-1:0] QMAX = {1'b0, {(NS-1){1'b1}}};
  logic [NS-1:0] qsat;
  assign qsat = (st[NS].q > QMAX) ? QMAX : st[NS].q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      quot <= '0;
    end else begin
      out_valid <= st[NS].v;
      quot <= st[NS].neg ? -$signed(qsat) : $signed(qsat);
    end
  end

endmodule
