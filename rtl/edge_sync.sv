// edge_sync: brings an external timing signal (the storage ring revolution
// clock or the acquisition trigger) into the sampling clock domain through
// two flip-flops and emits a one-clock pulse on each rising edge.
// Latency from the input edge to the pulse: two to three clocks.
module edge_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic rise
);

  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
    end else begin
      s1 <= async_in;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign rise = s2 & ~s3;

endmodule
