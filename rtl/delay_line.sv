// delay_line: fixed-length register pipeline used to line up signals that
// bypass a pipelined unit. Output equals the input DEPTH clocks earlier;
// DEPTH must be at least 1. Registers reset to zero.
module delay_line #(
  parameter int W     = 16,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) sr[k] <= '0;
    end else begin
      sr[0] <= d;
      for (int k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
    end
  end

  assign q = sr[DEPTH-1];

endmodule
