// tb_pos_div: streams random difference/sum pairs (|num| <= den, plus the
// +/-1, zero and zero-denominator corners) one per clock and checks every
// quotient against trunc(num * 2^15 / den), saturated to +/-32767, and the
// latency of Q_W+2 clocks.
module tb_pos_div;
  localparam int NUM_W = 18, Q_W = 16, LAT = Q_W + 2, N = 500;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [NUM_W-1:0] num;
  logic [NUM_W-1:0] den;
  logic out_valid;
  logic signed [Q_W-1:0] quot;
  int checks = 0, failures = 0;
  longint nv [N], dv [N];
  int nout = 0, cyc = 0, first_in = 0;

  pos_div #(.NUM_W(NUM_W), .Q_W(Q_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      longint mag, e;
      mag = (nv[nout] < 0 ? -nv[nout] : nv[nout]);
      e = (dv[nout] == 0) ? 0 : (mag * 32768) / dv[nout];
      if (e > 32767) e = 32767;
      if (nv[nout] < 0) e = -e;
      if (nout == 0) check(cyc - first_in == LAT, $sformatf("latency %0d", cyc - first_in));
      check(longint'(quot) == e, $sformatf("%0d/%0d got %0d exp %0d", nv[nout], dv[nout], quot, e));
      nout <= nout + 1;
    end
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      dv[k] = $urandom_range(1, 2 ** (NUM_W - 1) - 1);
      nv[k] = longint'($urandom_range(0, 2 * 32'(dv[k]))) - dv[k];
    end
    nv[0] = 1000; dv[0] = 1000;   nv[1] = -1000; dv[1] = 1000;
    nv[2] = 0;    dv[2] = 5;      nv[3] = 7;     dv[3] = 0;
    nv[4] = 131071; dv[4] = 131071; nv[5] = -131072; dv[5] = 131072;
    nv[6] = 1; dv[6] = 3; nv[7] = -1; dv[7] = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1; num = NUM_W'(nv[k]); den = NUM_W'(dv[k]);
      if (k == 0) first_in = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    check(nout == N, $sformatf("%0d results", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
