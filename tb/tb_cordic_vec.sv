// tb_cordic_vec: streams random vectors (plus the four axes and corners)
// into the CORDIC one per clock and checks each result ITER+1 clocks later
// against K*sqrt(I^2+Q^2) and atan2(Q, I) computed in floating point.
module tb_cordic_vec;
  localparam int IN_W = 14, ITER = 16, LAT = ITER + 1, N = 400;
  localparam real K = 1.6467602578654548;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0] i_in, q_in;
  logic out_valid;
  logic [IN_W+1:0] mag;
  logic signed [15:0] phase;
  int checks = 0, failures = 0;
  int iv [N], qv [N];
  int nout = 0;

  cordic_vec #(.IN_W(IN_W), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reference model and latency check.
  int cyc = 0, first_in = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      real em, ep, dp;
      em = K * $sqrt($itor(iv[nout]) ** 2 + $itor(qv[nout]) ** 2);
      ep = $atan2($itor(qv[nout]), $itor(iv[nout])) * 32768.0 / PI;
      dp = $itor(phase) - ep;
      while (dp > 32768.0) dp -= 65536.0;
      while (dp < -32768.0) dp += 65536.0;
      if (nout == 0) check(cyc - first_in == LAT, $sformatf("latency %0d", cyc - first_in));
      check($itor(mag) - em < 4.0 && em - $itor(mag) < 4.0, $sformatf("mag %0d exp %f (%0d,%0d)", mag, em, iv[nout], qv[nout]));
      if (em > 300.0)
        check(dp < 2.5 && dp > -2.5, $sformatf("phase %0d exp %f (%0d,%0d)", phase, ep, iv[nout], qv[nout]));
      nout <= nout + 1;
    end
  end

  initial begin
    int lim;
    lim = 2 ** (IN_W - 1) - 1;
    for (int k = 0; k < N; k++) begin
      iv[k] = int'($urandom_range(0, 2 * lim)) - lim;
      qv[k] = int'($urandom_range(0, 2 * lim)) - lim;
    end
    iv[0] = lim;  qv[0] = 0;   iv[1] = 0;    qv[1] = lim;
    iv[2] = -lim; qv[2] = 0;   iv[3] = 0;    qv[3] = -lim;
    iv[4] = -lim; qv[4] = -lim; iv[5] = -lim; qv[5] = lim;
    iv[6] = -lim - 1; qv[6] = -lim - 1;
    iv[7] = -5000; qv[7] = 1;  iv[8] = -5000; qv[8] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1; i_in = IN_W'(iv[k]); q_in = IN_W'(qv[k]);
      if (k == 0) first_in = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    check(nout == N, $sformatf("%0d results for %0d inputs", nout, N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
