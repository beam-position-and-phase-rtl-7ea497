// tb_bpm_processor: drives the four channels with IF tones (fs/4, common
// phase, different electrode amplitudes, random DC offsets) that change
// every 32 samples, and checks each output 37 clocks after its input sample
// against floating-point values: amplitudes 2*K*A .. 2*K*D,
// sum = 2*K*(A+B+C+D), x = (A+D-B-C)/sum,
// y = (A+B-C-D)/sum as Q1.15 fractions and phase = the tone phase. Samples
// whose four-sample window straddles a tone change are not checked. The
// output must come every clock (full rate).
module tb_bpm_processor;
  import bpm_pkg::*;
  localparam int LAT = 37, SEG = 32, NSEG = 120;
  localparam real K = 1.6467602578654548;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] adc_a, adc_b, adc_c, adc_d;
  logic out_valid;
  proc_sample_t out;
  int checks = 0, failures = 0;

  bpm_processor #(.ADC_W(12)) dut (.*);

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

  real amp [NSEG][4];
  real phi [NSEG];
  int  cyc = 0, first_in = -1, first_out = -1, nout = 0;
  int  seg_at [8192];
  int  pos_at [8192];

  function automatic int q(real v);
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  function automatic real wrap(real d);
    while (d > 32768.0) d -= 65536.0;
    while (d < -32768.0) d += 65536.0;
    return d;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      int src, s;
      real sa, ex, ey, es, ep, tol, tp;
      if (first_out < 0) begin
        first_out = cyc;
        check(first_out - first_in == LAT, $sformatf("latency %0d", first_out - first_in));
      end
      src = cyc - LAT;
      s = seg_at[src];
      if (s >= 0 && pos_at[src] >= 3) begin
        sa = amp[s][0] + amp[s][1] + amp[s][2] + amp[s][3];
        es = 2.0 * K * sa;
        ex = (amp[s][0] + amp[s][3] - amp[s][1] - amp[s][2]) / sa * 32768.0;
        ey = (amp[s][0] + amp[s][1] - amp[s][2] - amp[s][3]) / sa * 32768.0;
        ep = phi[s] * 32768.0 / PI;
        tol = 4.0 + 32768.0 * 16.0 / es;
        check($itor(out.sum) - es < 10.0 && es - $itor(out.sum) < 10.0, $sformatf("sum %0d exp %f", out.sum, es));
        check($itor(out.x) - ex < tol && ex - $itor(out.x) < tol, $sformatf("x %0d exp %f", out.x, ex));
        check($itor(out.y) - ey < tol && ey - $itor(out.y) < tol, $sformatf("y %0d exp %f", out.y, ey));
        for (int ch = 0; ch < 4; ch++) begin
          real ea;
          ea = 2.0 * K * amp[s][ch];
          check($itor(out.amp[ch]) - ea < 6.0 && ea - $itor(out.amp[ch]) < 6.0,
                $sformatf("amp[%0d] %0d exp %f", ch, int'(out.amp[ch]), ea));
        end
        // ADC rounding moves each I/Q by up to 1 LSB: phase error up to
        // 4/(2*(A+B+C+D)) rad, plus CORDIC rounding.
        tp = 4.0 + 32768.0 / PI * 4.0 / (2.0 * sa);
        check(wrap($itor(out.phase) - ep) < tp && wrap($itor(out.phase) - ep) > -tp,
              $sformatf("seg %0d phase %0d exp %f", s, int'(out.phase), ep));
      end
      nout++;
    end
  end

  initial begin
    real off [4];
    int n, r;
    for (int k = 0; k < 8192; k++) seg_at[k] = -1;
    for (int s = 0; s < NSEG; s++) begin
      for (int c = 0; c < 4; c++) amp[s][c] = 150.0 + $urandom_range(0, 1800);
      r = $urandom_range(0, 62830);
      phi[s] = $itor(r - 31415) / 10000.0;
    end
    // Corners: all signal on one side, then equal electrodes.
    amp[0] = '{1900.0, 0.0, 0.0, 1900.0};
    amp[1] = '{0.0, 1900.0, 1900.0, 0.0};
    amp[2] = '{1000.0, 1000.0, 1000.0, 1000.0};
    for (int c = 0; c < 4; c++) off[c] = $itor($urandom_range(0, 100)) - 50.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    for (int s = 0; s < NSEG; s++)
      for (int p = 0; p < SEG; p++) begin
        @(negedge clk);
        in_valid = 1;
        adc_a = 12'(q(off[0] + amp[s][0] * $cos(PI / 2.0 * n + phi[s])));
        adc_b = 12'(q(off[1] + amp[s][1] * $cos(PI / 2.0 * n + phi[s])));
        adc_c = 12'(q(off[2] + amp[s][2] * $cos(PI / 2.0 * n + phi[s])));
        adc_d = 12'(q(off[3] + amp[s][3] * $cos(PI / 2.0 * n + phi[s])));
        seg_at[cyc] = s;
        pos_at[cyc] = p;
        if (first_in < 0) first_in = cyc;
        n++;
      end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    check(nout == NSEG * SEG, $sformatf("%0d outputs for %0d inputs", nout, NSEG * SEG));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
