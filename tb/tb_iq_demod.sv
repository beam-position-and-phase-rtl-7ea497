// tb_iq_demod: drives a sampled IF tone at fs/4 with random amplitude, phase
// and DC offset into the demodulator and checks, for every sample after the
// window has filled, I = 2A cos(phi) and Q = 2A sin(phi) within rounding,
// the one-clock latency and the full output rate.
module tb_iq_demod;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] x;
  logic out_valid;
  logic signed [13:0] i_out, q_out;
  int checks = 0, failures = 0;

  iq_demod #(.ADC_W(12)) dut (.*);

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

  initial begin
    real amp, phi, off, ei, eq;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      amp = 100.0 + $urandom_range(0, 1800);
      phi = $urandom_range(0, 6283) / 1000.0;
      off = $itor($urandom_range(0, 200)) - 100.0;
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        in_valid = 1;
        x = 12'($rtoi(off + amp * $cos(3.14159265358979 / 2.0 * n + phi) + ((amp >= 0) ? 0.5 : -0.5)));
        @(posedge clk); #1;
        check(out_valid == 1'b1, "valid one clock after sample");
        if (n >= 3) begin
          ei = 2.0 * amp * $cos(phi);
          eq = 2.0 * amp * $sin(phi);
          check(($itor(i_out) - ei) < 3.0 && (ei - $itor(i_out)) < 3.0, $sformatf("I got %0d exp %f", i_out, ei));
          check(($itor(q_out) - eq) < 3.0 && (eq - $itor(q_out)) < 3.0, $sformatf("Q got %0d exp %f", q_out, eq));
        end
      end
      // Phase of the sample counter is kept across tones: stay on a multiple of 4.
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    check(out_valid == 1'b0, "valid drops with input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
