// tb_bpm_top: end-to-end run of the whole monitor at its default sizes.
//
// A beam model drives the four ADC inputs with the 73.85 MHz IF as sampled
// at 22.72 MHz (a tone at fs/4), 64 samples per turn, together with the
// matching revolution clock. From turn to turn the beam performs a
// horizontal and a vertical betatron oscillation and a synchrotron phase
// oscillation, which set the four electrode amplitudes and the IF phase.
// The test then
//   1. triggers a full-rate acquisition, tries a second trigger during it,
//   2. triggers a turn-by-turn acquisition (one sample per turn), then a
//      second one with the blocks holding the four electrode amplitudes,
//   3. reads all four 2048-word blocks of both acquisitions back through the
//      host port, and checks every word against the processed stream it
//      should have copied, and each turn-by-turn word against the beam
//      model (sum, x, y, phase),
//   4. steps both DAC selects through all four quantities.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_bpm_top;
  import bpm_pkg::*;
  localparam int LAT = 37, TURN = 64, LEN = 2048, OFFSET = 40;
  localparam int NCYC = 3 * LEN * TURN + 12 * LEN + 60000;
  localparam real K = 1.6467602578654548;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic signed [11:0] adc_a = 0, adc_b = 0, adc_c = 0, adc_d = 0;
  logic rev_clk = 0, acq_trig = 0, turn_mode = 0, amp_mode = 0;
  logic [6:0] turn_offset = 7'(OFFSET);
  quantity_e dac0_sel = SEL_X, dac1_sel = SEL_Y;
  logic [1:0] host_blk = 0;
  logic [10:0] host_addr = 0;
  logic [15:0] host_data;
  logic acq_armed, acq_busy, acq_done, rev_seen;
  logic [11:0] dac0, dac1;
  logic proc_valid;
  proc_sample_t proc;

  bpm_top dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_turn = 0, n_amp = 0, n_ignored = 0, n_dac = 0, n_read = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- beam model, per turn
  function automatic real bx(int t); return 0.25 * $sin(2.0 * PI * 0.44 * t); endfunction
  function automatic real by(int t); return 0.15 * $sin(2.0 * PI * 0.39 * t + 1.0); endfunction
  function automatic real bphi(int t); return 0.6 * $sin(2.0 * PI * 0.004 * t) + 0.3; endfunction
  function automatic real bsum(int t); return 3200.0 + 400.0 * $sin(2.0 * PI * 0.013 * t); endfunction
  // electrode amplitudes, index 0..3 = A, B, C, D
  function automatic real eamp(int t, int e);
    real s, x, y;
    s = bsum(t) / 4.0; x = bx(t); y = by(t);
    case (e)
      0: return s * (1.0 + x + y);
      1: return s * (1.0 - x + y);
      2: return s * (1.0 - x - y);
      default: return s * (1.0 + x - y);
    endcase
  endfunction
  function automatic int rnd(real v);
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction
  function automatic real wrap(real d);
    while (d > 32768.0) d -= 65536.0;
    while (d < -32768.0) d += 65536.0;
    return d;
  endfunction

  // ---- logs, one entry per clock
  int cyc = 0;
  int n_adc = 0;                  // sample number driven this clock
  int adc_n [NCYC];               // sample number taken at each clock
  int ph_log [NCYC];              // demodulator sample counter (mod 4) at each clock
  int pc = 0;
  proc_sample_t plog [NCYC];
  bit vlog [NCYC];
  bit rlog [NCYC];

  always @(posedge clk) begin
    adc_n[cyc] <= n_adc - 1;
    ph_log[cyc] <= pc % 4;
    if (rst_n) pc <= pc + 1;
    plog[cyc] <= proc;
    vlog[cyc] <= proc_valid;
    rlog[cyc] <= rev_seen;
    cyc <= cyc + 1;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      int t;
      real c;
      t = n_adc / TURN;
      c = $cos(PI / 2.0 * n_adc + bphi(t));
      adc_a <= 12'(rnd(eamp(t, 0) * c));
      adc_b <= 12'(rnd(eamp(t, 1) * c));
      adc_c <= 12'(rnd(eamp(t, 2) * c));
      adc_d <= 12'(rnd(eamp(t, 3) * c));
      rev_clk <= (n_adc % TURN) < TURN / 2;
      n_adc <= n_adc + 1;
    end
  end

  function automatic int nth_after(int c, int k);
    for (int t = c + 1; t < cyc; t++)
      if (vlog[t]) begin
        if (k == 0) return t;
        k--;
      end
    return -1;
  endfunction

  bit amps = 0;   // blocks hold electrode amplitudes
  function automatic logic [15:0] word_of(int b, proc_sample_t p);
    if (amps) return p.amp[b];
    case (b)
      0: return sum_word(p.sum);
      1: return p.x;
      2: return p.y;
      default: return p.phase;
    endcase
  endfunction

  task automatic trigger();
    @(negedge clk); acq_trig = 1;
    repeat (4) @(negedge clk); acq_trig = 0;
  endtask

  // Read all blocks and compare with the stream entries src[] (clock index).
  task automatic read_back(input int src [LEN], input bit model, input string tag);
    logic [15:0] w;
    int s, t;
    real sa, ex, ey, es, ep;
    for (int a = 0; a < LEN; a++) begin
      for (int b = 0; b < 4; b++) begin
        @(negedge clk); host_blk = 2'(b); host_addr = 11'(a);
        @(negedge clk);
        w = word_of(b, plog[src[a]]);
        check(host_data == w, $sformatf("%s blk %0d addr %0d got %h exp %h", tag, b, a, host_data, w));
        n_read++;
      end
      if (model) begin
        // Beam model for the ADC sample that produced this word.
        s = adc_n[src[a] - LAT];
        // The demodulator measures the phase against its own sample counter,
        // started at reset: a sample taken at counter value p while the beam
        // model is at sample s reads as phi + (s - p) * pi/2.
        t = s / TURN;
        check(s % TURN >= 3, $sformatf("%s sample %0d lies inside its turn", tag, s));
        sa = 0.0;
        for (int e = 0; e < 4; e++) sa += eamp(t, e);
        es = 2.0 * K * sa;
        ex = bx(t) * 32768.0;
        ey = by(t) * 32768.0;
        ep = bphi(t) * 32768.0 / PI + 16384.0 * ((s - ph_log[src[a] - LAT]) % 4);
        for (int e = 0; e < 4; e++)
          check($itor(plog[src[a]].amp[e]) - 2.0 * K * eamp(t, e) < 6.0 && 2.0 * K * eamp(t, e) - $itor(plog[src[a]].amp[e]) < 6.0,
                $sformatf("amp %0d turn %0d", e, t));
        check($itor(plog[src[a]].sum) - es < 12.0 && es - $itor(plog[src[a]].sum) < 12.0, $sformatf("sum turn %0d", t));
        check($itor(plog[src[a]].x) - ex < 60.0 && ex - $itor(plog[src[a]].x) < 60.0,
              $sformatf("x turn %0d got %0d exp %f", t, int'(plog[src[a]].x), ex));
        check($itor(plog[src[a]].y) - ey < 60.0 && ey - $itor(plog[src[a]].y) < 60.0,
              $sformatf("y turn %0d got %0d exp %f", t, int'(plog[src[a]].y), ey));
        check(wrap($itor(plog[src[a]].phase) - ep) < 12.0 && wrap($itor(plog[src[a]].phase) - ep) > -12.0,
              $sformatf("phase turn %0d got %0d exp %f", t, int'(plog[src[a]].phase), ep));
      end
    end
  endtask

  initial begin
    int src [LEN];
    int tc, r0, m;
    logic [11:0] e0, e1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (200) @(posedge clk);

    // ---- 1. full-rate acquisition
    trigger();
    wait (acq_armed);
    tc = cyc;
    wait (acq_busy);
    @(negedge clk);
    r0 = -1;
    for (int t = tc; t < cyc; t++) if (rlog[t] && r0 < 0) r0 = t;
    check(r0 >= 0, "full capture starts on a revolution edge");
    trigger();
    check(!acq_armed && acq_busy, "trigger during capture ignored");
    if (!acq_armed) n_ignored++;
    wait (acq_done);
    @(negedge clk);
    for (int a = 0; a < LEN; a++) src[a] = nth_after(r0, a);
    check(src[LEN-1] - src[0] == LEN - 1, "full rate: one word per clock");
    read_back(src, 1'b0, "full");
    n_full++;

    // ---- 2. turn-by-turn acquisition
    turn_mode = 1;
    trigger();
    wait (acq_armed);
    tc = cyc;
    wait (acq_done);
    @(negedge clk);
    m = 0;
    for (int t = tc; t < cyc && m < LEN; t++)
      if (rlog[t]) begin src[m] = nth_after(t, OFFSET); m++; end
    check(m == LEN, "2048 revolution edges in the turn capture");
    read_back(src, 1'b1, "turn");
    n_turn++;

    // ---- 3. turn-by-turn acquisition of the electrode amplitudes
    amp_mode = 1;
    trigger();
    wait (acq_armed);
    tc = cyc;
    amps = 1;
    wait (acq_done);
    @(negedge clk);
    m = 0;
    for (int t = tc; t < cyc && m < LEN; t++)
      if (rlog[t]) begin src[m] = nth_after(t, OFFSET); m++; end
    read_back(src, 1'b1, "amp");
    amps = 0;
    n_amp++;

    // ---- 4. DAC selects
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      dac0_sel = quantity_e'(k % 4); dac1_sel = quantity_e'(k / 4);
      @(negedge clk);   // register loads at the next edge; compare with the sample it took
      e0 = 12'((word_of(k % 4, plog[cyc - 1]) ^ ((k % 4 == 0) ? 16'h0 : 16'h8000)) >> 4);
      e1 = 12'((word_of(k / 4, plog[cyc - 1]) ^ ((k / 4 == 0) ? 16'h0 : 16'h8000)) >> 4);
      check(dac0 == e0 && dac1 == e1, $sformatf("dac sel %0d/%0d got %h/%h exp %h/%h", k % 4, k / 4, dac0, dac1, e0, e1));
      n_dac++;
    end

    $display("mechanisms: amplitude-block captures %0d", n_amp);
    check(n_amp > 0, "amplitude-block capture happened");
    $display("mechanisms: full-rate captures %0d, turn-by-turn captures %0d, ignored triggers %0d, DAC selections %0d, host reads %0d",
             n_full, n_turn, n_ignored, n_dac, n_read);
    check(n_full > 0, "full-rate capture happened");
    check(n_turn > 0, "turn-by-turn capture happened");
    check(n_ignored > 0, "ignored trigger happened");
    check(n_dac > 0, "DAC selection happened");
    check(n_read > 0, "host read happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
