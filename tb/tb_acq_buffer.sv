// tb_acq_buffer: feeds a numbered sample stream (with random gaps in
// in_valid) and a 64-clock revolution clock into the acquisition buffer,
// triggers a full-rate capture, a turn-by-turn capture and a full-rate
// capture of the electrode amplitudes (amp_mode), reads the
// four blocks back through the host port and checks every word against the
// samples that should have been stored: in full-rate mode the BLOCK_LEN
// valid samples following the first revolution edge after the trigger, in
// turn mode the (turn_offset+1)-th valid sample after each revolution edge.
// It also checks busy/done and that a trigger during a capture is ignored.
module tb_acq_buffer;
  import bpm_pkg::*;
  localparam int LEN = 64, NCYC = 20000, TURN = 64;
  logic clk = 0, rst_n = 0, rev_clk = 0, acq_trig = 0, turn_mode = 0, amp_mode = 0, in_valid = 0;
  logic [6:0] turn_offset = 0;
  proc_sample_t in;
  logic [1:0] host_blk = 0;
  logic [5:0] host_addr = 0;
  logic [15:0] host_data;
  logic busy, done, armed, rev_seen;
  int checks = 0, failures = 0;

  acq_buffer #(.BLOCK_LEN(LEN), .N_BLOCKS(4), .DATA_W(16), .OFF_W(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC - 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Revolution clock: 64 sample clocks per turn, edges between clock edges.
  initial begin
    #3;
    forever begin
      rev_clk = 1; #(TURN * 5);
      rev_clk = 0; #(TURN * 5);
    end
  end

  // Numbered stream and its log.
  int cyc = 0, sc = 0;
  bit vlog [NCYC];
  int slog [NCYC];
  bit rlog [NCYC];
  always @(posedge clk) begin
    vlog[cyc] <= in_valid;
    slog[cyc] <= sc;
    rlog[cyc] <= rev_seen;
    cyc <= cyc + 1;
  end
  bit gaps = 0;
  always @(negedge clk) begin
    if (in_valid) sc <= sc + 1;
    in_valid <= rst_n && (!gaps || $urandom_range(0, 3) != 0);
  end
  always_comb begin
    in.sum   = SUM_W'({sc[15:0], 1'b0});
    in.x     = 16'(sc);
    in.y     = 16'(-sc);
    in.phase = 16'(sc * 7);
    for (int e = 0; e < 4; e++) in.amp[e] = MAG_W'(sc * (e + 3));
  end

  // k-th valid sample (0-based) logged after cycle c.
  function automatic int nth_after(int c, int k);
    for (int t = c + 1; t < cyc; t++)
      if (vlog[t]) begin
        if (k == 0) return slog[t];
        k--;
      end
    return -1;
  endfunction

  task automatic read_back(input int exp_sc [LEN], input bit amps, input string tag);
    int s;
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < LEN; a++) begin
        @(negedge clk); host_blk = 2'(b); host_addr = 6'(a);
        @(negedge clk);
        s = exp_sc[a];
        if (amps) check(host_data == 16'(s * (b + 3)), $sformatf("%s amp%0d[%0d]", tag, b, a));
        else case (b)
          0: check(host_data == 16'(s), $sformatf("%s sum[%0d] %0d exp %0d", tag, a, host_data, 16'(s)));
          1: check(host_data == 16'(s), $sformatf("%s x[%0d] %0d exp %0d", tag, a, host_data, 16'(s)));
          2: check(host_data == 16'(-s), $sformatf("%s y[%0d]", tag, a));
          default: check(host_data == 16'(s * 7), $sformatf("%s phase[%0d]", tag, a));
        endcase
      end
  endtask

  task automatic trigger();
    @(negedge clk); acq_trig = 1;
    repeat (3) @(negedge clk); acq_trig = 0;
  endtask

  initial begin
    int exp_sc [LEN];
    int trig_cyc, r0, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    check(!busy && !done, "idle after reset");

    // ---- full-rate capture
    gaps = 1;
    trigger();
    wait (armed);
    trig_cyc = cyc;
    wait (busy);
    @(negedge clk);
    r0 = -1;
    for (int t = trig_cyc; t < cyc; t++) if (rlog[t] && r0 < 0) r0 = t;
    check(r0 >= 0, "capture starts on a revolution edge");
    trigger();                       // must be ignored while busy
    wait (done);
    check(!armed, "trigger during capture ignored");
    for (int a = 0; a < LEN; a++) exp_sc[a] = nth_after(r0, a);
    read_back(exp_sc, 1'b0, "full");

    // ---- turn-by-turn capture
    turn_mode = 1; turn_offset = 7'd13;
    trigger();
    wait (armed);
    trig_cyc = cyc;
    wait (done);
    @(negedge clk);
    n = 0;
    for (int t = trig_cyc; t < cyc && n < LEN; t++)
      if (rlog[t]) begin exp_sc[n] = nth_after(t, 13); n++; end
    check(n == LEN, "one revolution edge per stored turn");
    read_back(exp_sc, 1'b0, "turn");

    // ---- full-rate capture of the electrode amplitudes
    turn_mode = 0; amp_mode = 1;
    trigger();
    wait (armed);
    trig_cyc = cyc;
    wait (busy);
    @(negedge clk);
    r0 = -1;
    for (int t = trig_cyc; t < cyc; t++) if (rlog[t] && r0 < 0) r0 = t;
    wait (done);
    @(negedge clk);
    for (int a = 0; a < LEN; a++) exp_sc[a] = nth_after(r0, a);
    read_back(exp_sc, 1'b1, "amp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
