// tb_dac_out: random processed samples with every pair of selections,
// checked against the offset-binary (signed quantities) and straight
// binary (sum) DAC codes one clock later; outputs hold while in_valid is low.
module tb_dac_out;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  proc_sample_t in;
  quantity_e sel0, sel1;
  logic [11:0] dac0, dac1;
  int checks = 0, failures = 0;

  dac_out #(.DAC_W(12)) dut (.*);

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

  function automatic int expect_code(int sel, proc_sample_t s);
    int v;
    case (sel)
      0: v = (s.sum >= 18'h20000) ? 4095 : int'(s.sum) / 32;     // sum bits 16..5
      1: v = (int'(s.x) + 32768) / 16;
      2: v = (int'(s.y) + 32768) / 16;
      default: v = (int'(s.phase) + 32768) / 16;
    endcase
    return v;
  endfunction

  initial begin
    int e0, e1;
    logic [11:0] h0, h1;
    in = '0; sel0 = SEL_SUM; sel1 = SEL_X;
    repeat (2) @(posedge clk);
    #1 check(dac0 == 12'h800 && dac1 == 12'h800, "mid-scale after reset");
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      in_valid = 1;
      in.sum = 18'($urandom_range(0, 2 ** 18 - 1));
      in.x = 16'($urandom); in.y = 16'($urandom); in.phase = 16'($urandom);
      sel0 = quantity_e'(k % 4); sel1 = quantity_e'((k / 4) % 4);
      e0 = expect_code(k % 4, in); e1 = expect_code((k / 4) % 4, in);
      @(posedge clk); #1;
      check(int'(dac0) == e0, $sformatf("dac0 sel %0d got %0d exp %0d", k % 4, dac0, e0));
      check(int'(dac1) == e1, $sformatf("dac1 sel %0d got %0d exp %0d", (k / 4) % 4, dac1, e1));
    end
    h0 = dac0; h1 = dac1;
    @(negedge clk); in_valid = 0; in.x = ~in.x; in.sum = ~in.sum;
    @(posedge clk); #1;
    check(dac0 == h0 && dac1 == h1, "hold while not valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
