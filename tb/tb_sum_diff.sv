// tb_sum_diff: random electrode amplitudes, including full scale, checked
// exactly against the sum and difference formulas one clock later.
module tb_sum_diff;
  localparam int MAG_W = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [MAG_W-1:0] a, b, c, d;
  logic out_valid;
  logic [MAG_W+1:0] sum;
  logic signed [MAG_W+1:0] dx, dy;
  int checks = 0, failures = 0;

  sum_diff #(.MAG_W(MAG_W)) dut (.*);

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

  initial begin
    int ia, ib, ic, id;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      ia = $urandom_range(0, 65535); ib = $urandom_range(0, 65535);
      ic = $urandom_range(0, 65535); id = $urandom_range(0, 65535);
      if (k == 0) begin ia = 65535; ib = 0; ic = 0; id = 65535; end
      if (k == 1) begin ia = 0; ib = 65535; ic = 65535; id = 0; end
      if (k == 2) begin ia = 65535; ib = 65535; ic = 65535; id = 65535; end
      @(negedge clk);
      in_valid = 1; a = 16'(ia); b = 16'(ib); c = 16'(ic); d = 16'(id);
      @(posedge clk); #1;
      check(out_valid, "valid");
      check(int'(sum) == ia + ib + ic + id, $sformatf("sum %0d", sum));
      check(int'(dx) == (ia + id) - (ib + ic), $sformatf("dx %0d", dx));
      check(int'(dy) == (ia + ib) - (ic + id), $sformatf("dy %0d", dy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
