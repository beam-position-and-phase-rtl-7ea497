// tb_edge_sync: toggles the asynchronous input at random times and checks
// that exactly one pulse follows every rising edge, two to three clocks
// later, and none follows a falling edge.
module tb_edge_sync;
  logic clk = 0, rst_n = 0, async_in = 0, rise;
  int checks = 0, failures = 0, pulses = 0, edges = 0;
  int cyc = 0, edge_cyc = 0;

  edge_sync dut (.*);

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
    if (rst_n && rise) begin
      pulses <= pulses + 1;
      check(cyc - edge_cyc >= 2 && cyc - edge_cyc <= 3, $sformatf("pulse %0d clocks after edge", cyc - edge_cyc));
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      repeat ($urandom_range(4, 20)) @(posedge clk);
      #($urandom_range(1, 9));
      async_in = 1; edges++; edge_cyc = cyc;
      repeat ($urandom_range(4, 20)) @(posedge clk);
      #($urandom_range(1, 9));
      async_in = 0;
    end
    repeat (6) @(posedge clk);
    check(pulses == edges, $sformatf("%0d pulses for %0d rising edges", pulses, edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
