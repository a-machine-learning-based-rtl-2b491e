// tb_sample_timer: self-checking test of the window timer.
//
// For several periods it measures the distance between ticks (must equal the
// period), checks that the first tick after enabling comes after a full
// window, that no tick comes while disabled, and that a period change is
// taken at the next window.
module tb_sample_timer;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic [31:0] period = 32'd10;
  logic        tick;

  int checks = 0, failures = 0;

  sample_timer #(.CNT_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // cycles from now until the next tick
  task automatic wait_tick(output int n);
    n = 0;
    do begin
      @(posedge clk);
      #1;
      n++;
    end while (!tick && n < 100000);
  endtask

  initial begin
    int n;
    int periods [6] = '{1, 2, 3, 17, 100, 1600};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) begin
      @(posedge clk);
      #1;
      check(!tick, "tick while disabled");
    end
    foreach (periods[p]) begin
      @(negedge clk);
      period = periods[p];
      enable = 1'b1;
      wait_tick(n);
      check(n == periods[p], $sformatf("first tick after %0d cycles, period %0d", n, periods[p]));
      for (int k = 0; k < 5; k++) begin
        wait_tick(n);
        check(n == periods[p], $sformatf("tick spacing %0d, period %0d", n, periods[p]));
      end
      @(negedge clk);
      enable = 1'b0;
      repeat (5) @(negedge clk);
    end
    // period change while running
    period = 40;
    enable = 1'b1;
    wait_tick(n);
    @(negedge clk);
    period = 25;
    wait_tick(n);
    check(n == 25, $sformatf("after change spacing %0d, expected 25", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
