// tb_fetch_monitor: self-checking test of the fetch-activity counter.
//
// Drives random valid/ready on the snooped fetch bus and ticks at random
// window ends. The testbench counts transfers per window itself (a transfer
// in the tick cycle belongs to the ending window) and compares with
// last_count one cycle after each tick. Also checks that nothing is counted
// while disabled.
module tb_fetch_monitor;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic        fetch_valid = 1'b0;
  logic        fetch_ready = 1'b0;
  logic        tick = 1'b0;
  logic [31:0] last_count;

  int checks = 0, failures = 0;

  fetch_monitor #(.CNT_W(32)) dut (.*);

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

  initial begin
    int count, len;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // disabled: bus activity must not be counted
    repeat (30) begin
      @(negedge clk);
      fetch_valid = 1'b1; fetch_ready = 1'b1;
    end
    @(negedge clk);
    enable = 1'b1;
    fetch_valid = 1'b0;
    for (int w = 0; w < 300; w++) begin
      count = 0;
      len = $urandom_range(1, 60);
      for (int c = 0; c < len; c++) begin
        fetch_valid = ($urandom_range(3) != 0);
        fetch_ready = ($urandom_range(4) != 0);
        if (w % 50 == 7) begin fetch_valid = 1'b1; fetch_ready = 1'b1; end
        tick = (c == len - 1);
        if (fetch_valid && fetch_ready) count++;
        @(negedge clk);
      end
      tick = 1'b0;
      fetch_valid = 1'b0;
      check(last_count == 32'(count), $sformatf("window %0d: count %0d expected %0d", w, last_count, count));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
