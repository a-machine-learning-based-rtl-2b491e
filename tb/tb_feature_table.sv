// tb_feature_table: self-checking test of the feature table.
//
// Checks the reset state (all entries disabled), then writes random entries
// to random slots and compares every entry with a shadow copy after each
// write, including that a write touches only its own slot.
module tb_feature_table;
  import iforest_pkg::*;

  localparam int unsigned N_FEAT = 4;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      wr_en = 1'b0;
  logic [1:0] wr_idx = '0;
  feat_cfg_t wr_data = '0;
  feat_cfg_t entries [N_FEAT];

  int checks = 0, failures = 0;
  feat_cfg_t shadow [N_FEAT];

  feature_table #(.N_FEAT(N_FEAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (shadow[i]) begin
      shadow[i] = '0;
      check(entries[i] == '0, "entry not cleared by reset");
    end
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(3) != 0);
      wr_idx  = 2'($urandom_range(N_FEAT - 1));
      wr_data = feat_cfg_t'($urandom);
      if (wr_en) shadow[wr_idx] = wr_data;
      @(negedge clk);
      wr_en = 1'b0;
      foreach (shadow[i])
        check(entries[i] == shadow[i], $sformatf("entry %0d = %h, expected %h", i, entries[i], shadow[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
