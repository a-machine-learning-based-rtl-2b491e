// tb_security_module: end-to-end test of the detector at reduced size.
//
// 12 trees of up to 63 nodes and 400-cycle windows keep the run short; the
// stimulus and checks are in tb_security_body.svh (see there).
module tb_security_module;
  import iforest_pkg::*;
  import tb_tree_pkg::*;

  localparam int unsigned N_TREES   = 12;
  localparam int unsigned N_NODES   = 63;
  localparam int unsigned N_FEAT    = 4;
  localparam int unsigned DEFAULT_W = 1600000;
  localparam int unsigned W         = 400;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_security_body.svh"

  security_module #(.N_TREES(N_TREES), .N_NODES(N_NODES), .N_FEAT(N_FEAT)) dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .hpc_req, .hpc_op, .hpc_idx, .hpc_wdata, .hpc_ack, .hpc_rdata,
    .fetch_valid, .fetch_ready, .alert, .alert_mean, .alert_irq
  );

endmodule
