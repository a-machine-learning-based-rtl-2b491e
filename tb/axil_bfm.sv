// axil_bfm: AXI4-Lite master for testbenches. Tasks `write` and `read` run one
// transaction each. The write sends AW and W in an order and with gaps chosen
// at random, and delays BREADY/RREADY at random, to exercise the slave's
// handshakes.
module axil_bfm (
  input  logic        clk,
  output logic [31:0] awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready,
  output logic [31:0] araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rvalid,
  output logic        rready
);

  initial begin
    awaddr = '0; awvalid = 1'b0; wdata = '0; wstrb = '1; wvalid = 1'b0;
    bready = 1'b0; araddr = '0; arvalid = 1'b0; rready = 1'b0;
  end

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       output logic [1:0] resp);
    int  order = $urandom_range(2);   // 0 together, 1 AW first, 2 W first
    bit  aw_done = 1'b0, w_done = 1'b0;
    @(negedge clk);
    awaddr = addr;
    wdata  = data;
    awvalid = (order != 2);
    wvalid  = (order != 1);
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awvalid && awready) aw_done = 1'b1;
      if (wvalid && wready)   w_done  = 1'b1;
      @(negedge clk);
      if (aw_done) awvalid = 1'b0;
      if (w_done)  wvalid  = 1'b0;
      if (!aw_done && !awvalid) awvalid = 1'b1;
      if (!w_done && !wvalid)   wvalid  = 1'b1;
    end
    repeat ($urandom_range(2)) @(negedge clk);
    bready = 1'b1;
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    araddr  = addr;
    arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    repeat ($urandom_range(2)) @(negedge clk);
    rready = 1'b1;
    do @(posedge clk); while (!rvalid);
    data = rdata;
    @(negedge clk);
    rready = 1'b0;
  endtask

endmodule
