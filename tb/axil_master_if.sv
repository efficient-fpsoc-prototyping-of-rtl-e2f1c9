// axil_master_if: AXI4-Lite bus bundle with a simple bus-master model for
// the testbenches, standing in for the processor. write() presents address
// and data together and waits for the response; read() waits for the data.
// bready/rready can be held low for a few cycles to exercise back-pressure.
interface axil_master_if (input logic clk);
  logic [5:0]  awaddr = '0;
  logic        awvalid = 0;
  logic        awready;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        wvalid = 0;
  logic        wready;
  logic [1:0]  bresp;
  logic        bvalid;
  logic        bready = 0;
  logic [5:0]  araddr = '0;
  logic        arvalid = 0;
  logic        arready;
  logic [31:0] rdata;
  logic [1:0]  rresp;
  logic        rvalid;
  logic        rready = 0;
  int          resp_delay = 0;   // cycles to hold bready/rready low

  task automatic write(input int word, input logic [31:0] data, input logic [3:0] strb = 4'hf);
    @(negedge clk);
    awaddr = 6'(word * 4); wdata = data; wstrb = strb;
    awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat (resp_delay) @(negedge clk);
    bready = 1;
    do @(posedge clk); while (!bvalid);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic read(input int word, output logic [31:0] data);
    @(negedge clk);
    araddr = 6'(word * 4);
    arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    repeat (resp_delay) @(negedge clk);
    rready = 1;
    do @(posedge clk); while (!rvalid);
    data = rdata;
    @(negedge clk);
    rready = 0;
  endtask
endinterface
