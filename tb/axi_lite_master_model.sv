// Testbench-only AXI4-Lite master: drives one write or one read at a time
// and waits for the response. Address and data are presented together for
// writes; ready signals are sampled on the rising edge.
module axi_lite_master_model (
  input  logic        clk,
  output logic [5:0]  awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready,
  output logic [5:0]  araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rvalid,
  output logic        rready
);
  initial begin
    awaddr = '0; awvalid = 1'b0; wdata = '0; wstrb = '0; wvalid = 1'b0;
    bready = 1'b0; araddr = '0; arvalid = 1'b0; rready = 1'b0;
  end

  task automatic write(input logic [5:0] addr, input logic [31:0] data);
    @(negedge clk);
    awaddr = addr; awvalid = 1'b1; wdata = data; wstrb = 4'hF; wvalid = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    // hold off BREADY for a cycle to exercise the response hold
    @(negedge clk); bready = 1'b1;
    do @(posedge clk); while (!bvalid);
    @(negedge clk); bready = 1'b0;
    if (bresp != 2'b00) $display("AXI write response %b", bresp);
  endtask

  task automatic read(input logic [5:0] addr, output logic [31:0] data);
    @(negedge clk);
    araddr = addr; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    @(negedge clk); rready = 1'b1;
    do @(posedge clk); while (!rvalid);
    data = rdata;
    @(negedge clk); rready = 1'b0;
    if (rresp != 2'b00) $display("AXI read response %b", rresp);
  endtask
endmodule
