// Self-checking testbench of stat_axi_regs: CTRL write / read-back, the
// one-cycle clear pulse, every result register against the status values
// driven here, the LO/HI capture of 64-bit values, and an unmapped address.
module tb_stat_axi_regs;
  import stat_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [5:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  stat_status_t status;
  logic        enable, clear;
  int          clear_pulses = 0;

  stat_axi_regs dut (.clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .status, .enable, .clear);

  axi_lite_master_model m (.clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid,
    .wready, .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp,
    .rvalid, .rready);

  always @(posedge clk) if (rst_n && clear) clear_pulses++;

  task automatic expect_reg(input logic [5:0] a, input logic [31:0] e, input string what);
    logic [31:0] d;
    m.read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, d, e); end
  endtask

  initial begin
    logic [63:0] k;
    status = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    expect_reg(REG_CTRL, 32'd0, "ctrl after reset");
    m.write(REG_CTRL, 32'h1);
    checks++;
    if (!enable) begin failures++; $display("FAIL enable"); end
    expect_reg(REG_CTRL, 32'd1, "ctrl");
    m.write(REG_CTRL, 32'h3);
    checks += 2;
    if (clear_pulses != 1) begin failures++; $display("FAIL clear pulses %0d", clear_pulses); end
    if (clear)             begin failures++; $display("FAIL clear not a pulse"); end
    status.busy     = 1'b1;
    status.count    = 32'd2048;
    status.mean     = -32'sd1071;
    status.variance = 48'hABCD_1234_5678;
    status.std_dev  = 24'h12_3456;
    status.kurtosis = 64'h0123_4567_89AB_CDEF;
    status.skewness = -64'sd5;
    status.dropped  = 32'd7;
    expect_reg(REG_STATUS,  32'h3, "status");
    expect_reg(REG_COUNT,   32'd2048, "count");
    expect_reg(REG_MEAN,    32'hFFFF_FBD1, "mean");
    expect_reg(REG_VAR_LO,  32'h1234_5678, "var lo");
    expect_reg(REG_VAR_HI,  32'h0000_ABCD, "var hi");
    expect_reg(REG_STD,     32'h0012_3456, "std");
    expect_reg(REG_KURT_LO, 32'h89AB_CDEF, "kurt lo");
    k = status.kurtosis;
    status.kurtosis = 64'hFFFF_FFFF_0000_0000;   // changes between LO and HI
    expect_reg(REG_KURT_HI, k[63:32], "kurt hi captured");
    expect_reg(REG_KURT_HI, 32'hFFFF_FFFF, "kurt hi live");
    expect_reg(REG_SKEW_LO, 32'hFFFF_FFFB, "skew lo");
    expect_reg(REG_SKEW_HI, 32'hFFFF_FFFF, "skew hi");
    expect_reg(REG_DROPPED, 32'd7, "dropped");
    expect_reg(6'h3C,       32'd0, "unmapped");
    m.write(REG_CTRL, 32'h0);
    checks++;
    if (enable) begin failures++; $display("FAIL disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
