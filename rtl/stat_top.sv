// Top level of the first-order statistics accelerator.
//
// A 16-bit ECG (or other biosignal) sample stream arrives on a UART line;
// the ECG receiver turns byte pairs into samples and the statistic
// calculator folds each sample into running mean, variance, standard
// deviation, skewness and kurtosis without storing the stream. A host
// processor enables and clears the accelerator and reads the results through
// the AXI4-Lite slave, while the calculation runs in the background.
//
// Interface: `uart_rx_i` is the serial line (8N1, CLKS_PER_BIT clocks per
// bit); the s_axi_* ports are an AXI4-Lite slave with a 6-bit byte address
// (register map in stat_axi_regs); `sample_valid_o` pulses for each sample
// received, and `results_valid_o` pulses when kurtosis and skewness have
// caught up with a sample. Clock: the source design runs at 200 MHz.
module stat_top #(
  parameter int CLKS_PER_BIT = 1736
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_rx_i,
  input  logic [5:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [5:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        sample_valid_o,
  output logic        results_valid_o
);
  import stat_pkg::*;

  logic [15:0]  ecg_in;
  logic         ecg_valid, head;
  logic         enable, clear, busy, clear_done, mvs_valid;
  stat_status_t status;

  ecg_receiver #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx_i(uart_rx_i), .ecg_in, .ecg_valid, .head);

  statistic_calculator u_calc (
    .clk, .rst_n, .enable, .clear,
    .in_data(ecg_in), .in_valid(ecg_valid),
    .busy, .clear_done, .mvs_valid, .ks_valid(results_valid_o),
    .count(status.count), .mean(status.mean), .variance(status.variance),
    .std_dev(status.std_dev), .kurtosis(status.kurtosis),
    .skewness(status.skewness), .dropped(status.dropped));
  assign status.busy = busy;

  stat_axi_regs u_regs (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready,
    .status, .enable, .clear);

  assign sample_valid_o = ecg_valid;
endmodule
