// AXI4-Lite slave register file of the statistics accelerator.
//
// The host processor starts, clears and reads the accelerator through this
// port: the calculation itself runs in the background on every incoming
// sample. Register map (32-bit registers, byte addresses, see stat_pkg):
//   0x00 CTRL     rw  [0] enable (0 after reset), [1] clear: writing 1
//                     pulses `clear` for one cycle, reads as 0
//   0x04 STATUS   ro  [0] busy, [1] enable
//   0x08 COUNT    ro  samples since clear (N)
//   0x0C MEAN     ro  signed mean
//   0x10/0x14     ro  variance, bits 31:0 / 47:32
//   0x18 STD      ro  standard deviation
//   0x1C/0x20     ro  kurtosis x65535, bits 31:0 / 63:32
//   0x24/0x28     ro  skewness x256,  bits 31:0 / 63:32
//   0x2C DROPPED  ro  samples refused since clear
// Reading a *_LO register captures the matching *_HI half, which the next
// read of that HI register returns, so a LO-then-HI read pair is consistent;
// any other HI read returns the live value. Unmapped addresses read 0 and answer OKAY.
//
// Protocol: one transaction at a time per direction. A write is accepted
// when both AW and W are valid (awready and wready rise together for one
// cycle), then BVALID is held until BREADY. A read takes AR, then holds RVALID
// until RREADY. Write strobes are ignored (full-word writes only). The
// register map and protocol details are this design's own; the source
// design states only that results are read over AXI.
module stat_axi_regs
  import stat_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // write address / data / response
  input  logic [5:0]   s_axi_awaddr,
  input  logic         s_axi_awvalid,
  output logic         s_axi_awready,
  input  logic [31:0]  s_axi_wdata,
  input  logic [3:0]   s_axi_wstrb,
  input  logic         s_axi_wvalid,
  output logic         s_axi_wready,
  output logic [1:0]   s_axi_bresp,
  output logic         s_axi_bvalid,
  input  logic         s_axi_bready,
  // read address / data
  input  logic [5:0]   s_axi_araddr,
  input  logic         s_axi_arvalid,
  output logic         s_axi_arready,
  output logic [31:0]  s_axi_rdata,
  output logic [1:0]   s_axi_rresp,
  output logic         s_axi_rvalid,
  input  logic         s_axi_rready,
  // accelerator side
  input  stat_status_t status,
  output logic         enable,
  output logic         clear
);
  logic        wr_fire, rd_fire;
  logic [31:0] hi_q;     // captured upper half of the last LO read
  logic [5:0]  hi_addr_q;   // HI register the capture belongs to
  localparam logic [5:0] NO_CAPTURE = 6'h3F;

  assign wr_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;
  assign s_axi_bresp   = 2'b00;
  assign rd_fire       = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = rd_fire;
  assign s_axi_rresp   = 2'b00;

  logic [63:0] var64;
  assign var64 = 64'(status.variance);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable       <= 1'b0;
      clear        <= 1'b0;
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      hi_q         <= '0;
      hi_addr_q    <= NO_CAPTURE;
    end else begin
      clear <= 1'b0;
      if (wr_fire) begin
        if (s_axi_awaddr == REG_CTRL) begin
          enable <= s_axi_wdata[0];
          clear  <= s_axi_wdata[1];
        end
        s_axi_bvalid <= 1'b1;
      end else if (s_axi_bvalid && s_axi_bready)
        s_axi_bvalid <= 1'b0;

      if (rd_fire) begin
        s_axi_rvalid <= 1'b1;
        unique case (s_axi_araddr)
          REG_CTRL:    s_axi_rdata <= {31'd0, enable};
          REG_STATUS:  s_axi_rdata <= {30'd0, enable, status.busy};
          REG_COUNT:   s_axi_rdata <= 32'(status.count);
          REG_MEAN:    s_axi_rdata <= 32'(status.mean);
          REG_VAR_LO: begin
            s_axi_rdata <= var64[31:0];
            hi_q        <= var64[63:32];
            hi_addr_q   <= REG_VAR_HI;
          end
          REG_STD:     s_axi_rdata <= 32'(status.std_dev);
          REG_KURT_LO: begin
            s_axi_rdata <= status.kurtosis[31:0];
            hi_q        <= status.kurtosis[63:32];
            hi_addr_q   <= REG_KURT_HI;
          end
          REG_SKEW_LO: begin
            s_axi_rdata <= status.skewness[31:0];
            hi_q        <= status.skewness[63:32];
            hi_addr_q   <= REG_SKEW_HI;
          end
          REG_VAR_HI: begin
            s_axi_rdata <= (hi_addr_q == REG_VAR_HI) ? hi_q : var64[63:32];
            hi_addr_q   <= NO_CAPTURE;
          end
          REG_KURT_HI: begin
            s_axi_rdata <= (hi_addr_q == REG_KURT_HI) ? hi_q : status.kurtosis[63:32];
            hi_addr_q   <= NO_CAPTURE;
          end
          REG_SKEW_HI: begin
            s_axi_rdata <= (hi_addr_q == REG_SKEW_HI) ? hi_q : status.skewness[63:32];
            hi_addr_q   <= NO_CAPTURE;
          end
          REG_DROPPED: s_axi_rdata <= status.dropped;
          default:     s_axi_rdata <= '0;
        endcase
      end else if (s_axi_rvalid && s_axi_rready)
        s_axi_rvalid <= 1'b0;
    end
  end

  // AXI rules: a response stays valid, with stable data, until accepted.
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
      s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
      s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
endmodule
