// Full-size testbench: stat_top with every parameter at its default
// (200 MHz clock, 115200-baud UART, 16-bit samples) processes one record of
// 2048 ECG-like 12-bit samples sent back to back at line rate, the record
// length the accelerator was evaluated with. At this rate no sample may be
// dropped. The final mean, variance, std, kurtosis and skewness read over
// AXI must equal the integer reference model; the relative difference to the
// textbook whole-record statistics is printed for information.
module tb_stat_top_full;
  import stat_pkg::*;
  import stat_ref_pkg::*;
  localparam int NSAMP = 2048;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;        // 200 MHz

  int checks = 0, failures = 0;

  logic        line;
  logic [5:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        sample_valid, results_valid;
  int          n_results = 0;

  stat_top dut (.clk, .rst_n, .uart_rx_i(line),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .sample_valid_o(sample_valid), .results_valid_o(results_valid));

  uart_tx_model #(.CLKS_PER_BIT(1736)) tx (.clk, .tx(line));
  axi_lite_master_model m (.clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid,
    .wready, .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp,
    .rvalid, .rready);

  stat_model model = new();

  always @(posedge clk) if (rst_n && results_valid) n_results++;

  // Synthetic ECG: baseline wander, a P wave, a sharp QRS complex and a T
  // wave every 300 samples, plus a little noise; values stay within 12 bits.
  function automatic logic [15:0] ecg(int i);
    int ph = i % 300;
    real v = 1000.0 + 60.0 * $sin(6.2831853 * real'(i) / 1500.0);
    if (ph >= 40 && ph < 70)   v += 50.0 * $sin(3.14159265 * real'(ph - 40) / 30.0);
    if (ph >= 95 && ph < 100)  v -= 40.0 * real'(ph - 94);
    if (ph >= 100 && ph < 106) v += 140.0 * real'(ph - 99);
    if (ph >= 106 && ph < 112) v += 140.0 * real'(111 - ph) - 100.0;
    if (ph >= 160 && ph < 220) v += 120.0 * $sin(3.14159265 * real'(ph - 160) / 60.0);
    v += real'(int'($urandom % 9) - 4);
    return 16'($rtoi(v));
  endfunction

  function automatic real rel(real hw, real ex);
    return (ex == 0.0) ? 0.0 : 100.0 * ((hw - ex) < 0.0 ? (ex - hw) : (hw - ex)) / (ex < 0.0 ? -ex : ex);
  endfunction

  initial begin
    logic [31:0] c, mn, sd, dr, l, h, st;
    logic [63:0] v, k, s;
    real em, ev, ek, es;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m.write(REG_CTRL, 32'h1);
    for (int i = 0; i < NSAMP; i++) begin
      logic [15:0] x;
      x = ecg(i);
      model.add(longint'($signed(x)));
      tx.send_byte(x[15:8]);
      tx.send_byte(x[7:0]);
    end
    do begin repeat (50) @(negedge clk); m.read(REG_STATUS, st); end while (st[0]);
    m.read(REG_COUNT, c); m.read(REG_MEAN, mn); m.read(REG_STD, sd); m.read(REG_DROPPED, dr);
    m.read(REG_VAR_LO, l);  m.read(REG_VAR_HI, h);  v = {h, l};
    m.read(REG_KURT_LO, l); m.read(REG_KURT_HI, h); k = {h, l};
    m.read(REG_SKEW_LO, l); m.read(REG_SKEW_HI, h); s = {h, l};
    checks += 8;
    if (c != 32'(NSAMP))                      begin failures++; $display("FAIL count %0d", c); end
    if (dr != 0)                              begin failures++; $display("FAIL %0d samples dropped", dr); end
    if (n_results != NSAMP)                   begin failures++; $display("FAIL %0d results", n_results); end
    if (longint'($signed(mn)) != model.mean)  begin failures++; $display("FAIL mean %0d exp %0d", $signed(mn), model.mean); end
    if (longint'(v) != model.variance)        begin failures++; $display("FAIL var %0d exp %0d", v, model.variance); end
    if (longint'(sd) != model.std_dev)        begin failures++; $display("FAIL std %0d exp %0d", sd, model.std_dev); end
    if (k !== model.kurt[63:0])               begin failures++; $display("FAIL kurt %0d exp %0d", k, model.kurt); end
    if (s !== model.skew[63:0])               begin failures++; $display("FAIL skew %0d exp %0d", $signed(s), model.skew); end
    model.exact(em, ev, ek, es);
    $display("N=%0d mean=%0d variance=%0d std=%0d kurtosis=%0.4f skewness=%0.4f",
             c, $signed(mn), v, sd, real'(k) / 65535.0, real'($signed(s)) / 256.0);
    $display("record: mean=%0.3f variance=%0.3f std=%0.3f kurtosis=%0.4f skewness=%0.4f",
             em, ev, $sqrt(ev), ek, es);
    $display("difference %%: mean=%0.4f variance=%0.4f std=%0.4f kurtosis=%0.4f skewness=%0.4f",
             rel(real'($signed(mn)), em), rel(real'(v), ev), rel(real'(sd), $sqrt(ev)),
             rel(real'(k) / 65535.0, ek), rel(real'($signed(s)) / 256.0, es));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
