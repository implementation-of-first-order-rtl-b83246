// End-to-end testbench of stat_top at 4 clocks per UART bit. Samples travel
// as UART byte pairs, the host side is an AXI4-Lite master, and every result
// is read back over AXI (64-bit values as LO/HI pairs) and compared with the
// integer reference model. Phases and the mechanisms they make happen:
//   spaced samples     - full results after every sample;
//   back-to-back burst - samples arrive faster than the pipeline drains:
//                        hold / hand-off stalls and drops (count + dropped
//                        must equal the samples sent);
//   clear over AXI     - everything reads zero afterwards;
//   enable low         - samples are ignored;
//   framing error      - a corrupted byte pair is discarded by the receiver.
module tb_stat_top;
  import stat_pkg::*;
  import stat_ref_pkg::*;
  localparam int CPB = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        line;
  logic [5:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        sample_valid, results_valid;

  stat_top #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .uart_rx_i(line),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .sample_valid_o(sample_valid), .results_valid_o(results_valid));

  uart_tx_model #(.CLKS_PER_BIT(CPB)) tx (.clk, .tx(line));
  axi_lite_master_model m (.clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid,
    .wready, .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp,
    .rvalid, .rready);

  stat_model model = new();
  int n_samples = 0, n_results = 0;
  int cov_stall = 0, cov_drop = 0, cov_clear = 0, cov_disabled = 0, cov_frame = 0,
      cov_lohi = 0;

  always @(posedge clk) if (rst_n) begin
    if (sample_valid) n_samples++;
    if (results_valid) n_results++;
    if (dut.u_calc.hold_full_q && !dut.u_calc.mv_start) cov_stall++;
    if (dut.u_rx.u_uart.frame_err) cov_frame++;
  end

  task automatic send_sample(input logic [15:0] s);
    tx.send_byte(s[15:8]);
    tx.send_byte(s[7:0]);
  endtask

  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    m.read(a, d);
  endtask

  task automatic rd64(input logic [5:0] lo, output logic [63:0] d);
    logic [31:0] l, h;
    m.read(lo, l);
    m.read(lo + 6'd4, h);
    d = {h, l};
    cov_lohi++;
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    int t = 0;
    do begin repeat (20) @(negedge clk); rd(REG_STATUS, st); t++; end while (st[0] && t < 200);
  endtask

  task automatic check_all(input string tag);
    logic [31:0] c, mn, sd;
    logic [63:0] v, k, s;
    rd(REG_COUNT, c); rd(REG_MEAN, mn); rd64(REG_VAR_LO, v); rd(REG_STD, sd);
    rd64(REG_KURT_LO, k); rd64(REG_SKEW_LO, s);
    checks += 6;
    if (longint'(c) != model.n)                 begin failures++; $display("FAIL %s count %0d exp %0d", tag, c, model.n); end
    if (longint'($signed(mn)) != model.mean)    begin failures++; $display("FAIL %s mean %0d exp %0d", tag, $signed(mn), model.mean); end
    if (longint'(v) != model.variance)          begin failures++; $display("FAIL %s var %0d exp %0d", tag, v, model.variance); end
    if (longint'(sd) != model.std_dev)          begin failures++; $display("FAIL %s std %0d exp %0d", tag, sd, model.std_dev); end
    if (k !== model.kurt[63:0])                 begin failures++; $display("FAIL %s kurt %0d exp %0d", tag, k, model.kurt); end
    if (s !== model.skew[63:0])                 begin failures++; $display("FAIL %s skew %0d exp %0d", tag, $signed(s), model.skew); end
  endtask

  function automatic logic [15:0] ecg_like(int i);
    int v = 1000 + int'($urandom % 48);
    if (i % 20 == 5) v += 800;
    if (i % 20 == 6) v -= 300;
    if (i % 20 == 12) v += 150;
    return 16'(v);
  endfunction

  initial begin
    logic [31:0] d, c, dr;
    logic [15:0] x;
    int sent;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    tx.idle(2);
    m.write(REG_CTRL, 32'h1);                      // enable
    // spaced samples, full check after each
    for (int i = 0; i < 40; i++) begin
      x = ecg_like(i);
      model.add(longint'($signed(x)));
      send_sample(x);
      wait_idle();
      check_all($sformatf("spaced %0d", i));
    end
    // back-to-back burst at line rate
    sent = 0;
    for (int i = 0; i < 30; i++) begin send_sample(ecg_like(i)); sent++; end
    wait_idle();
    rd(REG_COUNT, c); rd(REG_DROPPED, dr);
    checks += 2;
    if (c + dr != 32'(40 + sent)) begin failures++; $display("FAIL burst count %0d + dropped %0d", c, dr); end
    if (dr == 0) begin failures++; $display("FAIL burst dropped nothing"); end
    else cov_drop += int'(dr);
    // clear over AXI
    m.write(REG_CTRL, 32'h3);
    wait_idle();
    cov_clear++;
    model.reset();
    check_all("after clear");
    rd(REG_DROPPED, dr);
    checks++;
    if (dr != 0) begin failures++; $display("FAIL dropped after clear %0d", dr); end
    // enable low: ignored
    m.write(REG_CTRL, 32'h0);
    for (int i = 0; i < 3; i++) begin send_sample(16'h0400); cov_disabled++; end
    wait_idle();
    rd(REG_COUNT, c);
    checks++;
    if (c != 0) begin failures++; $display("FAIL samples counted while disabled"); end
    m.write(REG_CTRL, 32'h1);
    // framing error inside a sample, then normal traffic
    tx.send_byte(8'h04);
    tx.send_byte(8'h55, 1'b1);
    tx.idle(2);
    for (int i = 0; i < 25; i++) begin
      x = 16'(int'($urandom % 4096) - 2048);
      model.add(longint'($signed(x)));
      send_sample(x);
      tx.idle(60);
    end
    wait_idle();
    check_all("final");
    checks += 6;
    if (cov_stall == 0)    begin failures++; $display("FAIL no stall"); end
    if (cov_drop == 0)     begin failures++; $display("FAIL no drop"); end
    if (cov_clear == 0)    begin failures++; $display("FAIL no clear"); end
    if (cov_disabled == 0) begin failures++; $display("FAIL no disabled sample"); end
    if (cov_frame == 0)    begin failures++; $display("FAIL no framing error"); end
    if (cov_lohi == 0)     begin failures++; $display("FAIL no 64-bit read"); end
    $display("mechanisms: samples=%0d results=%0d stall_cycles=%0d drops=%0d clears=%0d disabled=%0d frame_errors=%0d lo_hi_reads=%0d",
             n_samples, n_results, cov_stall, cov_drop, cov_clear, cov_disabled, cov_frame, cov_lohi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
