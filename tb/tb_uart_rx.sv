// Self-checking testbench of uart_rx (16 clocks per bit): random bytes,
// back-to-back frames, a framing error, and a short glitch on the idle line
// that must not produce a byte.
module tb_uart_rx;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       line, valid, ferr, glitch = 1'b0;
  logic [7:0] data;
  logic [7:0] q[$];
  int         n_ferr = 0, n_rx = 0;

  uart_tx_model #(.CLKS_PER_BIT(16)) tx (.clk, .tx(line));
  uart_rx #(.CLKS_PER_BIT(16)) dut (.clk, .rst_n, .rx_i(line & ~glitch), .data, .valid, .frame_err(ferr));

  always @(posedge clk) begin
    if (rst_n && valid) begin
      n_rx++;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected byte %h", data); end
      else begin
        logic [7:0] e;
        e = q.pop_front();
        if (data !== e) begin failures++; $display("FAIL got %h exp %h", data, e); end
      end
    end
    if (rst_n && ferr) n_ferr++;
  end

  initial begin
    logic [7:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    tx.idle(2);
    for (int i = 0; i < 40; i++) begin
      b = 8'($urandom);
      q.push_back(b);
      tx.send_byte(b);
      if (i % 5 == 0) tx.idle(1);
    end
    q.push_back(8'h00); tx.send_byte(8'h00);
    q.push_back(8'hFF); tx.send_byte(8'hFF);
    tx.send_byte(8'h5A, 1'b1);          // framing error: no byte
    tx.idle(2);
    repeat (3) @(negedge clk);
    glitch = 1'b1;                       // 3-cycle glitch, shorter than half a bit
    repeat (3) @(negedge clk);
    glitch = 1'b0;
    tx.idle(12);
    q.push_back(8'hA5); tx.send_byte(8'hA5);
    tx.idle(2);
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL %0d bytes missing", q.size()); end
    if (n_ferr != 1)   begin failures++; $display("FAIL framing errors %0d", n_ferr); end
    if (n_rx != 43)    begin failures++; $display("FAIL byte count %0d", n_rx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
