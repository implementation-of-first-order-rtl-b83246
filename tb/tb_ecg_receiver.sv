// Self-checking testbench of ecg_receiver (16 clocks per bit, re-alignment
// after a 40-bit gap): 16-bit samples sent as two bytes high first must come
// out in order; a lone byte followed by a long gap, and a framing error in
// the middle of a sample, must both be discarded without shifting the byte
// order of the samples that follow.
module tb_ecg_receiver;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        line, ev, head;
  logic [15:0] ecg;
  logic [15:0] q[$];
  int          n_out = 0;

  uart_tx_model #(.CLKS_PER_BIT(16)) tx (.clk, .tx(line));
  ecg_receiver #(.CLKS_PER_BIT(16), .GAP_BITS(40)) dut (.clk, .rst_n, .rx_i(line),
                                                        .ecg_in(ecg), .ecg_valid(ev), .head);

  always @(posedge clk) if (rst_n && ev) begin
    n_out++;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected sample %h", ecg); end
    else begin
      logic [15:0] e;
      e = q.pop_front();
      if (ecg !== e) begin failures++; $display("FAIL got %h exp %h", ecg, e); end
    end
  end

  task automatic send_sample(input logic [15:0] s);
    q.push_back(s);
    tx.send_byte(s[15:8]);
    tx.send_byte(s[7:0]);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    tx.idle(2);
    send_sample(16'h039C);
    repeat (20) send_sample(16'($urandom % 4096));
    tx.send_byte(8'h12);                 // lone high byte
    tx.idle(50);                         // gap: dropped
    checks++;
    if (head) begin failures++; $display("FAIL head still set after gap"); end
    send_sample(16'h0800);
    tx.send_byte(8'h03);
    tx.send_byte(8'h77, 1'b1);           // framing error in the low byte
    tx.idle(2);
    repeat (10) send_sample(16'($urandom));
    tx.idle(2);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("FAIL %0d samples missing", q.size()); end
    if (n_out != 32)   begin failures++; $display("FAIL sample count %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
