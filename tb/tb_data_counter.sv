// Self-checking testbench of data_counter: counting with random enables,
// clear, and saturation (a 4-bit instance must stop at 15).
module tb_data_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        clear = 1'b0, en = 1'b0;
  logic [31:0] count, model;
  logic [3:0]  c4;
  int          m4;

  data_counter dut (.clk, .rst_n, .clear, .en, .count);
  data_counter #(.W(4)) dut4 (.clk, .rst_n, .clear, .en, .count(c4));

  initial begin
    model = '0; m4 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks += 2;
      if (count !== model) begin failures++; $display("FAIL step %0d got %0d exp %0d", i, count, model); end
      if (c4 !== 4'(m4))   begin failures++; $display("FAIL sat step %0d got %0d exp %0d", i, c4, m4); end
      en    = ($urandom % 3) != 0;
      clear = (i == 200);
      if (clear) begin model = '0; m4 = 0; end
      else if (en) begin model++; if (m4 < 15) m4++; end
    end
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
