// Self-checking testbench of accumulator (16-bit signed input, 32-bit sum):
// random enables, signed inputs and clear, compared with a sum kept by the
// testbench; a 20-bit instance fed the same inputs checks wrap-around.
module tb_accumulator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               clear = 1'b0, en = 1'b0;
  logic signed [15:0] din = '0;
  logic signed [31:0] acc, model;
  logic signed [19:0] acc20;

  accumulator dut (.clk, .rst_n, .clear, .en, .din, .acc);
  accumulator #(.IN_W(16), .ACC_W(20)) dut20 (.clk, .rst_n, .clear, .en, .din, .acc(acc20));

  initial begin
    model = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks += 2;
      if (acc !== model) begin failures++; $display("FAIL step %0d got %0d exp %0d", i, acc, model); end
      if (acc20 !== model[19:0]) begin failures++; $display("FAIL wrap step %0d", i); end
      en    = ($urandom % 4) != 0;
      clear = ($urandom % 97) == 0;
      din   = (i < 1000) ? $signed(16'($urandom)) : 16'sh7FFF;
      if (clear)   model = '0;
      else if (en) model = model + 32'(din);
    end
    @(negedge clk);
    en = 1'b0; clear = 1'b0;
    @(negedge clk);
    checks++;
    if (acc !== model) begin failures++; $display("FAIL final"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
