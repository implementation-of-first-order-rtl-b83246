// Testbench-only serial line driver: sends bytes as 8N1 UART frames, LSB
// first, CLKS_PER_BIT clock cycles per bit. `bad_stop` sends a frame whose
// stop bit is low (a framing error).
module uart_tx_model #(
  parameter int CLKS_PER_BIT = 16
) (
  input  logic clk,
  output logic tx
);
  initial tx = 1'b1;

  task automatic send_byte(input logic [7:0] b, input bit bad_stop = 1'b0);
    logic [9:0] frame;
    frame = {~bad_stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) tx = frame[i];
      repeat (CLKS_PER_BIT - 1) @(negedge clk);
    end
    @(negedge clk) tx = 1'b1;
  endtask

  task automatic idle(input int bits);
    repeat (bits * CLKS_PER_BIT) @(negedge clk);
  endtask
endmodule
