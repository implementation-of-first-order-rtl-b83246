// Sample counter: the N of every statistic.
//
// Increments on each cycle `en` is high and is emptied by the synchronous
// `clear`. It saturates at its maximum rather than wrapping, so N never
// returns to zero while samples keep arriving (a choice of this design).
//
// Interface: `count` is registered and changes one cycle after en.
module data_counter #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          count <= '0;
    else if (clear)                      count <= '0;
    else if (en && (count != '1))        count <= count + W'(1);
  end
endmodule
