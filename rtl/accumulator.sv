// Running-sum accumulator.
//
// Adds the sign-extended input to a register on every cycle `en` is high;
// `clear` (synchronous, higher priority than en) empties it. The sum wraps
// on overflow, as the source design's fixed-point accumulators do; with the
// default 32 bits and 12-bit samples that is past two million samples.
//
// Interface: `acc` is the registered sum and changes one cycle after en.
module accumulator #(
  parameter int IN_W  = 16,
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [ACC_W-1:0] acc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clear) acc <= '0;
    else if (en)    acc <= acc + ACC_W'(din);
  end
endmodule
