// Sequential radix-2 Booth multiplier for two's-complement operands.
//
// The multiplier operand b is scanned one bit pair (b[i], b[i-1]) per clock:
// 01 adds the multiplicand to the upper half of the partial product, 10
// subtracts it, and the partial product is then shifted right arithmetically.
// The upper half carries one guard bit so that -2^(W-1) as multiplicand
// cannot overflow. After W iterations the 2W-bit product is registered.
//
// Interface: pulse `start` for one cycle with a and b valid; `busy` is high
// while working; `done` pulses for one cycle together with a valid `p`, which
// then holds until the next start. A start while busy is ignored.
// Timing: done is high W+3 cycles after the start cycle (19 cycles for 16x16
// and 35 cycles for 32x32, as the source design specifies). The Booth
// recoding follows the source design; the one-bit-per-clock schedule and the
// handshake are this design's choice.
module booth_mult #(
  parameter int W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*W-1:0] p
);
  localparam int LAT = W + 3;
  localparam int CW  = $clog2(LAT + 1);

  logic signed [W:0]     m_q;        // multiplicand, one guard bit
  logic signed [2*W+1:0] prod_q;     // {upper W+1 bits, lower W bits, b[-1]}
  logic [CW-1:0]         cnt_q;

  logic signed [W:0]     upper_sum;
  logic signed [2*W+1:0] prod_next;

  always_comb begin
    unique case (prod_q[1:0])
      2'b01:   upper_sum = prod_q[2*W+1:W+1] + m_q;
      2'b10:   upper_sum = prod_q[2*W+1:W+1] - m_q;
      default: upper_sum = prod_q[2*W+1:W+1];
    endcase
    prod_next = $signed({upper_sum, prod_q[W:0]}) >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q    <= '0;
      prod_q <= '0;
      cnt_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      p      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          m_q    <= {a[W-1], a};
          prod_q <= {{(W+1){1'b0}}, b, 1'b0};
          cnt_q  <= CW'(1);
          busy   <= 1'b1;
        end
      end else begin
        cnt_q <= cnt_q + CW'(1);
        if (cnt_q <= CW'(W))
          prod_q <= prod_next;
        if (cnt_q == CW'(LAT - 1)) begin
          p    <= prod_q[2*W:1];
          done <= 1'b1;
          busy <= 1'b0;
        end
      end
    end
  end
endmodule
