// Sequential restoring divider: signed dividend by unsigned divisor.
//
// The magnitude of the dividend is shifted into a partial remainder one bit
// per clock; whenever the remainder reaches the divisor, the divisor is
// subtracted and a 1 enters the quotient. After NUM_W steps the sign of the
// dividend is restored, so the quotient is truncated toward zero. A zero
// divisor gives a zero quotient (the statistics use this for N = 0 and for a
// zero variance).
//
// Interface: pulse `start` with num and den valid; `done` pulses once with
// `quo` valid; quo holds until the next start. A start while busy is ignored.
// Timing: done is high NUM_W+6 cycles after the start cycle, which gives the
// 54 cycles the source design lists for its 48:32-bit divider. The restoring
// algorithm and the handshake are this design's choice; the source design
// only gives the divider's widths and latency.
module seq_div #(
  parameter int NUM_W = 48,
  parameter int DEN_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [NUM_W-1:0] num,
  input  logic        [DEN_W-1:0] den,
  output logic                    busy,
  output logic                    done,
  output logic signed [NUM_W-1:0] quo
);
  localparam int LAT = NUM_W + 6;
  localparam int CW  = $clog2(LAT + 1);

  logic [NUM_W-1:0] q_q;       // dividend bits still to shift / quotient bits
  logic [DEN_W:0]   rem_q;     // partial remainder, one extra bit
  logic [DEN_W-1:0] den_q;
  logic             neg_q;
  logic             zero_q;
  logic [CW-1:0]    cnt_q;

  logic [DEN_W:0]   rem_shift;
  logic             fits;

  always_comb begin
    rem_shift = {rem_q[DEN_W-1:0], q_q[NUM_W-1]};
    fits      = rem_shift >= {1'b0, den_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_q    <= '0;
      rem_q  <= '0;
      den_q  <= '0;
      neg_q  <= 1'b0;
      zero_q <= 1'b0;
      cnt_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      quo    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q_q    <= num[NUM_W-1] ? NUM_W'(-num) : NUM_W'(num);
          neg_q  <= num[NUM_W-1];
          den_q  <= den;
          zero_q <= (den == '0);
          rem_q  <= '0;
          cnt_q  <= CW'(1);
          busy   <= 1'b1;
        end
      end else begin
        cnt_q <= cnt_q + CW'(1);
        if (cnt_q <= CW'(NUM_W)) begin
          rem_q <= fits ? rem_shift - {1'b0, den_q} : rem_shift;
          q_q   <= {q_q[NUM_W-2:0], fits};
        end
        if (cnt_q == CW'(LAT - 1)) begin
          if (zero_q)     quo <= '0;
          else if (neg_q) quo <= -$signed(q_q);
          else            quo <= $signed(q_q);
          done <= 1'b1;
          busy <= 1'b0;
        end
      end
    end
  end
endmodule
