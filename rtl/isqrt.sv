// Sequential integer square root, two result bits per clock.
//
// Digit-by-digit (schoolbook binary) method: each step brings down the next
// two radicand bits into the partial remainder and tries to subtract
// 4*root+1; on success the new root bit is 1. Two steps are unrolled per
// clock, so a W-bit radicand needs W/4 clocks. The result is floor(sqrt).
//
// Interface: pulse `start` with `radicand` valid; `done` pulses once with
// `root` valid; root holds until the next start. A start while busy is
// ignored. Timing: done is high W/4+3 cycles after the start cycle, the 15
// cycles the source design lists for its 48-bit square root. The algorithm
// is this design's choice (the source names the block and its latency).
// W must be a multiple of 4.
module isqrt #(
  parameter int W = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [W-1:0]     radicand,
  output logic             busy,
  output logic             done,
  output logic [W/2-1:0]   root
);
  localparam int ITER = W / 4;
  localparam int LAT  = ITER + 3;
  localparam int CW   = $clog2(LAT + 1);
  localparam int RW   = W / 2 + 4;          // remainder width, with headroom

  logic [W-1:0]   rad_q;
  logic [W/2-1:0] root_q;
  logic [RW-1:0]  rem_q;
  logic [CW-1:0]  cnt_q;

  logic [RW-1:0]  rem_a, rem_b, try_a, try_b;
  logic [W/2-1:0] root_a, root_b;

  always_comb begin
    // first step of this clock
    rem_a  = {rem_q[RW-3:0], rad_q[W-1:W-2]};
    try_a  = RW'({root_q, 2'b01});
    if (rem_a >= try_a) begin
      rem_a  = rem_a - try_a;
      root_a = {root_q[W/2-2:0], 1'b1};
    end else begin
      root_a = {root_q[W/2-2:0], 1'b0};
    end
    // second step of this clock
    rem_b  = {rem_a[RW-3:0], rad_q[W-3:W-4]};
    try_b  = RW'({root_a, 2'b01});
    if (rem_b >= try_b) begin
      rem_b  = rem_b - try_b;
      root_b = {root_a[W/2-2:0], 1'b1};
    end else begin
      root_b = {root_a[W/2-2:0], 1'b0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_q  <= '0;
      root_q <= '0;
      rem_q  <= '0;
      cnt_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      root   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rad_q  <= radicand;
          root_q <= '0;
          rem_q  <= '0;
          cnt_q  <= CW'(1);
          busy   <= 1'b1;
        end
      end else begin
        cnt_q <= cnt_q + CW'(1);
        if (cnt_q <= CW'(ITER)) begin
          rem_q  <= rem_b;
          root_q <= root_b;
          rad_q  <= {rad_q[W-5:0], 4'b0000};
        end
        if (cnt_q == CW'(LAT - 1)) begin
          root <= root_q;
          done <= 1'b1;
          busy <= 1'b0;
        end
      end
    end
  end
endmodule
