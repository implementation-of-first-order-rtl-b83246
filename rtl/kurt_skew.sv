// Running kurtosis and skewness (the second processing block).
//
// For every sample x_i, with the running mean, variance, standard deviation
// and count N produced for that same sample by the first block, the block
//   - forms the deviation d = x_i - mean (the subtractor),
//   - squares it, then multiplies d^2 by itself and by the delayed d,
//   - adds d^4 and d^3 to two accumulators (sum4, sum3), and
//   - outputs
//       kurtosis = KURT_SCALE * sum4 / (N * variance^2)
//       skewness = SKEW_SCALE * sum3 / ((N-1) * variance * std_dev)
// Nothing is stored but the two sums: the deviation of each sample is taken
// against the mean known when the sample arrived, so the result approximates
// the textbook moments of the whole record. The dataflow (two delay
// registers, multiplier tree, two accumulators, variance^2 times N and the
// final dividers) and the scale factors 65535 and 256 follow the source
// design; so does the (N-1) of the skewness. The source draws a divider
// where (N-1) meets variance*std_dev; a product is what its skewness
// formula needs, so this design multiplies there.
//
// All deviation and sigma products use 32x32 Booth multipliers, the two
// products with N use 48x48 ones, and the dividers are 80:64 and 72:64 bits.
// These widths are this design's choice; they are exact for 12-bit samples
// and up to 2^16 samples since the last clear. A zero denominator gives 0.
//
// Interface: when `ready` is high, `start` takes x, mean, variance, std_dev
// and count (all for the same sample). `result_valid` pulses once when
// kurtosis_out and skewness_out include that sample; they hold until the next
// result. `busy` is high while any sample is in the block. `clear` empties
// sum3 / sum4 and must be raised only while `busy` is low.
// Timing: about 173 cycles from start to result_valid (the 80-bit divider
// dominates). The front is free again after about 87 cycles, when the
// dividers start, so a new sample can be taken every 87 cycles.
module kurt_skew
  import stat_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] data_in,
  input  logic signed [MEAN_W-1:0] s_mean,
  input  logic        [VAR_W-1:0]  s_variance,
  input  logic        [STD_W-1:0]  s_std_dev,
  input  logic        [CNT_W-1:0]  s_data_count,
  output logic                     ready,
  output logic                     busy,
  output logic                     result_valid,
  output logic signed [RES_W-1:0]  kurtosis_out,
  output logic signed [RES_W-1:0]  skewness_out
);
  localparam int MW = 32;   // deviation / sigma multipliers
  localparam int NW = 48;   // multipliers by N

  typedef enum logic {S_IDLE, S_MUL} state_t;
  state_t state_q;
  logic   div_busy_q;   // the final dividers hold a sample

  logic accept;
  assign ready  = (state_q == S_IDLE);
  assign accept = ready && start;
  assign busy   = (state_q != S_IDLE) || div_busy_q || result_valid;

  // ---- delay register: the deviation waits for d^2 --------------------------
  logic signed [MW-1:0]     d_dly_q;
  logic        [CNT_W-1:0]  n_q;
  logic signed [MW-1:0]     dev;
  assign dev = MW'(data_in) - MW'(s_mean);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_dly_q <= '0;
      n_q     <= '0;
    end else if (accept) begin
      d_dly_q <= dev;
      n_q     <= s_data_count;
    end
  end

  // ---- deviation powers ------------------------------------------------------
  logic signed [2*MW-1:0] d2, d3, d4;
  logic d2_done, d3_done, d4_done;
  logic signed [MW-1:0] d2_w;
  assign d2_w = MW'(d2);

  booth_mult #(.W(MW)) u_d2 (
    .clk, .rst_n, .start(accept), .a(dev), .b(dev),
    .busy(), .done(d2_done), .p(d2));
  booth_mult #(.W(MW)) u_d4 (
    .clk, .rst_n, .start(d2_done), .a(d2_w), .b(d2_w),
    .busy(), .done(d4_done), .p(d4));
  booth_mult #(.W(MW)) u_d3 (
    .clk, .rst_n, .start(d2_done), .a(d_dly_q), .b(d2_w),
    .busy(), .done(d3_done), .p(d3));

  logic signed [MOM_W-1:0] sum4, sum3;
  accumulator #(.IN_W(2*MW), .ACC_W(MOM_W)) u_sum4 (
    .clk, .rst_n, .clear, .en(d4_done), .din(d4), .acc(sum4));
  accumulator #(.IN_W(2*MW), .ACC_W(MOM_W)) u_sum3 (
    .clk, .rst_n, .clear, .en(d3_done), .din(d3), .acc(sum3));

  // ---- sigma powers times N ------------------------------------------------
  logic signed [2*MW-1:0] v2, v3;
  logic v2_done, v3_done;
  booth_mult #(.W(MW)) u_v2 (
    .clk, .rst_n, .start(accept), .a(MW'(s_variance)), .b(MW'(s_variance)),
    .busy(), .done(v2_done), .p(v2));
  booth_mult #(.W(MW)) u_v3 (
    .clk, .rst_n, .start(accept), .a(MW'(s_variance)), .b(MW'(s_std_dev)),
    .busy(), .done(v3_done), .p(v3));

  logic signed [2*NW-1:0] kden, sden;
  logic kden_done, sden_done;
  logic [CNT_W-1:0] n_minus_1;
  assign n_minus_1 = (n_q == '0) ? '0 : n_q - CNT_W'(1);
  booth_mult #(.W(NW)) u_kden (
    .clk, .rst_n, .start(v2_done), .a(NW'(v2)), .b(NW'(n_q)),
    .busy(), .done(kden_done), .p(kden));
  booth_mult #(.W(NW)) u_sden (
    .clk, .rst_n, .start(v3_done), .a(NW'(v3)), .b(NW'(n_minus_1)),
    .busy(), .done(sden_done), .p(sden));

  // ---- final dividers ----------------------------------------------------------
  logic signed [KNUM_W-1:0] knum;
  logic signed [SNUM_W-1:0] snum;
  assign knum = KNUM_W'(sum4) * KNUM_W'(KURT_SCALE);
  assign snum = SNUM_W'(sum3) * SNUM_W'(SKEW_SCALE);

  logic div_start, kdiv_done, sdiv_done;
  logic signed [KNUM_W-1:0] kquo;
  logic signed [SNUM_W-1:0] squo;
  seq_div #(.NUM_W(KNUM_W), .DEN_W(DEN_W)) u_kdiv (
    .clk, .rst_n, .start(div_start), .num(knum), .den(DEN_W'(kden)),
    .busy(), .done(kdiv_done), .quo(kquo));
  seq_div #(.NUM_W(SNUM_W), .DEN_W(DEN_W)) u_sdiv (
    .clk, .rst_n, .start(div_start), .num(snum), .den(DEN_W'(sden)),
    .busy(), .done(sdiv_done), .quo(squo));

  // ---- control -------------------------------------------------------------------
  logic sum_seen_q, kden_seen_q, sden_seen_q, kdiv_seen_q, sdiv_seen_q;
  // sum3 / sum4 include this sample one cycle after d3 / d4 are done
  logic sum_ready_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sum_ready_q <= 1'b0;
    else        sum_ready_q <= d4_done;

  // The front (deviation powers, sums, denominators) hands over to the
  // dividers and may then take the next sample while they run; the dividers
  // keep their operands from their start.
  assign div_start = (state_q == S_MUL) && (sum_seen_q  || sum_ready_q)
                                        && (kden_seen_q || kden_done)
                                        && (sden_seen_q || sden_done)
                                        && !div_busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      div_busy_q   <= 1'b0;
      sum_seen_q   <= 1'b0;
      kden_seen_q  <= 1'b0;
      sden_seen_q  <= 1'b0;
      kdiv_seen_q  <= 1'b0;
      sdiv_seen_q  <= 1'b0;
      result_valid <= 1'b0;
      kurtosis_out <= '0;
      skewness_out <= '0;
    end else begin
      result_valid <= 1'b0;
      if (clear) begin
        kurtosis_out <= '0;
        skewness_out <= '0;
      end
      // front
      unique case (state_q)
        S_IDLE: if (accept) begin
          sum_seen_q  <= 1'b0;
          kden_seen_q <= 1'b0;
          sden_seen_q <= 1'b0;
          state_q     <= S_MUL;
        end
        S_MUL: begin
          if (sum_ready_q) sum_seen_q  <= 1'b1;
          if (kden_done)   kden_seen_q <= 1'b1;
          if (sden_done)   sden_seen_q <= 1'b1;
          if (div_start)   state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
      // back: both quotients are published together
      if (div_start) begin
        div_busy_q  <= 1'b1;
        kdiv_seen_q <= 1'b0;
        sdiv_seen_q <= 1'b0;
      end else if (div_busy_q) begin
        if (kdiv_done) kdiv_seen_q <= 1'b1;
        if (sdiv_done) sdiv_seen_q <= 1'b1;
        if ((kdiv_seen_q || kdiv_done) && (sdiv_seen_q || sdiv_done)) begin
          kurtosis_out <= RES_W'(kquo);
          skewness_out <= RES_W'(squo);
          result_valid <= 1'b1;
          div_busy_q   <= 1'b0;
        end
      end
    end
  end
endmodule
