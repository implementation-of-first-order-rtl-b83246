// First-order statistics calculator: mean, variance, standard deviation,
// skewness and kurtosis of an unbounded sample stream, without storing it.
//
// Structure:
//   hold register  - the input delay: keeps an arrived sample until the
//                    mean / variance block is free, so a new sample cannot
//                    overwrite one still waiting. A sample that arrives
//                    while it is full is dropped and counted.
//   mean_var_std   - running mean, variance, standard deviation.
//   hand-off slot  - the sample with its mean / variance / std / N, kept
//                    until the kurtosis / skewness block takes it.
//   kurt_skew      - running kurtosis and skewness.
// The two blocks form a two-stage pipeline: while kurt_skew works on sample
// i, mean_var_std can already work on sample i+1; inside each block the
// front of sample i+1 also overlaps the back of sample i, so a new sample
// can be taken about every 92 cycles. mean_var_std holds a finished result
// while the hand-off slot is full, so no result is ever overwritten.
//
// Control: samples are taken only while `enable` is high. A `clear` pulse is
// remembered; new samples are then refused (dropped) until every stage is
// idle, when all sums, counters and results return to zero and
// `clear_done` pulses.
//
// Interface: `in_valid` marks one sample on `in_data` for one cycle (no
// back-pressure, as from a serial receiver). Results are registered and are
// replaced as each stage finishes: `mvs_valid` pulses with new mean /
// variance / std / count, `ks_valid` with new kurtosis / skewness. `busy` is
// high while any sample is held or in flight. The buffering and control
// policy is this design's choice; the source design states the purpose of
// the delay and the enable behaviour.
module statistic_calculator
  import stat_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     clear,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     in_valid,
  output logic                     busy,
  output logic                     clear_done,
  output logic                     mvs_valid,
  output logic                     ks_valid,
  output logic        [CNT_W-1:0]  count,
  output logic signed [MEAN_W-1:0] mean,
  output logic        [VAR_W-1:0]  variance,
  output logic        [STD_W-1:0]  std_dev,
  output logic signed [RES_W-1:0]  kurtosis,
  output logic signed [RES_W-1:0]  skewness,
  output logic        [31:0]       dropped
);
  // ---- input hold register -------------------------------------------------
  logic                     hold_full_q;
  logic signed [DATA_W-1:0] hold_q;
  logic                     clr_pend_q, clr_now;
  logic                     mv_busy, ks_busy, mv_start, ks_start;
  logic                     mv_ready, ks_ready, slot_ready;
  logic                     slot_full_q;
  mvs_result_t              slot_q, mv_res;
  logic                     mv_valid;

  assign mv_start   = hold_full_q && mv_ready && !clr_pend_q;
  assign ks_start   = slot_full_q && ks_ready;
  assign slot_ready = !slot_full_q || ks_start;
  assign clr_now  = clr_pend_q && !hold_full_q && !mv_busy && !slot_full_q
                               && !ks_busy;
  assign busy     = hold_full_q || mv_busy || slot_full_q || ks_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_full_q <= 1'b0;
      hold_q      <= '0;
      clr_pend_q  <= 1'b0;
      clear_done  <= 1'b0;
      dropped     <= '0;
    end else begin
      clear_done <= clr_now;
      if (clear)        clr_pend_q <= 1'b1;
      else if (clr_now) clr_pend_q <= 1'b0;

      if (mv_start) hold_full_q <= 1'b0;
      if (in_valid && enable) begin
        if (clr_pend_q || clear || (hold_full_q && !mv_start))
          dropped <= dropped + 32'd1;
        else begin
          hold_q      <= in_data;
          hold_full_q <= 1'b1;
        end
      end
      if (clr_now) dropped <= '0;
    end
  end

  // ---- stage 1: mean, variance, standard deviation ---------------------------
  mean_var_std u_mvs (
    .clk, .rst_n, .clear(clr_now),
    .data_in(hold_q), .data_in_valid(mv_start),
    .ready(mv_ready), .busy(mv_busy), .out_ready(slot_ready),
    .result_valid(mv_valid),
    .x_out(mv_res.x), .count_out(mv_res.count), .mean_out(mv_res.mean),
    .variance_out(mv_res.variance), .std_dev_out(mv_res.std_dev));

  // ---- hand-off slot --------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_full_q <= 1'b0;
      slot_q      <= '0;
    end else begin
      if (ks_start) slot_full_q <= 1'b0;
      if (mv_valid) begin
        slot_q      <= mv_res;
        slot_full_q <= 1'b1;
      end
    end
  end

  assign mvs_valid = mv_valid;
  assign count     = mv_res.count;
  assign mean      = mv_res.mean;
  assign variance  = mv_res.variance;
  assign std_dev   = mv_res.std_dev;

  // ---- stage 2: kurtosis and skewness ------------------------------------------
  kurt_skew u_ks (
    .clk, .rst_n, .clear(clr_now), .start(ks_start),
    .data_in(slot_q.x), .s_mean(slot_q.mean), .s_variance(slot_q.variance),
    .s_std_dev(slot_q.std_dev), .s_data_count(slot_q.count),
    .ready(ks_ready), .busy(ks_busy), .result_valid(ks_valid),
    .kurtosis_out(kurtosis), .skewness_out(skewness));

  // A result must never land in a full hand-off slot.
  a_slot_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 mv_valid |-> (!slot_full_q || ks_start));
endmodule
