// Running mean, variance and standard deviation of a sample stream
// (the first processing block of the accelerator).
//
// No sample is stored. Each accepted sample updates three registers: the
// sum of samples, the sum of squared samples and the sample count N. From
// them the block computes
//   mean_fx  = (sum * 2^16) / N          (mean with 16 fraction bits)
//   mean     = mean_fx without its fraction (truncated toward zero)
//   variance = sumsq / N - floor(mean_fx^2 / 2^32)   (E[x^2] - E[x]^2)
//   std_dev  = floor(sqrt(variance))
// with integer (scale 1) outputs and divisions truncated toward zero. The
// 16 fraction bits fill the headroom between the 32-bit sum and the 48-bit
// dividend, and keep the truncation of the mean out of the variance (an
// integer mean squared would bias it by about 2*mean*0.5). This
// running form, and the block structure (accumulator, data counter, a
// squaring multiplier, two dividers, a multiplier for mean^2, a subtractor
// and a square root), follow the source design. The sample is squared by a
// 16x16 Booth multiplier, the two divisions are 48:32-bit, mean^2 uses a
// 32x32 multiplier and the square root is 48-bit.
//
// Interface: when `ready` is high, a cycle with `data_in_valid` accepts
// `data_in`. The work is split in two parts that overlap: the front (sums,
// divisions, mean^2 and subtraction) frees itself when it hands the
// variance to the back (square root), so the next sample can be taken
// while the root of the previous one is computed. `result_valid` pulses
// once, in the cycle after the back has its root and `out_ready` is high,
// with all outputs belonging to that sample; the outputs hold until the
// next result. `busy` is high while any sample is in the block. `clear`
// empties the sums and the counter and must only be raised while `busy`
// is low.
// Timing: the mean is ready 55 cycles after the sample, the variance after
// about 90 and the standard deviation after about 105; with out_ready high
// result_valid comes 107 cycles after the accepting cycle, and a new
// sample can be accepted every 91 cycles.
module mean_var_std
  import stat_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic signed [DATA_W-1:0] data_in,
  input  logic                     data_in_valid,
  output logic                     ready,
  output logic                     busy,
  input  logic                     out_ready,
  output logic                     result_valid,
  output logic signed [DATA_W-1:0] x_out,
  output logic        [CNT_W-1:0]  count_out,
  output logic signed [MEAN_W-1:0] mean_out,
  output logic        [VAR_W-1:0]  variance_out,
  output logic        [STD_W-1:0]  std_dev_out
);
  typedef enum logic [1:0] {S_IDLE, S_MEAN, S_WAIT} state_t;
  state_t state_q;            // front: sums, divisions, mean^2
  typedef enum logic [1:0] {B_IDLE, B_ROOT, B_OUT} back_t;
  back_t  back_q;             // back: square root, output

  logic accept;
  assign ready  = (state_q == S_IDLE);
  assign accept = ready && data_in_valid;
  assign busy   = (state_q != S_IDLE) || (back_q != B_IDLE) || result_valid;

  // ---- running sums and counter ------------------------------------------
  logic signed [SUM_W-1:0]    sum;
  logic signed [SQ_W-1:0]     sumsq;
  logic        [CNT_W-1:0]    count;
  logic signed [2*DATA_W-1:0] sq;
  logic                       sq_done;

  accumulator #(.IN_W(DATA_W), .ACC_W(SUM_W)) u_sum (
    .clk, .rst_n, .clear, .en(accept), .din(data_in), .acc(sum));
  data_counter #(.W(CNT_W)) u_count (
    .clk, .rst_n, .clear, .en(accept), .count(count));
  booth_mult #(.W(DATA_W)) u_square (
    .clk, .rst_n, .start(accept), .a(data_in), .b(data_in),
    .busy(), .done(sq_done), .p(sq));
  accumulator #(.IN_W(2*DATA_W), .ACC_W(SQ_W)) u_sumsq (
    .clk, .rst_n, .clear, .en(sq_done), .din(sq), .acc(sumsq));

  // ---- divisions -----------------------------------------------------------
  logic                    mean_start, msq_start;
  logic                    mean_done, msq_done;
  logic signed [SQ_W-1:0]  mean_q48, msq_q48;

  logic signed [SQ_W-1:0] sum_fx;
  assign sum_fx     = SQ_W'(sum) <<< MEAN_FRAC;
  assign mean_start = (state_q == S_MEAN);   // one cycle after accept: sum updated
  seq_div #(.NUM_W(SQ_W), .DEN_W(CNT_W)) u_div_mean (
    .clk, .rst_n, .start(mean_start), .num(sum_fx), .den(count),
    .busy(), .done(mean_done), .quo(mean_q48));

  logic sumsq_ready;   // sumsq holds this sample one cycle after sq_done
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sumsq_ready <= 1'b0;
    else        sumsq_ready <= sq_done;
  assign msq_start = sumsq_ready;
  seq_div #(.NUM_W(SQ_W), .DEN_W(CNT_W)) u_div_msq (
    .clk, .rst_n, .start(msq_start), .num(sumsq), .den(count),
    .busy(), .done(msq_done), .quo(msq_q48));

  // ---- mean^2, subtraction, square root -----------------------------------
  logic signed [MEAN_W-1:0]   mean_fx, mean_int, mean_mag;
  logic signed [2*MEAN_W-1:0] mean_sq;
  logic                       msq_seen_q, m2_seen_q, m2_done;
  assign mean_fx  = MEAN_W'(mean_q48);
  // drop the fraction, truncating toward zero like the divider does
  assign mean_mag = mean_fx[MEAN_W-1] ? -mean_fx : mean_fx;
  assign mean_int = mean_fx[MEAN_W-1] ? -(mean_mag >>> MEAN_FRAC) : (mean_mag >>> MEAN_FRAC);

  booth_mult #(.W(MEAN_W)) u_mean_sq (
    .clk, .rst_n, .start(mean_done), .a(mean_fx), .b(mean_fx),
    .busy(), .done(m2_done), .p(mean_sq));

  localparam int PW = 2 * MEAN_W;
  logic signed [PW-1:0]       var_diff;
  logic        [VAR_W-1:0]    variance;
  always_comb begin
    var_diff = PW'(msq_q48) - (mean_sq >>> (2 * MEAN_FRAC));
    variance = var_diff[PW-1] ? '0 : VAR_W'(var_diff);
  end

  logic root_start, root_done;
  logic [STD_W-1:0] root;
  isqrt #(.W(VAR_W)) u_root (
    .clk, .rst_n, .start(root_start), .radicand(variance),
    .busy(), .done(root_done), .root(root));

  // The front (sums, divisions, mean^2) hands over to the back (square
  // root, output) and may then take the next sample while the root runs.
  logic signed [DATA_W-1:0] x_q, x_s;
  logic        [CNT_W-1:0]  count_s;
  logic signed [MEAN_W-1:0] mean_s;
  logic        [VAR_W-1:0]  var_s;
  logic        [STD_W-1:0]  std_s;

  assign root_start = (state_q == S_WAIT) && (msq_seen_q || msq_done)
                                          && (m2_seen_q  || m2_done)
                                          && (back_q == B_IDLE);

  // ---- control ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      back_q       <= B_IDLE;
      msq_seen_q   <= 1'b0;
      m2_seen_q    <= 1'b0;
      result_valid <= 1'b0;
      x_q          <= '0;
      x_s          <= '0;
      count_s      <= '0;
      mean_s       <= '0;
      var_s        <= '0;
      std_s        <= '0;
      x_out        <= '0;
      count_out    <= '0;
      mean_out     <= '0;
      variance_out <= '0;
      std_dev_out  <= '0;
    end else begin
      result_valid <= 1'b0;
      if (clear) begin
        x_out        <= '0;
        count_out    <= '0;
        mean_out     <= '0;
        variance_out <= '0;
        std_dev_out  <= '0;
      end
      // front
      unique case (state_q)
        S_IDLE: if (accept) begin
          x_q        <= data_in;
          msq_seen_q <= 1'b0;
          m2_seen_q  <= 1'b0;
          state_q    <= S_MEAN;
        end
        S_MEAN: state_q <= S_WAIT;
        S_WAIT: begin
          if (msq_done) msq_seen_q <= 1'b1;
          if (m2_done)  m2_seen_q  <= 1'b1;
          if (root_start) begin
            x_s     <= x_q;
            var_s   <= variance;
            mean_s  <= mean_int;
            count_s <= count;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
      // back
      unique case (back_q)
        B_IDLE: if (root_start) back_q <= B_ROOT;
        B_ROOT: if (root_done) begin
          std_s  <= root;
          back_q <= B_OUT;
        end
        B_OUT: if (out_ready) begin
          x_out        <= x_s;
          count_out    <= count_s;
          mean_out     <= mean_s;
          variance_out <= var_s;
          std_dev_out  <= std_s;
          result_valid <= 1'b1;
          back_q       <= B_IDLE;
        end
        default: back_q <= B_IDLE;
      endcase
    end
  end
endmodule
