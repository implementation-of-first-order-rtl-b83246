// Self-checking testbench of statistic_calculator, the two-stage statistics
// pipeline with its input hold register, hand-off slot, enable and clear.
// Every mean / variance / std / count result and every kurtosis / skewness
// result is compared, in order, with the integer reference model fed the
// samples the calculator accepted. The phases make each mechanism happen and
// count it:
//   spaced samples     - no stalls, results for every sample;
//   bursts of three    - the second sample waits in the hold register
//                        (hold stall), passes the hand-off slot (slot use)
//                        and the third sample is dropped;
//   enable low         - samples are ignored, neither counted nor dropped;
//   clear while busy   - in-flight results still come out, a sample sent
//                        meanwhile is dropped, then everything reads zero;
//   streams            - one sample every 100 cycles, then every 92: both
//                        stages overlap their work and nothing is dropped.
// The second stage frees its front sooner than the first, so a result never
// has to wait in the hand-off slot here; that back-pressure path is tested
// in the mean / variance block's own testbench.
module tb_statistic_calculator;
  import stat_pkg::*;
  import stat_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                     enable = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic                     busy, clear_done, mvs_valid, ks_valid;
  logic        [CNT_W-1:0]  count;
  logic signed [MEAN_W-1:0] mean;
  logic        [VAR_W-1:0]  variance;
  logic        [STD_W-1:0]  std_dev;
  logic signed [RES_W-1:0]  kurtosis, skewness;
  logic        [31:0]       dropped;

  statistic_calculator dut (.clk, .rst_n, .enable, .clear, .in_data, .in_valid,
    .busy, .clear_done, .mvs_valid, .ks_valid, .count, .mean, .variance,
    .std_dev, .kurtosis, .skewness, .dropped);

  typedef struct {
    longint n, mean, variance, std_dev;
    logic signed [127:0] kurt, skew;
  } exp_t;
  exp_t mvq[$], ksq[$];
  stat_model model = new();
  int n_mvs = 0, n_ks = 0, n_drop_exp = 0;
  // mechanism counters
  int stream_gap[2] = '{100, 92};
  int cov_hold_stall = 0, cov_slot_use = 0, cov_drop = 0, cov_disabled = 0,
      cov_clear_busy = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.hold_full_q && !dut.mv_start && !dut.clr_pend_q) cov_hold_stall++;
    if (dut.slot_full_q) cov_slot_use++;
    if (mvs_valid) begin
      exp_t e;
      n_mvs++;
      checks++;
      if (mvq.size() == 0) begin failures++; $display("FAIL unexpected mvs result"); end
      else begin
        e = mvq.pop_front();
        if (longint'(count) != e.n || longint'(mean) != e.mean ||
            longint'(variance) != e.variance || longint'(std_dev) != e.std_dev) begin
          failures++;
          $display("FAIL mvs n=%0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d", e.n,
                   count, mean, variance, std_dev, e.n, e.mean, e.variance, e.std_dev);
        end
      end
    end
    if (ks_valid) begin
      exp_t e;
      n_ks++;
      checks++;
      if (ksq.size() == 0) begin failures++; $display("FAIL unexpected ks result"); end
      else begin
        e = ksq.pop_front();
        if (kurtosis !== e.kurt[63:0] || skewness !== e.skew[63:0]) begin
          failures++;
          $display("FAIL ks n=%0d: got %0d %0d exp %0d %0d", e.n, kurtosis, skewness,
                   e.kurt, e.skew);
        end
      end
    end
  end

  function automatic void expect_sample(longint x);
    exp_t e;
    model.add(x);
    e.n = model.n; e.mean = model.mean; e.variance = model.variance;
    e.std_dev = model.std_dev; e.kurt = model.kurt; e.skew = model.skew;
    mvq.push_back(e);
    ksq.push_back(e);
  endfunction

  task automatic send(input logic signed [DATA_W-1:0] x);
    @(negedge clk); in_data = x; in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0; in_data = $signed(16'($urandom));
  endtask

  task automatic wait_idle();
    int t = 0;
    do begin @(negedge clk); t++; end while ((busy || mvq.size() != 0 || ksq.size() != 0) && t < 5000);
  endtask

  function automatic logic signed [DATA_W-1:0] ecg_like(int i);
    return 16'(1000 + int'($urandom % 64) + ((i % 25 == 0) ? 700 : 0) - ((i % 25 == 3) ? 200 : 0));
  endfunction

  initial begin
    logic signed [DATA_W-1:0] x;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); enable = 1'b1;
    // spaced samples
    for (int i = 0; i < 30; i++) begin
      x = ecg_like(i); expect_sample(x); send(x);
      repeat (400) @(negedge clk);
    end
    wait_idle();
    // bursts of three
    for (int b = 0; b < 4; b++) begin
      x = ecg_like(b); expect_sample(x); send(x);
      x = ecg_like(b + 1); expect_sample(x);
      @(negedge clk); in_data = x; in_valid = 1'b1;          // back to back
      @(negedge clk); in_data = 16'sd5; in_valid = 1'b1;     // dropped
      n_drop_exp++; cov_drop++;
      @(negedge clk); in_valid = 1'b0;
      wait_idle();
      checks++;
      if (dropped != 32'(n_drop_exp)) begin failures++; $display("FAIL dropped %0d exp %0d", dropped, n_drop_exp); end
    end
    // enable low: ignored
    enable = 1'b0;
    for (int i = 0; i < 3; i++) begin send(16'sd1234); cov_disabled++; repeat (300) @(negedge clk); end
    checks += 2;
    if (count != 32'(model.n))          begin failures++; $display("FAIL disabled samples counted"); end
    if (dropped != 32'(n_drop_exp))     begin failures++; $display("FAIL disabled samples dropped"); end
    enable = 1'b1;
    // clear while busy
    x = ecg_like(7); expect_sample(x); send(x);
    repeat (20) @(negedge clk);
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy before clear"); end
    else cov_clear_busy++;
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    send(16'sd999);                                           // dropped while clearing
    begin
      int t = 0;
      while (!clear_done && t < 2000) begin @(negedge clk); t++; end
    end
    @(negedge clk);
    checks += 4;
    if (mvq.size() != 0 || ksq.size() != 0) begin failures++; $display("FAIL results lost across clear"); end
    if (count != 0 || mean != 0 || variance != 0 || std_dev != 0) begin failures++; $display("FAIL mvs not cleared"); end
    if (kurtosis != 0 || skewness != 0) begin failures++; $display("FAIL ks not cleared"); end
    if (dropped != 0) begin failures++; $display("FAIL dropped not cleared"); end
    model.reset();
    for (int i = 0; i < 20; i++) begin
      x = 16'(int'($urandom % 4096) - 2048); expect_sample(x); send(x);
      repeat (200 + $urandom % 100) @(negedge clk);
    end
    wait_idle();
    // streams at 100 and 92 cycles per sample
    foreach (stream_gap[g]) begin
      for (int i = 0; i < 40; i++) begin
        x = 16'(int'($urandom % 4096) - 2048); expect_sample(x);
        @(negedge clk); in_data = x; in_valid = 1'b1;
        @(negedge clk); in_valid = 1'b0;
        repeat (stream_gap[g] - 2) @(negedge clk);
      end
      wait_idle();
      checks++;
      if (dropped != 0) begin failures++; $display("FAIL %0d dropped at %0d cycles per sample", dropped, stream_gap[g]); end
    end
    checks += 7;
    if (n_mvs != 30 + 8 + 1 + 20 + 80) begin failures++; $display("FAIL mvs results %0d", n_mvs); end
    if (n_ks  != 30 + 8 + 1 + 20 + 80) begin failures++; $display("FAIL ks results %0d", n_ks); end
    if (cov_hold_stall == 0) begin failures++; $display("FAIL no hold stall seen"); end
    if (cov_slot_use == 0) begin failures++; $display("FAIL hand-off slot never used"); end
    if (cov_drop == 0)       begin failures++; $display("FAIL no drop"); end
    if (cov_disabled == 0)   begin failures++; $display("FAIL no disabled sample"); end
    if (cov_clear_busy == 0) begin failures++; $display("FAIL no clear while busy"); end
    $display("mechanisms: hold_stall_cycles=%0d slot_use_cycles=%0d drops=%0d disabled=%0d clear_busy=%0d",
             cov_hold_stall, cov_slot_use, cov_drop, cov_disabled, cov_clear_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
