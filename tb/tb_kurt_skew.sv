// Self-checking testbench of kurt_skew. It plays the role of the mean /
// variance block: for a random 12-bit sample stream it computes the running
// mean, variance, std and N itself and presents them with each sample. The
// outputs are compared with a 128-bit integer model of
//   kurtosis = 65535 * sum(d^4) / (N * variance^2)
//   skewness =   256 * sum(d^3) / ((N-1) * variance * std)
// with d = x - mean, and the start-to-result latency is checked against the
// unit latencies (35 + 51 + 86 + 1 = 173 cycles). A final streaming phase
// offers a sample whenever `ready` is high: every result is checked in
// order against a queue, and so is the interval between accepted samples.
module tb_kurt_skew;
  import stat_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                     clear = 1'b0, start = 1'b0;
  logic signed [DATA_W-1:0] x = '0;
  logic signed [MEAN_W-1:0] mean_i = '0;
  logic        [VAR_W-1:0]  var_i = '0;
  logic        [STD_W-1:0]  std_i = '0;
  logic        [CNT_W-1:0]  n_i = '0;
  logic                     busy, rv, ready;
  logic signed [RES_W-1:0]  kurt, skew;

  kurt_skew dut (.clk, .rst_n, .clear, .start, .data_in(x), .s_mean(mean_i),
                 .s_variance(var_i), .s_std_dev(std_i), .s_data_count(n_i),
                 .ready, .busy, .result_valid(rv), .kurtosis_out(kurt), .skewness_out(skew));

  longint sum, sumsq, n;
  logic signed [127:0] s3, s4;
  logic signed [63:0]  ke_q[$], se_q[$];
  bit     stream = 1'b0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (stream && rv) begin
    logic signed [63:0] ke, se;
    checks++;
    if (ke_q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      ke = ke_q.pop_front(); se = se_q.pop_front();
      if (kurt !== ke || skew !== se) begin
        failures++; $display("FAIL stream kurt %0d/%0d skew %0d/%0d", kurt, ke, skew, se);
      end
    end
  end

  function automatic longint isqrt_ref(longint v);
    longint r = 0;
    for (int b = 31; b >= 0; b--)
      if ((r | (64'sd1 << b)) * (r | (64'sd1 << b)) <= v) r |= (64'sd1 << b);
    return r;
  endfunction

  task automatic model(input logic signed [DATA_W-1:0] xv,
                       output longint m, output longint v, output longint s,
                       output logic signed [127:0] ke, output logic signed [127:0] se);
    longint d, mfx;
    logic signed [127:0] kd, sd;
    sum += xv; sumsq += longint'(xv) * longint'(xv); n++;
    m = sum / n;
    mfx = (sum * 65536) / n;
    v = sumsq / n - ((mfx * mfx) >>> 32);
    if (v < 0) v = 0;
    s = isqrt_ref(v);
    d = longint'(xv) - m;
    s3 += 128'(d) * 128'(d) * 128'(d);
    s4 += 128'(d) * 128'(d) * 128'(d) * 128'(d);
    kd = 128'(v) * 128'(v) * 128'(n);
    sd = 128'(v) * 128'(s) * 128'(n - 1);
    ke = (kd == 0) ? 128'sd0 : (s4 * 65535) / kd;
    se = (sd == 0) ? 128'sd0 : (s3 * 256) / sd;
  endtask

  task automatic feed(input logic signed [DATA_W-1:0] xv);
    int lat;
    longint m, v, s;
    logic signed [127:0] ke, se;
    model(xv, m, v, s, ke, se);
    while (busy) @(negedge clk);
    @(negedge clk);
    x = xv; mean_i = 32'(m); var_i = 48'(v); std_i = 24'(s); n_i = 32'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0; x = '0; mean_i = '0; var_i = '0; std_i = '0; n_i = '0; lat = 1;
    while (!rv && lat < 1000) begin @(negedge clk); lat++; end
    checks += 3;
    if (lat != 173)            begin failures++; $display("FAIL latency %0d", lat); end
    if (kurt !== ke[63:0])     begin failures++; $display("FAIL n=%0d kurt %0d exp %0d", n, kurt, ke); end
    if (skew !== se[63:0])     begin failures++; $display("FAIL n=%0d skew %0d exp %0d", n, skew, se); end
  endtask

  initial begin
    sum = 0; sumsq = 0; n = 0; s3 = 0; s4 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    feed(16'sd500);                    // N = 1: zero denominators give 0
    feed(16'sd510);
    repeat (30) feed(16'(int'($urandom % 4096) - 2048));
    repeat (10) feed(16'sd2047);       // pushes the skew positive / negative
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    sum = 0; sumsq = 0; n = 0; s3 = 0; s4 = 0;
    repeat (30) feed(16'(900 + int'($urandom % 300) + (($urandom % 8 == 0) ? 1000 : 0)));
    // streaming phase
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    sum = 0; sumsq = 0; n = 0; s3 = 0; s4 = 0;
    stream = 1'b1;
    begin
      longint m, v, sd, last, gap;
      logic signed [127:0] ke, se;
      logic signed [DATA_W-1:0] xv;
      last = -1;
      for (int k = 0; k < 40; k++) begin
        xv = 16'(int'($urandom % 4096) - 2048);
        model(xv, m, v, sd, ke, se);
        @(negedge clk);
        while (!ready) @(negedge clk);
        x = xv; mean_i = 32'(m); var_i = 48'(v); std_i = 24'(sd); n_i = 32'(n); start = 1'b1;
        ke_q.push_back(ke[63:0]); se_q.push_back(se[63:0]);
        if (last >= 0) begin
          gap = cyc - last;
          checks++;
          if (gap != 87) begin failures++; $display("FAIL interval %0d", gap); end
        end
        last = cyc;
        @(negedge clk);
        start = 1'b0; x = '0; mean_i = '0; var_i = '0; std_i = '0; n_i = '0;
      end
      while (busy) @(negedge clk);
      checks++;
      if (ke_q.size() != 0) begin failures++; $display("FAIL %0d results missing", ke_q.size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
