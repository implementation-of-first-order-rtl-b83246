// Self-checking testbench of mean_var_std. Random 12-bit samples (the
// resolution of the ECG data the accelerator is meant for) are fed one at a
// time; after each, mean, variance, standard deviation and N are compared
// with an integer model: mean = trunc(sum/N), variance = trunc(sumsq/N) -
// floor(mean_fx^2 / 2^32) with mean_fx = trunc(sum*2^16/N),
// std = floor(sqrt(variance)). The latency from sample to result is
// checked against the sum of the unit latencies (1 + 54 + 35 + 15 + 2 = 107).
// A clear in the middle restarts the statistics. A final streaming phase
// offers a sample whenever `ready` is high while `out_ready` is toggled at
// random: every result is checked in order against a queue, and the
// interval between accepted samples is checked (91 cycles when the output
// is not held back).
module tb_mean_var_std;
  import stat_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                     clear = 1'b0, vin = 1'b0;
  logic signed [DATA_W-1:0] din = '0;
  logic                     busy, rv, ready, out_ready = 1'b1;
  logic signed [DATA_W-1:0] x_out;
  logic        [CNT_W-1:0]  cnt;
  logic signed [MEAN_W-1:0] mean;
  logic        [VAR_W-1:0]  var_o;
  logic        [STD_W-1:0]  std_o;

  mean_var_std dut (.clk, .rst_n, .clear, .data_in(din), .data_in_valid(vin),
                    .ready, .busy, .out_ready, .result_valid(rv), .x_out, .count_out(cnt),
                    .mean_out(mean), .variance_out(var_o), .std_dev_out(std_o));

  longint sum, sumsq, n;
  typedef struct { longint n, m, v, s; logic signed [DATA_W-1:0] x; } exp_t;
  exp_t exp_q[$];
  bit   stream = 1'b0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // streaming checker: results must come in order and match the model
  always @(posedge clk) if (stream && rv) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      e = exp_q.pop_front();
      if (longint'(cnt) != e.n || longint'(mean) != e.m || longint'(var_o) != e.v ||
          longint'(std_o) != e.s || x_out !== e.x) begin
        failures++;
        $display("FAIL stream n=%0d mean %0d/%0d var %0d/%0d std %0d/%0d",
                 e.n, mean, e.m, var_o, e.v, std_o, e.s);
      end
    end
  end

  function automatic longint isqrt_ref(longint v);
    longint r = 0;
    for (int b = 31; b >= 0; b--)
      if ((r | (64'sd1 << b)) * (r | (64'sd1 << b)) <= v) r |= (64'sd1 << b);
    return r;
  endfunction

  task automatic feed(input logic signed [DATA_W-1:0] x);
    int lat;
    longint m, msq, v, s, mfx;
    while (busy) @(negedge clk);
    @(negedge clk); din = x; vin = 1'b1;
    @(negedge clk); vin = 1'b0; din = $signed(16'($urandom)); lat = 1;
    while (!rv && lat < 1000) begin @(negedge clk); lat++; end
    sum += x; sumsq += longint'(x) * longint'(x); n++;
    m   = sum / n;
    msq = sumsq / n;
    mfx = (sum * 65536) / n;
    v   = msq - ((mfx * mfx) >>> 32);
    if (v < 0) v = 0;
    s   = isqrt_ref(v);
    checks += 6;
    if (lat != 107)               begin failures++; $display("FAIL latency %0d", lat); end
    if (longint'(cnt) != n)       begin failures++; $display("FAIL count %0d exp %0d", cnt, n); end
    if (longint'(mean) != m)      begin failures++; $display("FAIL mean %0d exp %0d", mean, m); end
    if (longint'(var_o) != v)     begin failures++; $display("FAIL var %0d exp %0d", var_o, v); end
    if (longint'(std_o) != s)     begin failures++; $display("FAIL std %0d exp %0d", std_o, s); end
    if (x_out !== x)              begin failures++; $display("FAIL x_out"); end
  endtask

  initial begin
    sum = 0; sumsq = 0; n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    feed(16'sd100);
    feed(16'sd100);
    feed(-16'sd2048);
    repeat (40) feed(16'(int'($urandom % 4096) - 2048));
    // restart the statistics
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    sum = 0; sumsq = 0; n = 0;
    checks++;
    if (mean != 0 || var_o != 0 || std_o != 0) begin failures++; $display("FAIL outputs after clear"); end
    repeat (40) feed(16'(1000 + int'($urandom % 400)));
    feed(16'sd2047);
    // streaming phase
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    sum = 0; sumsq = 0; n = 0;
    stream = 1'b1;
    begin
      longint gap, last;
      longint mfx, v;
      last = -1;
      for (int k = 0; k < 60; k++) begin
        logic signed [DATA_W-1:0] xv;
        xv = 16'(int'($urandom % 4096) - 2048);
        @(negedge clk);
        while (!ready) begin
          @(negedge clk);
          out_ready = (k < 30) ? 1'b1 : ($urandom % 4 != 0);
        end
        din = xv; vin = 1'b1;
        if (k < 30 && last >= 0) begin
          gap = cyc - last;
          checks++;
          if (gap != 91) begin failures++; $display("FAIL interval %0d", gap); end
        end
        last = cyc;
        @(negedge clk); vin = 1'b0;
        if (k >= 30) out_ready = ($urandom % 4 != 0);
        sum += xv; sumsq += longint'(xv) * longint'(xv); n++;
        mfx = (sum * 65536) / n;
        v   = sumsq / n - ((mfx * mfx) >>> 32);
        if (v < 0) v = 0;
        exp_q.push_back('{n: n, m: sum / n, v: v, s: isqrt_ref(v), x: xv});
      end
      out_ready = 1'b1;
      while (busy) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
