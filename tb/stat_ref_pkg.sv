// Testbench-only integer reference model of the statistics accelerator.
// add() folds in one sample and updates every statistic exactly as the
// hardware defines them: mean = trunc(sum/N), mean_fx = trunc(sum*2^16/N),
// variance = trunc(sumsq/N) - floor(mean_fx^2/2^32) (floored at 0), std = floor(sqrt(variance)), d = x - mean,
// kurtosis = 65535*sum(d^4) / (N*variance^2),
// skewness = 256*sum(d^3) / ((N-1)*variance*std), zero denominators giving 0.
// It also keeps the textbook (floating-point, whole-record) values for
// comparison.
package stat_ref_pkg;
  class stat_model;
    longint n, sum, sumsq;
    longint mean, variance, std_dev;
    logic signed [127:0] s3, s4, kurt, skew;
    real xs[$];

    function new();
      reset();
    endfunction

    function void reset();
      n = 0; sum = 0; sumsq = 0; mean = 0; variance = 0; std_dev = 0;
      s3 = 0; s4 = 0; kurt = 0; skew = 0;
      xs.delete();
    endfunction

    static function longint isqrt(longint v);
      longint r = 0;
      for (int b = 31; b >= 0; b--)
        if ((r | (64'sd1 << b)) * (r | (64'sd1 << b)) <= v) r |= (64'sd1 << b);
      return r;
    endfunction

    function void add(longint x);
      longint d, mfx;
      logic signed [127:0] kd, sd;
      n++; sum += x; sumsq += x * x;
      xs.push_back(real'(x));
      mean     = sum / n;
      mfx      = (sum * 65536) / n;
      variance = sumsq / n - ((mfx * mfx) >>> 32);
      if (variance < 0) variance = 0;
      std_dev  = isqrt(variance);
      d  = x - mean;
      s3 += 128'(d) * 128'(d) * 128'(d);
      s4 += 128'(d) * 128'(d) * 128'(d) * 128'(d);
      kd = 128'(variance) * 128'(variance) * 128'(n);
      sd = 128'(variance) * 128'(std_dev) * 128'(n - 1);
      kurt = (kd == 0) ? 128'sd0 : (s4 * 65535) / kd;
      skew = (sd == 0) ? 128'sd0 : (s3 * 256) / sd;
    endfunction

    // Whole-record moments in floating point: m2, kurtosis m4/m2^2 and
    // skewness sum(d^3)/((N-1) sigma^3).
    function void exact(output real m, output real v, output real k, output real s);
      real a3 = 0.0, a4 = 0.0, a2 = 0.0;
      m = 0.0;
      foreach (xs[i]) m += xs[i];
      m = m / real'(xs.size());
      foreach (xs[i]) begin
        a2 += (xs[i] - m) ** 2;
        a3 += (xs[i] - m) ** 3;
        a4 += (xs[i] - m) ** 4;
      end
      v = a2 / real'(xs.size());
      k = a4 / (real'(xs.size()) * v * v);
      s = a3 / (real'(xs.size() - 1) * v * $sqrt(v));
    endfunction
  endclass
endpackage
