// Self-checking testbench of isqrt at its default 48-bit size (15-cycle
// latency). Each result r is checked by the defining property
// r*r <= x < (r+1)*(r+1), for perfect squares, their neighbours, the
// extremes and random radicands.
module tb_isqrt;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        st = 1'b0;
  logic [47:0] x;
  logic [23:0] r;
  logic        done, busy;

  isqrt dut (.clk, .rst_n, .start(st), .radicand(x), .busy, .done, .root(r));

  task automatic run(input logic [47:0] v);
    int lat;
    logic [63:0] rr, r1;
    @(negedge clk); x = v; st = 1'b1;
    @(negedge clk); st = 1'b0; x = '0; lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    rr = 64'(r) * 64'(r);
    r1 = (64'(r) + 1) * (64'(r) + 1);
    checks += 2;
    if (!(rr <= 64'(v) && 64'(v) < r1)) begin failures++; $display("FAIL sqrt(%0d) got %0d", v, r); end
    if (lat != 15) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    logic [23:0] k;
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(48'd0); run(48'd1); run(48'd2); run(48'd3); run(48'd4);
    run(48'hFFFF_FFFF_FFFF);
    run(48'd4194304);
    repeat (20) begin
      k = 24'($urandom);
      run(48'(k) * 48'(k));
      run(48'(k) * 48'(k) - 48'd1);
    end
    repeat (40) run({16'($urandom), $urandom} >> ($urandom % 48));
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
