// Self-checking testbench of seq_div at its default 48:32-bit size (54-cycle
// latency, the figure the design is specified with) and at the 80:64-bit
// size used for kurtosis. Quotients are compared with the simulator's signed
// division (truncation toward zero); a zero divisor must give 0.
module tb_seq_div;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               st = 1'b0, stw = 1'b0;
  logic signed [47:0] num;
  logic        [31:0] den;
  logic signed [47:0] quo;
  logic signed [79:0] numw, quow;
  logic        [63:0] denw;
  logic               done, busy, donew, busyw;

  seq_div dut (.clk, .rst_n, .start(st), .num, .den, .busy, .done, .quo);
  seq_div #(.NUM_W(80), .DEN_W(64)) dutw (.clk, .rst_n, .start(stw), .num(numw),
        .den(denw), .busy(busyw), .done(donew), .quo(quow));

  task automatic run(input logic signed [47:0] n, input logic [31:0] d);
    int lat;
    logic signed [63:0] expv;
    @(negedge clk); num = n; den = d; st = 1'b1;
    @(negedge clk); st = 1'b0; num = '0; den = '0; lat = 1;
    while (!done && lat < 300) begin @(negedge clk); lat++; end
    expv = (d == 0) ? 64'sd0 : 64'(n) / $signed({32'd0, d});
    checks += 2;
    if (quo !== expv[47:0]) begin failures++; $display("FAIL %0d/%0d got %0d exp %0d", n, d, quo, expv); end
    if (lat != 54) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  task automatic runw(input logic signed [79:0] n, input logic [63:0] d);
    int lat;
    logic signed [127:0] expv;
    @(negedge clk); numw = n; denw = d; stw = 1'b1;
    @(negedge clk); stw = 1'b0; lat = 1;
    while (!donew && lat < 300) begin @(negedge clk); lat++; end
    expv = (d == 0) ? 128'sd0 : 128'(n) / $signed({64'd0, d});
    checks += 2;
    if (quow !== expv[79:0]) begin failures++; $display("FAIL wide %0d/%0d got %0d exp %0d", n, d, quow, expv); end
    if (lat != 86) begin failures++; $display("FAIL wide latency %0d", lat); end
  endtask

  initial begin
    num = '0; den = '0; numw = '0; denw = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(48'sd100, 32'd7);
    run(-48'sd100, 32'd7);
    run(48'sd5, 32'd0);
    run(48'sd0, 32'd3);
    run(48'sh7FFF_FFFF_FFFF, 32'd1);
    run(-48'sh8000_0000_0000, 32'hFFFF_FFFF);
    repeat (40) run($signed({$urandom, $urandom})  >>> ($urandom % 40), $urandom >> ($urandom % 31));
    runw(80'sd123456789 * 80'sd65535, 64'd987654);
    runw(-80'sd1000, 64'd3);
    repeat (10) runw($signed({16'($urandom), $urandom, $urandom}), {$urandom, $urandom} >> ($urandom % 60));
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
