// Self-checking testbench of booth_mult at the two sizes the accelerator
// uses: 16x16 (19-cycle latency) and 32x32 (35-cycle latency). Operands are
// random plus the corner cases 0, -1 and the most negative value; products
// are compared with the simulator's own multiplication.
module tb_booth_mult;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               s16 = 1'b0, s32 = 1'b0;
  logic signed [15:0] a16, b16;
  logic signed [31:0] a32, b32;
  logic signed [31:0] p16;
  logic signed [63:0] p32;
  logic               d16, d32, busy16, busy32;

  booth_mult #(.W(16)) dut16 (.clk, .rst_n, .start(s16), .a(a16), .b(b16),
                              .busy(busy16), .done(d16), .p(p16));
  booth_mult #(.W(32)) dut32 (.clk, .rst_n, .start(s32), .a(a32), .b(b32),
                              .busy(busy32), .done(d32), .p(p32));

  task automatic run16(input logic signed [15:0] a, input logic signed [15:0] b);
    int lat;
    logic signed [31:0] expv;
    @(negedge clk); a16 = a; b16 = b; s16 = 1'b1;
    @(negedge clk); s16 = 1'b0; a16 = '0; b16 = '0; lat = 1;
    while (!d16 && lat < 200) begin @(negedge clk); lat++; end
    expv = 32'(a) * 32'(b);
    checks += 2;
    if (p16 !== expv) begin failures++; $display("FAIL 16: %0d*%0d got %0d exp %0d", a, b, p16, expv); end
    if (lat != 19) begin failures++; $display("FAIL 16 latency %0d", lat); end
  endtask

  task automatic run32(input logic signed [31:0] a, input logic signed [31:0] b);
    int lat;
    logic signed [63:0] expv;
    @(negedge clk); a32 = a; b32 = b; s32 = 1'b1;
    @(negedge clk); s32 = 1'b0; a32 = '0; b32 = '0; lat = 1;
    while (!d32 && lat < 200) begin @(negedge clk); lat++; end
    expv = 64'(a) * 64'(b);
    checks += 2;
    if (p32 !== expv) begin failures++; $display("FAIL 32: %0d*%0d got %0d exp %0d", a, b, p32, expv); end
    if (lat != 35) begin failures++; $display("FAIL 32 latency %0d", lat); end
  endtask

  initial begin
    a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run16(16'sd0, 16'sd1234);
    run16(-16'sd1, -16'sd1);
    run16(-16'sd32768, -16'sd32768);
    run16(-16'sd32768, 16'sd32767);
    run16(16'sd2047, -16'sd2048);
    repeat (60) run16($signed(16'($urandom)), $signed(16'($urandom)));
    run32(-32'sd2147483648, -32'sd2147483648);
    run32(32'sd4194304, 32'sd4194304);
    run32(-32'sd1, 32'sd7);
    repeat (60) run32($signed($urandom), $signed($urandom));
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
