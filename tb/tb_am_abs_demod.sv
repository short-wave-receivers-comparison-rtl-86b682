// tb_am_abs_demod: self-checking test of the absolute-value AM demodulator.
// For random and corner-case (re, im) pairs the result must equal
// 2*floor(sqrt(re^2 + im^2)) - 32768, clipped to the 16-bit signed range, with the
// saturation flag set exactly when clipping happened; the latency from start to
// done must be W + 3 = 19 clocks.
module tb_am_abs_demod;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic               start = 1'b0, busy, done, sat;
  logic signed [15:0] re = '0, im = '0, u_nf;
  int checks = 0, failures = 0;

  am_abs_demod dut (.clk(clk), .rst(rst), .start(start), .re(re), .im(im),
                    .busy(busy), .done(done), .u_nf(u_nf), .saturated(sat));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint isqrt(longint v);
    longint r;
    r = longint'($floor($sqrt(real'(v))));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic run(input logic signed [15:0] x, input logic signed [15:0] y);
    longint s, ref_v;
    bit clip;
    int lat;
    s = longint'(x) * longint'(x) + longint'(y) * longint'(y);
    ref_v = 2 * isqrt(s) - 32768;
    clip = ref_v > 32767;
    if (clip) ref_v = 32767;
    re = x; im = y; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    re = 16'($urandom); im = 16'($urandom);   // inputs are sampled at start only
    lat = 1;
    while (!done && lat < 40) begin @(posedge clk); #1; lat++; end
    check(lat == 19, $sformatf("latency %0d", lat));
    check(u_nf == 16'(ref_v), $sformatf("re=%0d im=%0d: got %0d want %0d", x, y, u_nf, ref_v));
    check(sat == clip, "saturation flag");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(0, 0);
    run(16384, 0);
    run(0, -16384);
    run(-32768, -32768);
    run(32767, 32767);
    run(11585, 11585);
    run(8192, 0);
    for (int i = 0; i < 300; i++) run(16'($urandom), 16'($urandom));
    for (int i = 0; i < 300; i++) run(16'($urandom_range(0, 20000)) - 16'd10000,
                                      16'($urandom_range(0, 20000)) - 16'd10000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
