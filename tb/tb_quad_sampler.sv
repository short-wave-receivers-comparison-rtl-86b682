// tb_quad_sampler: self-checking test of the delayed quadrature sampler. Feeds a
// random sample stream with random gaps and checks that exactly every 4th sample
// produces an output, one clock later, with cos = that sample and sin = the
// sample before it; then checks that a tone at a quarter of the converter rate
// (the carrier after sub-sampling) yields a constant magnitude.
module tb_quad_sampler;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic               in_valid = 1'b0, out_valid;
  logic signed [15:0] in_sample = '0, out_cos, out_sin;
  int checks = 0, failures = 0;

  quad_sampler dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_sample(in_sample),
                    .out_valid(out_valid), .out_cos(out_cos), .out_sin(out_sin));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] hist [$];
  int n = 0, outs = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      // random gap
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        check(!out_valid || (n % 4 == 0 && n > 0), "no output between samples");
      end
      in_valid  = 1'b1;
      in_sample = 16'($urandom);
      hist.push_back(in_sample);
      n++;
      @(posedge clk); #1;
      in_valid = 1'b0;
      if (n % 4 == 0) begin
        check(out_valid, $sformatf("output after sample %0d", n));
        check(out_cos == hist[n-1], "cos branch = current sample");
        check(out_sin == hist[n-2], "sin branch = previous sample (z^-1)");
        outs++;
      end else begin
        check(!out_valid, $sformatf("no output after sample %0d", n));
      end
    end
    check(outs == 100, "decimation by 4");

    // carrier at f_s/4 with constant envelope: cos^2 + sin^2 constant
    for (int i = 0; i < 64; i++) begin
      real ph;
      ph = 3.14159265358979 / 2.0 * real'(i) + 0.3;
      in_valid  = 1'b1;
      in_sample = 16'(int'($rtoi(12000.0 * $cos(ph * 13.0))));
      @(posedge clk); #1;
      in_valid = 1'b0;
      if (out_valid) begin
        real m;
        m = $sqrt(real'(out_cos) * real'(out_cos) + real'(out_sin) * real'(out_sin));
        check(m > 11990.0 && m < 12010.0, $sformatf("constant magnitude %f", m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
