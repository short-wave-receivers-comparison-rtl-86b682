// tb_receiver_isr: self-checking test of the receiver sequencer, run with the own
// core and the board model. An AM test signal (carrier at a quarter of the
// converter rate, as after sub-sampling, modulated by a tone) is fed to ADC0 one
// conversion at a time. Checks: FS and CFG are written once each, in that order,
// before the first interrupt is served; every interrupt reads ADC0 exactly once;
// every 4th sample produces one audio sample equal to
// 2*floor(sqrt(x[4k+3]^2 + x[4k+2]^2)) - 32768 (saturated), written to DAC0 and
// DAC1 with the board updating both together; each interrupt is finished well
// inside one sample period.
module tb_receiver_isr;
  import adda16_pkg::*;

  localparam int unsigned RST_CYC = 40;
  localparam int unsigned PERIOD  = 300;   // clocks between conversions
  localparam int unsigned NSAMP   = 64;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic [31:0] b2ip_data, ip2b_data;
  logic [3:0]  b2ip_be;
  logic [1:0]  rdce, wrce;
  logic        wrack, rdack, toutsup, intr, reset_active;
  logic        busclk, nreset, niosel, nrd, nwr, d_t, rnw, nint0;
  logic [3:0]  a;
  logic [1:0]  a_sub;
  logic [2:0]  a_bank;
  logic [15:0] d_o, bus_d, m_d_out;
  logic        m_d_oe, convert = 1'b0;
  logic [15:0] adc0_in = '0;
  logic        init_done, audio_valid, audio_sat;
  logic signed [15:0] audio;
  logic [15:0] isr_count, missed;
  int checks = 0, failures = 0;

  receiver_isr dut (
    .clk(clk), .rst(rst),
    .Bus2IP_Data(b2ip_data), .Bus2IP_BE(b2ip_be), .Bus2IP_RdCE(rdce), .Bus2IP_WrCE(wrce),
    .IP2Bus_Data(ip2b_data), .IP2Bus_WrAck(wrack), .IP2Bus_RdAck(rdack),
    .IP2Bus_IntrEvent(intr),
    .init_done(init_done), .audio_valid(audio_valid), .audio(audio),
    .audio_saturated(audio_sat), .isr_count(isr_count), .missed_irqs(missed)
  );

  adda16_user_logic #(.RESET_CYCLES(RST_CYC)) core (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst), .Bus2IP_Data(b2ip_data), .Bus2IP_BE(b2ip_be),
    .Bus2IP_RdCE(rdce), .Bus2IP_WrCE(wrce), .IP2Bus_Data(ip2b_data),
    .IP2Bus_WrAck(wrack), .IP2Bus_RdAck(rdack), .IP2Bus_ToutSup(toutsup),
    .IP2Bus_IntrEvent(intr), .reset_active(reset_active),
    .busclk(busclk), .nreset(nreset), .niosel(niosel), .nrd(nrd), .nwr(nwr),
    .a(a), .a_sub(a_sub), .a_bank(a_bank), .d_o(d_o), .d_t(d_t), .d_i(bus_d), .rnw(rnw),
    .nint0(nint0)
  );

  assign bus_d = m_d_oe ? m_d_out : (d_t ? 16'h0000 : d_o);

  adda16_model #(.MIN_RESET(RST_CYC)) board (
    .busclk(busclk), .nreset(nreset), .niosel(niosel), .nrd(nrd), .nwr(nwr),
    .a(a), .a_sub(a_sub), .a_bank(a_bank), .d_in(bus_d), .d_out(m_d_out), .d_oe(m_d_oe),
    .nint0(nint0), .convert(convert), .adc0_in(adc0_in), .adc1_in(16'h0000)
  );

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

  function automatic logic signed [15:0] demod_ref(logic signed [15:0] c, logic signed [15:0] s);
    longint v;
    v = 2 * isqrt(longint'(c) * c + longint'(s) * s) - 32768;
    if (v > 32767) v = 32767;
    return 16'(v);
  endfunction

  // AM test signal at the converter rate: carrier 13/4 cycles per sample
  function automatic logic signed [15:0] am_sample(int n);
    real env, ph;
    env = 16000.0 * (1.0 + 0.6 * $cos(2.0 * 3.14159265358979 * real'(n) / 37.0));
    ph  = 2.0 * 3.14159265358979 * 3.25 * real'(n) + 0.4;
    return 16'($rtoi(env * $cos(ph) * 0.999));
  endfunction

  logic signed [15:0] xs [NSAMP];
  int outs = 0;
  always @(posedge clk) begin
    if (!rst && audio_valid) begin
      int k;
      k = 4 * outs;
      check(audio == demod_ref(xs[k+3], xs[k+2]),
            $sformatf("audio %0d: got %0d want %0d", outs, audio, demod_ref(xs[k+3], xs[k+2])));
      outs++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NSAMP; n++) xs[n] = am_sample(n);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (init_done);
    @(posedge clk); #1;
    check(board.fs_writes == 1 && board.cfg_writes == 1, "FS and CFG written once");
    check(board.fs == 8'h00 && board.cfg == 8'h89, "FS = 0x00, CFG = 0x89");
    check(board.writes == 2 && board.reads == 0, "only the two initial accesses");
    for (int n = 0; n < NSAMP; n++) begin
      int t;
      adc0_in = xs[n];
      @(negedge clk) convert = 1'b1;
      @(negedge clk) convert = 1'b0;
      // wait until the sequencer is idle again
      t = 0;
      @(posedge clk); #1;
      while (!(dut.state == dut.ST_WAIT_INT && isr_count == 16'(n + 1)) && t < PERIOD) begin
        @(posedge clk); #1; t++;
      end
      check(t < PERIOD, $sformatf("interrupt %0d served within one period (%0d clocks)", n, t));
      if ((n + 1) % 4 == 0) begin
        logic signed [15:0] r;
        r = demod_ref(xs[n], xs[n-1]);
        check(board.dac0 == r && board.dac1 == r, $sformatf("DAC pair after sample %0d", n));
        $display("sample %0d: audio %0d, interrupt took %0d clocks", n, r, t);
      end
      repeat (PERIOD - t) @(posedge clk);
    end
    check(board.reads == NSAMP, $sformatf("one ADC0 read per interrupt (%0d)", board.reads));
    check(outs == NSAMP / 4, "one audio sample per 4 interrupts");
    check(board.dac0_writes == NSAMP / 4 && board.dac1_writes == NSAMP / 4, "DAC writes");
    check(board.deferred_dac0 == NSAMP / 4, "DAC0 waits for the DAC1 write");
    check(isr_count == 16'(NSAMP) && missed == 0, "all interrupts served");
    check(board.protocol_errors == 0, "board protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
