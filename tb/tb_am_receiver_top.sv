// tb_am_receiver_top: end-to-end test of the whole design at its default parameters
// (100 MHz clock, 10 ms board reset). Two board models are attached: one to the
// receiver's pins, fed with an AM test signal at 140 kHz (a conversion every 714
// clocks, the carrier advancing a quarter period per sample as after sub-sampling
// 455 kHz), and one to the stand-alone exerciser's pins.
//
// Checks: every audio sample equals 2*floor(sqrt(c^2 + s^2)) - 32768 of the matching
// pair of ADC words and reaches DAC0 and DAC1; every conversion is served before the
// next one; the exerciser's DACs follow the ramp; both boards see a full 10 ms reset
// and no bus-timing violation. Each mechanism of the design is counted and must
// occur at least once: board reset, initial FS/CFG writes, interrupt, ADC read
// through the bus driver (board-to-FPGA direction), DAC write (FPGA-to-board
// direction), decimation by 4, simultaneous DAC update, result read held off by the
// core while the access runs, bus-timeout suppression during the reset, and ramp
// pairs.
module tb_am_receiver_top;
  localparam int unsigned PERIOD = 714;   // 100 MHz / 140 kHz
  localparam int unsigned NSAMP  = 128;
  localparam int unsigned RESET_10MS = 1_000_000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic        rx_busclk, rx_nreset, rx_niosel, rx_nrd, rx_nwr, rx_d_oe, rx_nint0;
  logic [3:0]  rx_a;
  logic [1:0]  rx_a_sub;
  logic [2:0]  rx_a_bank;
  logic [15:0] rx_d_out, rx_d_in, m_d_out;
  logic        m_d_oe;
  logic        rx_init_done, rx_reset_active, rx_audio_valid, rx_audio_saturated, rx_tout_sup;
  logic [15:0] rx_audio, rx_isr_count, rx_missed_irqs;
  logic        ramp_busclk, ramp_nreset, ramp_niosel, ramp_nrd, ramp_nwr;
  logic [3:0]  ramp_a;
  logic [1:0]  ramp_a_sub;
  logic [2:0]  ramp_a_bank;
  logic [15:0] ramp_d, ramp_value, r_d_out;
  logic [31:0] ramp_writes;
  logic        r_d_oe, r_nint0;
  logic        convert = 1'b0;
  logic [15:0] adc0_in = '0;
  int checks = 0, failures = 0;

  am_receiver_top dut (.*);

  // board on the receiver: it drives the data pins only during its reads
  assign rx_d_in = m_d_out;

  adda16_model #(.MIN_RESET(RESET_10MS)) rx_board (
    .busclk(rx_busclk), .nreset(rx_nreset), .niosel(rx_niosel), .nrd(rx_nrd), .nwr(rx_nwr),
    .a(rx_a), .a_sub(rx_a_sub), .a_bank(rx_a_bank),
    .d_in(rx_d_oe ? rx_d_out : 16'h0000), .d_out(m_d_out), .d_oe(m_d_oe),
    .nint0(rx_nint0), .convert(convert), .adc0_in(adc0_in), .adc1_in(16'h0000)
  );

  adda16_model #(.MIN_RESET(RESET_10MS)) ramp_board (
    .busclk(ramp_busclk), .nreset(ramp_nreset), .niosel(ramp_niosel), .nrd(ramp_nrd),
    .nwr(ramp_nwr), .a(ramp_a), .a_sub(ramp_a_sub), .a_bank(ramp_a_bank),
    .d_in(ramp_d), .d_out(r_d_out), .d_oe(r_d_oe),
    .nint0(r_nint0), .convert(1'b0), .adc0_in(16'h0000), .adc1_in(16'h0000)
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

  // 455 kHz carrier sampled at 140 kHz (3.25 cycles per sample), 1 kHz tone, 50 %
  function automatic logic signed [15:0] am_sample(int n);
    real env, ph, pi;
    pi  = 3.14159265358979;
    env = 16384.0 * (1.0 + 0.5 * $cos(2.0 * pi * 1000.0 * real'(n) / 140000.0));
    ph  = 2.0 * pi * 455000.0 * real'(n) / 140000.0 + 1.1;
    return 16'($rtoi(env * $cos(ph) * 0.999));
  endfunction

  // mechanism counters
  int n_reset = 0, n_init = 0, n_irq = 0, n_adc_read = 0, n_dac_write = 0;
  int n_decim = 0, n_simul = 0, n_held = 0, n_toutsup = 0, n_ramp = 0;
  int n_drv_read = 0, n_drv_write = 0;

  logic signed [15:0] xs [NSAMP];
  int outs = 0;
  always @(posedge clk) if (!rst) begin
    if (rx_audio_valid) begin
      check(16'(outs * 4 + 3) < 16'(NSAMP), "audio sample in range");
      check(rx_audio == demod_ref(xs[4*outs+3], xs[4*outs+2]),
            $sformatf("audio %0d: got %0d want %0d", outs, $signed(rx_audio),
                      demod_ref(xs[4*outs+3], xs[4*outs+2])));
      outs++;
      n_decim++;
    end
    if (rx_reset_active && rx_tout_sup && dut.u_core.Bus2IP_RdCE[1]) n_toutsup++;
    if (dut.u_core.Bus2IP_RdCE[1] && !dut.u_core.IP2Bus_RdAck) n_held++;
    if (!rx_nrd && rx_d_oe == 1'b0 && dut.drv_f_oe) n_drv_read++;
    if (!rx_nwr && rx_d_oe) n_drv_write++;
  end

  initial begin
    repeat (RESET_10MS + 200 + NSAMP * PERIOD * 2) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_init;
    for (int n = 0; n < NSAMP; n++) xs[n] = am_sample(n);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    t_init = 0;
    while (!rx_init_done) begin @(posedge clk); #1; t_init++; end
    $display("receiver initialised after %0d clocks", t_init);
    check(t_init > RESET_10MS && t_init < RESET_10MS + 100, "initialised right after the 10 ms reset");
    check(rx_board.last_reset_len == RESET_10MS, "receiver board reset 10 ms");
    check(rx_board.fs == 8'h00 && rx_board.cfg == 8'h89, "receiver board FS/CFG");
    n_reset = rx_board.reset_pulses;
    n_init  = rx_board.fs_writes + rx_board.cfg_writes;

    for (int n = 0; n < NSAMP; n++) begin
      adc0_in = xs[n];
      @(negedge clk) convert = 1'b1;
      @(negedge clk) convert = 1'b0;
      repeat (PERIOD - 2) @(posedge clk);
      #1;
      check(rx_isr_count == 16'(n + 1), $sformatf("interrupt %0d served", n));
      if ((n + 1) % 4 == 0) begin
        logic signed [15:0] r;
        r = demod_ref(xs[n], xs[n-1]);
        check(rx_board.dac0 == r && rx_board.dac1 == r, $sformatf("DACs after sample %0d", n));
      end
    end
    n_irq       = rx_board.interrupts;
    n_adc_read  = rx_board.reads;
    n_dac_write = rx_board.dac0_writes + rx_board.dac1_writes;
    n_simul     = rx_board.deferred_dac0;
    n_ramp      = ramp_board.dac1_writes;

    check(rx_missed_irqs == 0, "no interrupt missed");
    check(n_adc_read == NSAMP, "one ADC read per conversion");
    check(outs == NSAMP / 4, "one audio sample per 4 conversions");
    check(rx_board.protocol_errors == 0 && ramp_board.protocol_errors == 0, "bus timing");
    check(rx_board.ignored == 0 && ramp_board.ignored == 0, "board address decoding matched");
    check(ramp_board.last_reset_len == RESET_10MS, "exerciser board reset 10 ms");
    check(ramp_board.dac1 == 16'(ramp_board.dac1_writes - 1), "exerciser ramp value");
    check(ramp_board.dac0 == ramp_board.dac1, "exerciser DACs together");

    $display("mechanisms: reset=%0d init=%0d irq=%0d adc_read=%0d dac_write=%0d decim=%0d",
             n_reset, n_init, n_irq, n_adc_read, n_dac_write, n_decim);
    $display("            simultaneous=%0d held=%0d toutsup=%0d ramp=%0d drv_read=%0d drv_write=%0d",
             n_simul, n_held, n_toutsup, n_ramp, n_drv_read, n_drv_write);
    check(n_reset > 0, "mechanism: board reset");
    check(n_init == 2, "mechanism: initial procedure");
    check(n_irq > 0, "mechanism: interrupt");
    check(n_adc_read > 0, "mechanism: ADC read");
    check(n_dac_write > 0, "mechanism: DAC write");
    check(n_decim > 0, "mechanism: decimation by 4");
    check(n_simul > 0, "mechanism: simultaneous DAC update");
    check(n_held > 0, "mechanism: result read held off");
    check(n_toutsup > 0, "mechanism: timeout suppression");
    check(n_ramp > 0, "mechanism: exerciser ramp");
    check(n_drv_read > 0, "mechanism: bus driver board-to-FPGA");
    check(n_drv_write > 0, "mechanism: bus driver FPGA-to-board");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
