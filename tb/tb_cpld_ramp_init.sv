// tb_cpld_ramp_init: self-checking test of the stand-alone CPLD exerciser with the
// board model. Checks the reset pulse, that FS = 0x00 and then CFG = 0x89 are
// written before any DAC write, that DAC0 and DAC1 then receive i = 0, 1, 2, ...
// in pairs with the board updating both together, that a pair takes 14 clocks
// (two 7-clock accesses) and that the bus timing stays within the board's rules.
module tb_cpld_ramp_init;
  localparam int unsigned RST_CYC = 25;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic        busclk, nreset, niosel, nrd, nwr, nint0, m_d_oe;
  logic [3:0]  a;
  logic [1:0]  a_sub;
  logic [2:0]  a_bank;
  logic [15:0] d, m_d_out, ramp_value;
  logic [31:0] ramp_writes;
  int checks = 0, failures = 0;

  cpld_ramp_init #(.RESET_CYCLES(RST_CYC)) dut (
    .clk(clk), .rst(rst), .busclk(busclk), .nreset(nreset), .niosel(niosel),
    .nrd(nrd), .nwr(nwr), .a(a), .a_sub(a_sub), .a_bank(a_bank), .d(d),
    .ramp_value(ramp_value), .ramp_writes(ramp_writes)
  );

  adda16_model #(.MIN_RESET(RST_CYC)) board (
    .busclk(busclk), .nreset(nreset), .niosel(niosel), .nrd(nrd), .nwr(nwr),
    .a(a), .a_sub(a_sub), .a_bank(a_bank), .d_in(d), .d_out(m_d_out), .d_oe(m_d_oe),
    .nint0(nint0), .convert(1'b0), .adc0_in(16'h0000), .adc1_in(16'h0000)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // follow the board's DAC outputs: each update must be the next ramp value
  int updates = 0, last_update_cycle = -1, cycle = 0;
  logic [15:0] last_dac1 = 16'hFFFF;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && board.dac1_writes != updates) begin
      #1;
      check(board.fs_writes == 1 && board.cfg_writes == 1 && board.cfg == 8'h89,
            "initialised before the ramp");
      check(board.dac1 == 16'(updates) && board.dac0 == 16'(updates),
            $sformatf("ramp value %0d on both DACs (%0d %0d)", updates, board.dac0, board.dac1));
      if (last_update_cycle >= 0)
        check(cycle - last_update_cycle == 14, $sformatf("pair period %0d", cycle - last_update_cycle));
      last_update_cycle = cycle;
      updates++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (RST_CYC + 5 + 14 + 300 * 14) @(posedge clk);
    #2;
    check(updates >= 300, $sformatf("ramp running (%0d pairs)", updates));
    check(32'(updates) == ramp_writes || 32'(updates) + 1 == ramp_writes, "pair counter");
    check(board.last_reset_len == RST_CYC, "reset pulse length");
    check(board.reads == 0, "no reads on the output-only bus");
    check(board.protocol_errors == 0, "board protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
