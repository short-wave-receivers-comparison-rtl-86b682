// tb_adda16_bus_fsm: self-checking test of the ADDA16 bus state machine against the
// board model. Checks the nRESET pulse length, the clock-by-clock position of the
// address, nIOSEL and strobe edges for reads and writes (setup 1, strobe 2, hold 1,
// turnaround 1), the register contents written, the data returned by reads, the
// jumper address lines and the model's protocol checker.
module tb_adda16_bus_fsm;
  import adda16_pkg::*;

  localparam int unsigned RST_CYC = 20;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic        cmd_valid = 1'b0;
  adda16_cmd_t cmd = '0;
  logic        cmd_ready, busy, done, rd_valid, reset_active;
  logic [15:0] rd_data;
  logic        busclk, nreset, niosel, nrd, nwr, d_t, rnw;
  logic [3:0]  a;
  logic [1:0]  a_sub;
  logic [2:0]  a_bank;
  logic [15:0] d_o, m_d_out, bus_d;
  logic        m_d_oe, nint0, convert = 1'b0;
  logic [15:0] adc0_in = 16'h1234, adc1_in = 16'hBEEF;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  adda16_bus_fsm #(.RESET_CYCLES(RST_CYC)) dut (
    .clk(clk), .rst(rst), .cmd_valid(cmd_valid), .cmd(cmd), .cmd_ready(cmd_ready),
    .busy(busy), .done(done), .rd_data(rd_data), .rd_valid(rd_valid),
    .reset_active(reset_active),
    .busclk(busclk), .nreset(nreset), .niosel(niosel), .nrd(nrd), .nwr(nwr),
    .a(a), .a_sub(a_sub), .a_bank(a_bank), .d_o(d_o), .d_t(d_t), .d_i(bus_d), .rnw(rnw)
  );

  assign bus_d = m_d_oe ? m_d_out : (d_t ? 16'h0000 : d_o);

  adda16_model #(.MIN_RESET(RST_CYC)) board (
    .busclk(busclk), .nreset(nreset), .niosel(niosel), .nrd(nrd), .nwr(nwr),
    .a(a), .a_sub(a_sub), .a_bank(a_bank), .d_in(bus_d), .d_out(m_d_out), .d_oe(m_d_oe),
    .nint0(nint0), .convert(convert), .adc0_in(adc0_in), .adc1_in(adc1_in)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // Run one access and record, relative to the accept clock, the clock at which each
  // pin changes (sampled after the edge).
  task automatic access(input logic rd, input logic [3:0] addr, input logic [15:0] data,
                        output logic [15:0] rdat);
    int t0, t_addr, t_sel, t_str, t_str_end, t_desel, t_ready;
    logic [3:0] a_seen;
    t_addr = -1; t_sel = -1; t_str = -1; t_str_end = -1; t_desel = -1; t_ready = -1;
    a_seen = 4'h0;
    while (!cmd_ready) @(posedge clk);
    cmd = '{rd: rd, addr: addr, data: data};
    cmd_valid = 1'b1;
    @(posedge clk); #1;
    cmd_valid = 1'b0;
    t0 = 0;
    for (int k = 1; k <= 12; k++) begin
      if (t_addr < 0 && a == addr && k >= 1 && niosel) begin t_addr = k; end
      if (t_sel < 0 && !niosel) begin t_sel = k; a_seen = a; end
      if (t_str < 0 && (rd ? !nrd : !nwr)) t_str = k;
      if (t_str >= 0 && t_str_end < 0 && (rd ? nrd : nwr)) t_str_end = k;
      if (t_sel >= 0 && t_desel < 0 && niosel) begin
        t_desel = k;
        check(a == 4'h0, "address back to 0x0 when nIOSEL rises");
      end
      if (t_desel >= 0 && t_ready < 0 && cmd_ready) t_ready = k;
      if (!rd) begin
        if (!niosel) check(d_t == 1'b0 && d_o == data && rnw == 1'b0, "write data driven");
      end else begin
        check(d_t == 1'b1 && rnw == 1'b1, "data released on read");
      end
      @(posedge clk); #1;
    end
    // clock offsets from the accept edge: address 0, nIOSEL +1, strobe +2 .. +3,
    // strobe high +4, nIOSEL high +5, ready again +6
    if (addr != 4'h0) check(t_addr == 0 || t_addr == 1, "address set before nIOSEL");
    check(t_sel == 2,     $sformatf("nIOSEL low one clock after address (%0d)", t_sel));
    check(t_str == 3,     $sformatf("strobe low one clock after nIOSEL (%0d)", t_str));
    check(t_str_end == 5, $sformatf("strobe low for two clocks (%0d)", t_str_end));
    check(t_desel == 6,   $sformatf("nIOSEL high one clock after strobe (%0d)", t_desel));
    check(t_ready == 7,   $sformatf("ready after one turnaround clock (%0d)", t_ready));
    check(a_seen == addr, "address stable while selected");
    rdat = rd_data;
  endtask

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] r;
  int reset_seen_low = 0;
  always @(posedge clk) if (!rst && !nreset) reset_seen_low++;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // reset cycle
    wait (cmd_ready);
    @(posedge clk); #1;
    check(reset_seen_low == RST_CYC, $sformatf("nRESET low for %0d clocks (%0d)", RST_CYC, reset_seen_low));
    check(board.last_reset_len == RST_CYC, "board saw the full reset pulse");
    check(a_bank == 3'b100 && a_sub == 2'b00, "jumper address lines");
    check(busclk == clk, "BUSCLK follows clock");

    // initial procedure: FS then CFG
    access(1'b0, REG_FS,  FS_INIT,  r);
    access(1'b0, REG_CFG, CFG_INIT, r);
    check(board.fs == 8'h00 && board.cfg == 8'h89, "FS and CFG written");

    // read back CFG
    access(1'b1, REG_CFG, 16'h0000, r);
    check(r == 16'h0089, $sformatf("CFG read back %h", r));

    // conversion then ADC reads
    @(negedge clk) convert = 1'b1;
    @(negedge clk) convert = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(nint0 == 1'b0, "nINT0 low after conversion");
    access(1'b1, REG_ADDA0, 16'h0000, r);
    check(r == 16'h1234, $sformatf("ADC0 read %h", r));
    access(1'b1, REG_ADDA1, 16'h0000, r);
    check(r == 16'hBEEF, $sformatf("ADC1 read %h", r));

    // random DAC writes, simultaneous update after DAC1
    for (int i = 0; i < 8; i++) begin
      logic [15:0] v0, v1, prev0;
      prev0 = board.dac0;
      v0 = 16'($urandom); v1 = 16'($urandom);
      access(1'b0, REG_ADDA0, v0, r);
      check(board.dac0 == prev0, "DAC0 output waits for the DAC1 write");
      access(1'b0, REG_ADDA1, v1, r);
      check(board.dac0 == v0 && board.dac1 == v1, $sformatf("DAC pair %h %h", v0, v1));
    end
    check(board.protocol_errors == 0, $sformatf("board protocol errors %0d", board.protocol_errors));
    check(board.ignored == 0, "no accesses ignored by the board");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
