// tb_adda16_user_logic: self-checking test of the own core's user logic with the
// board model behind it. Plays the processor-side bus: checks that a register-0
// write is acknowledged exactly ACK_DELAY = 5 clocks after it starts, that a
// register-1 read is held off until the board access has finished and returns the
// word read, that register 0 reads back with byte enables honoured, that the
// falling edge of nINT0 gives exactly one interrupt event, and that the timeout
// suppression drops after 2^TOUT_BIT idle clocks and returns on the next write.
module tb_adda16_user_logic;
  import adda16_pkg::*;

  localparam int unsigned RST_CYC = 30;
  localparam int unsigned TB_TOUT_BIT = 6;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = !clk;

  logic [31:0] b2ip_data = '0, ip2b_data;
  logic [3:0]  b2ip_be = 4'hF;
  logic [1:0]  rdce = '0, wrce = '0;
  logic        wrack, rdack, toutsup, intr, reset_active;
  logic        busclk, nreset, niosel, nrd, nwr, d_t, rnw, nint0;
  logic [3:0]  a;
  logic [1:0]  a_sub;
  logic [2:0]  a_bank;
  logic [15:0] d_o, bus_d, m_d_out;
  logic        m_d_oe, convert = 1'b0;
  logic [15:0] adc0_in = '0;
  int checks = 0, failures = 0;

  adda16_user_logic #(.RESET_CYCLES(RST_CYC), .TOUT_BIT(TB_TOUT_BIT)) dut (
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

  int intr_count = 0;
  always @(posedge clk) if (!rst && intr) intr_count++;

  task automatic bus_write(input int r, input logic [31:0] w, input logic [3:0] be,
                           output int lat);
    b2ip_data = w; b2ip_be = be;
    wrce = 2'b00; wrce[1-r] = 1'b0; wrce[r] = 1'b1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!wrack && lat < 2000);
    // wrack is sampled in the cycle it is high: count the clocks up to it
    @(posedge clk); #1;
    wrce = 2'b00;
  endtask

  task automatic bus_read(input int r, output logic [31:0] v, output int lat);
    rdce = 2'b00; rdce[r] = 1'b1;
    lat = 0;
    while (!rdack && lat < 100000) begin @(posedge clk); #1; lat++; end
    v = ip2b_data;
    @(posedge clk); #1;
    rdce = 2'b00;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    int lat;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    check(reset_active && !nreset, "board reset running after reset");
    check(toutsup, "timeout suppressed during the board reset");

    // FS write issued during the board reset: acknowledged after 5 clocks, the
    // result read waits until the access has been made
    bus_write(0, word_from_cmd(1'b0, REG_FS, FS_INIT), 4'hF, lat);
    check(lat == 5, $sformatf("write acknowledge after 5 clocks (%0d)", lat));
    check(reset_active, "still in board reset");
    bus_read(1, v, lat);
    check(!reset_active && board.fs_writes == 1, "FS written after board reset");
    check(lat > 10, $sformatf("result read held off during reset (%0d)", lat));

    bus_write(0, word_from_cmd(1'b0, REG_CFG, CFG_INIT), 4'hF, lat);
    check(lat == 5, "write acknowledge after 5 clocks");
    bus_read(1, v, lat);
    // accept at +1 after detect, 6 clocks of access, ack registered one later
    check(lat >= 1 && lat <= 4, $sformatf("result read waits for the access (%0d)", lat));
    check(board.cfg == 8'h89, "CFG = 0x89");

    // ADC conversions and reads
    for (int i = 0; i < 20; i++) begin
      int n_before;
      logic [15:0] s;
      s = 16'($urandom);
      n_before = intr_count;
      adc0_in = s;
      @(negedge clk) convert = 1'b1;
      @(negedge clk) convert = 1'b0;
      repeat (12) @(posedge clk);
      #1;
      check(intr_count == n_before + 1, "one interrupt event per conversion");
      bus_write(0, word_from_cmd(1'b1, REG_ADDA0, 16'h0000), 4'hF, lat);
      bus_read(1, v, lat);
      check(v[15:0] == s, $sformatf("ADC0 word %h, want %h", v[15:0], s));
    end

    // register 0 read back, byte enables
    bus_write(0, 32'h0001_ABCD, 4'hF, lat);
    bus_read(1, v, lat);
    bus_write(0, 32'h00FF_FF12, 4'b0001, lat);
    bus_read(1, v, lat);
    bus_read(0, v, lat);
    check(v == 32'h0001_AB12, $sformatf("register 0 byte-enable write %h", v));
    check(board.dac1 == 16'hAB12 && board.dac0 == 16'h0000, "DAC1 written, DAC0 updated from latch");

    // timeout suppression
    repeat ((1 << TB_TOUT_BIT) + 5) @(posedge clk);
    #1;
    check(!toutsup, "timeout suppression released after 2^TOUT_BIT clocks");
    bus_write(0, word_from_cmd(1'b1, REG_CFG, 16'h0000), 4'hF, lat);
    check(toutsup, "timeout suppression restored by a write");
    bus_read(1, v, lat);
    check(v[15:0] == 16'h0089, "CFG read back through the core");

    check(board.protocol_errors == 0, "board protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
