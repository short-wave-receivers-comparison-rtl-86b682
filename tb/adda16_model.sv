// adda16_model: behavioural model of the bus side of the ADDA16 two-channel 16-bit
// converter board, for simulation only (not synthesizable intent, no analog part).
//
// It decodes the board's address (A18..A16 and A5..A4 must equal the jumper
// settings JPA_BANK / JPA_SUB, otherwise the board ignores the access), holds the
// registers ADDA0/ADDA1 (read: ADC words, write: DAC words), FS and CFG, and clears
// them all while nRESET is low. A write is taken on the rising edge of nWR, a read
// drives D15..D0 while nRD and nIOSEL are low. DAC outputs follow the LDACCFG field
// of CFG: 000 every write updates its DAC, 001 both DACs update together when DAC1
// is written. A pulse on convert (the external sample clock) loads adc0_in/adc1_in
// into the ADC registers and, when INT0CFG = 01 ("ADC ready"), pulls nINT0 low for
// INT_LOW clocks.
//
// Bus timing is checked against the cycle the receiver uses (address one clock
// before nIOSEL, nIOSEL one clock before the strobe, strobe STROBE clocks, nIOSEL
// one clock after the strobe, at least one idle clock); each violation increments
// protocol_errors. Counters report reset pulses, register reads and writes and DAC
// updates for the testbenches.
module adda16_model #(
  parameter logic [2:0]  JPA_BANK   = 3'b100,
  parameter logic [1:0]  JPA_SUB    = 2'b00,
  parameter int unsigned MIN_RESET  = 10,
  parameter int unsigned STROBE     = 2,
  parameter int unsigned INT_LOW    = 4
) (
  input  logic        busclk,
  input  logic        nreset,
  input  logic        niosel,
  input  logic        nrd,
  input  logic        nwr,
  input  logic [3:0]  a,
  input  logic [1:0]  a_sub,
  input  logic [2:0]  a_bank,
  input  logic [15:0] d_in,       // data driven by the host
  output logic [15:0] d_out,      // data driven by the board during a read
  output logic        d_oe,
  output logic        nint0,
  input  logic        convert,
  input  logic [15:0] adc0_in,
  input  logic [15:0] adc1_in
);

  logic [15:0] adc0, adc1, dac0_reg, dac1_reg, dac0, dac1;
  logic [7:0]  fs, cfg;
  int unsigned protocol_errors = 0;
  int unsigned reset_pulses = 0, last_reset_len = 0;
  int unsigned reads = 0, writes = 0, fs_writes = 0, cfg_writes = 0;
  int unsigned dac0_writes = 0, dac1_writes = 0, dac_updates = 0, deferred_dac0 = 0;
  int unsigned ignored = 0, interrupts = 0;
  int unsigned reset_len = 0, int_cnt = 0;

  function automatic void err(string what);
    protocol_errors = protocol_errors + 1;
    $display("adda16_model %m: bus protocol error at %0t: %s", $time, what);
  endfunction

  logic match;
  assign match = (a_bank == JPA_BANK) && (a_sub == JPA_SUB);

  assign d_oe  = !nrd && !niosel && match && nreset;
  always_comb begin
    unique case (a)
      4'h0:    d_out = d_oe ? adc0 : 16'h0000;
      4'h1:    d_out = d_oe ? adc1 : 16'h0000;
      4'h4:    d_out = d_oe ? {8'h00, fs} : 16'h0000;
      4'h5:    d_out = d_oe ? {8'h00, cfg} : 16'h0000;
      default: d_out = 16'h0000;
    endcase
  end

  // previous-clock copies of the bus, for edge detection and timing checks
  logic       p_niosel = 1'b1, p_nrd = 1'b1, p_nwr = 1'b1, p_nreset = 1'b1;
  logic [3:0] p_a = '0;
  int unsigned sel_cnt = 0, strobe_cnt = 0, since_strobe = 0, idle_cnt = 100;
  logic       strobe_seen = 1'b0;
  logic       seen_high = 1'b0;
  int unsigned clocks = 0;

  initial begin
    adc0 = '0; adc1 = '0; dac0_reg = '0; dac1_reg = '0; dac0 = '0; dac1 = '0;
    fs = '0; cfg = '0; nint0 = 1'b1;
  end

  always @(posedge busclk) begin
    // ---------------- reset
    // a pulse already under way at the first clock (power-up) is not checked
    if (nreset) seen_high = 1'b1;
    if (!nreset) begin
      if (seen_high) reset_len = reset_len + 1;
      adc0 <= '0; adc1 <= '0; dac0_reg <= '0; dac1_reg <= '0;
      fs <= '0; cfg <= '0;
    end else if (!p_nreset && reset_len != 0) begin
      reset_pulses   = reset_pulses + 1;
      last_reset_len = reset_len;
      if (reset_len < MIN_RESET) err("reset pulse shorter than minimum");
      reset_len = 0;
    end

    // ---------------- timing checks (from the third clock: the host's state before
    // its own reset is undefined)
    if (clocks < 2) clocks = clocks + 1;
    else begin
    if ((!nrd || !nwr) && niosel) err("strobe outside nIOSEL");
    if (!nrd && !nwr) err("nRD and nWR both low");
    if (!niosel) begin
      if (p_niosel) begin
        // nIOSEL falls: address must have been set one clock earlier, idle before
        if (a != p_a || idle_cnt < 1) err("address not set one clock before nIOSEL / no idle clock");
        sel_cnt = 0; strobe_seen = 1'b0;
      end
      if (a != p_a && !p_niosel) err("address changed while selected");
      sel_cnt = sel_cnt + 1;
      if ((!nrd || !nwr) && p_nrd && p_nwr) begin
        if (sel_cnt != 2) err("setup between nIOSEL and strobe is not one clock");  // one clock of setup
        strobe_cnt = 0;
        strobe_seen = 1'b1;
      end
      if (!nrd || !nwr) strobe_cnt = strobe_cnt + 1;
      idle_cnt = 0;
    end else begin
      if (!p_niosel) begin
        // nIOSEL rises: strobe must have ended exactly one clock earlier
        if (!strobe_seen || since_strobe != 1) err("nIOSEL did not rise one clock after the strobe");
      end
      idle_cnt = idle_cnt + 1;
    end
    if (nrd && nwr && (!p_nrd || !p_nwr)) begin
      if (strobe_cnt != STROBE) err("strobe length wrong");
      since_strobe = 0;
    end
    if (nrd && nwr) since_strobe = since_strobe + 1;
    end

    // ---------------- register access
    if (nreset && !niosel && nrd && !p_nrd) begin
      if (match) reads = reads + 1; else ignored = ignored + 1;
    end
    if (nreset && !niosel && nwr && !p_nwr) begin
      if (!match) ignored = ignored + 1;
      else begin
        writes = writes + 1;
        unique case (a)
          4'h0: begin
            dac0_reg <= d_in; dac0_writes = dac0_writes + 1;
            if (cfg[2:0] == 3'b000) begin dac0 <= d_in; dac_updates = dac_updates + 1; end
            else deferred_dac0 = deferred_dac0 + 1;
          end
          4'h1: begin
            dac1_reg <= d_in; dac1_writes = dac1_writes + 1;
            dac1 <= d_in; dac_updates = dac_updates + 1;
            if (cfg[2:0] == 3'b001) dac0 <= dac0_reg;
          end
          4'h4: begin fs <= d_in[7:0]; fs_writes = fs_writes + 1; end
          4'h5: begin cfg <= d_in[7:0]; cfg_writes = cfg_writes + 1; end
          default: ;
        endcase
      end
    end

    // ---------------- conversion and interrupt
    if (int_cnt != 0) begin
      int_cnt = int_cnt - 1;
      if (int_cnt == 0) nint0 <= 1'b1;
    end
    if (convert && nreset) begin
      adc0 <= adc0_in;
      adc1 <= adc1_in;
      if (cfg[4:3] == 2'b01) begin
        nint0 <= 1'b0;
        int_cnt = INT_LOW;
        interrupts = interrupts + 1;
      end
    end

        p_niosel = niosel; p_nrd = nrd; p_nwr = nwr; p_nreset = nreset; p_a = a;
  end

endmodule
