// am_receiver_top: AM short-wave receiver back end around the ADDA16 converter board,
// and beside it the stand-alone CPLD board exerciser.
//
// Receiver: the tuner delivers an AM signal on a 455 kHz intermediate frequency to
// ADC0 of the board, which samples it at 140 kHz from an external clock and pulls
// nINT0 low when a conversion is ready. receiver_isr reacts to each interrupt: it
// reads ADC0 through the own core (adda16_user_logic, whose bus state machine
// produces the board's nIOSEL/nRD/nWR cycles), builds the cosine and sine channels
// by delayed quadrature sampling with decimation by 4, demodulates every 4th sample
// as u_NF = 2*sqrt(re^2 + im^2) - 1 and writes the result to DAC0 and DAC1, which
// feed the loudspeaker. The FPGA pins reach the board through cpld_bus_driver, the
// level-shifting bus driver whose data direction follows RnW.
//
// Stand-alone exerciser: cpld_ramp_init, with its own set of board pins, resets and
// initialises a second board and writes a ramp to its DACs.
//
// Ports: clk is the 100 MHz system clock (also BUSCLK of both boards); rst is
// synchronous and active high. rx_* are the receiver's board pins, with the
// bidirectional data bus split into rx_d_out/rx_d_oe (towards the board) and
// rx_d_in (from the board). ramp_* are the exerciser's pins. The remaining outputs
// are status: initialisation finished, the audio sample stream, served and missed
// interrupts, and the bus-timeout suppression flag of the own core.
//
// Some outputs are constant or copies of an input on purpose: the upper address
// lines (a_sub, a_bank) carry the fixed jumper setting of each board, busclk is the
// system clock forwarded, and ramp_nrd stays high because the exerciser only writes.
module am_receiver_top
  import adda16_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 1_000_000,  // 10 ms at 100 MHz
  parameter int unsigned ACK_DELAY    = 5,
  parameter int unsigned TOUT_BIT     = 26
) (
  input  logic        clk,
  input  logic        rst,

  // receiver: ADDA16 board pins
  output logic        rx_busclk,
  output logic        rx_nreset,
  output logic        rx_niosel,
  output logic        rx_nrd,
  output logic        rx_nwr,
  output logic [3:0]  rx_a,
  output logic [1:0]  rx_a_sub,
  output logic [2:0]  rx_a_bank,
  output logic [15:0] rx_d_out,
  output logic        rx_d_oe,
  input  logic [15:0] rx_d_in,
  input  logic        rx_nint0,

  // receiver status
  output logic        rx_init_done,
  output logic        rx_reset_active,
  output logic        rx_audio_valid,
  output logic [15:0] rx_audio,
  output logic        rx_audio_saturated,
  output logic [15:0] rx_isr_count,
  output logic [15:0] rx_missed_irqs,
  output logic        rx_tout_sup,

  // stand-alone exerciser: ADDA16 board pins and status
  output logic        ramp_busclk,
  output logic        ramp_nreset,
  output logic        ramp_niosel,
  output logic        ramp_nrd,
  output logic        ramp_nwr,
  output logic [3:0]  ramp_a,
  output logic [1:0]  ramp_a_sub,
  output logic [2:0]  ramp_a_bank,
  output logic [15:0] ramp_d,
  output logic [15:0] ramp_value,
  output logic [31:0] ramp_writes
);

  // IPIC between sequencer and own core
  logic [31:0] b2ip_data, ip2b_data;
  logic [3:0]  b2ip_be;
  logic [1:0]  b2ip_rdce, b2ip_wrce;
  logic        ip2b_wrack, ip2b_rdack, ip2b_intr;

  // FPGA pins of the own core
  logic        f_busclk, f_nreset, f_niosel, f_nrd, f_nwr, f_d_t, f_rnw;
  logic [3:0]  f_a;
  logic [1:0]  f_a_sub;
  logic [2:0]  f_a_bank;
  logic [15:0] f_d_o, f_d_i;
  logic        drv_f_oe;
  logic [15:0] drv_f_out;
  logic signed [15:0] audio_s;

  receiver_isr u_isr (
    .clk(clk), .rst(rst),
    .Bus2IP_Data(b2ip_data), .Bus2IP_BE(b2ip_be),
    .Bus2IP_RdCE(b2ip_rdce), .Bus2IP_WrCE(b2ip_wrce),
    .IP2Bus_Data(ip2b_data), .IP2Bus_WrAck(ip2b_wrack), .IP2Bus_RdAck(ip2b_rdack),
    .IP2Bus_IntrEvent(ip2b_intr),
    .init_done(rx_init_done), .audio_valid(rx_audio_valid), .audio(audio_s),
    .audio_saturated(rx_audio_saturated),
    .isr_count(rx_isr_count), .missed_irqs(rx_missed_irqs)
  );
  assign rx_audio = audio_s;

  adda16_user_logic #(
    .ACK_DELAY(ACK_DELAY), .TOUT_BIT(TOUT_BIT), .RESET_CYCLES(RESET_CYCLES)
  ) u_core (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst),
    .Bus2IP_Data(b2ip_data), .Bus2IP_BE(b2ip_be),
    .Bus2IP_RdCE(b2ip_rdce), .Bus2IP_WrCE(b2ip_wrce),
    .IP2Bus_Data(ip2b_data), .IP2Bus_WrAck(ip2b_wrack), .IP2Bus_RdAck(ip2b_rdack),
    .IP2Bus_ToutSup(rx_tout_sup), .IP2Bus_IntrEvent(ip2b_intr),
    .reset_active(rx_reset_active),
    .busclk(f_busclk), .nreset(f_nreset), .niosel(f_niosel), .nrd(f_nrd), .nwr(f_nwr),
    .a(f_a), .a_sub(f_a_sub), .a_bank(f_a_bank),
    .d_o(f_d_o), .d_t(f_d_t), .d_i(f_d_i), .rnw(f_rnw),
    .nint0(rx_nint0)
  );

  // The FPGA pads drive d_o when d_t is low; the bus driver only drives the FPGA
  // side when RnW is high, which the core keeps exclusive with d_t low.
  assign f_d_i = drv_f_oe ? drv_f_out : f_d_o;

  cpld_bus_driver u_drv (
    .busclk_f(f_busclk), .nreset_f(f_nreset), .niosel_f(f_niosel),
    .nrd_f(f_nrd), .nwr_f(f_nwr), .a_f(f_a), .a_sub_f(f_a_sub), .a_bank_f(f_a_bank),
    .rnw(f_rnw), .d_f_in(f_d_t ? 16'h0000 : f_d_o),
    .d_f_out(drv_f_out), .d_f_oe(drv_f_oe),
    .busclk_a(rx_busclk), .nreset_a(rx_nreset), .niosel_a(rx_niosel),
    .nrd_a(rx_nrd), .nwr_a(rx_nwr), .a_a(rx_a), .a_sub_a(rx_a_sub), .a_bank_a(rx_a_bank),
    .d_a_in(rx_d_in), .d_a_out(rx_d_out), .d_a_oe(rx_d_oe)
  );

  cpld_ramp_init #(.RESET_CYCLES(RESET_CYCLES)) u_ramp (
    .clk(clk), .rst(rst),
    .busclk(ramp_busclk), .nreset(ramp_nreset), .niosel(ramp_niosel),
    .nrd(ramp_nrd), .nwr(ramp_nwr), .a(ramp_a), .a_sub(ramp_a_sub), .a_bank(ramp_a_bank),
    .d(ramp_d), .ramp_value(ramp_value), .ramp_writes(ramp_writes)
  );

  // The core never drives the pins while the bus driver drives them.
  a_no_contention: assert property (@(posedge clk) disable iff (rst) !(drv_f_oe && !f_d_t));

endmodule
