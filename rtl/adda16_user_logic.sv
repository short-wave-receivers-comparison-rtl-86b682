// adda16_user_logic: the processor-facing half of the ADDA16 own core. It sits
// behind a bus-attachment interface (IPIC signals: chip enables per register,
// acknowledges, timeout suppression, interrupt event) and contains the bus state
// machine adda16_bus_fsm that talks to the converter board.
//
// Software view, two 32-bit registers:
//   reg 0 (write) command word: bit 20 read request, bits 19..16 register address
//         A3..A0, bits 15..0 data for a write. Byte enables select the bytes
//         written. Each write launches one ADDA16 bus access.
//   reg 0 (read)  the last command word.
//   reg 1 (read)  result: bits 15..0 the last word read from the board. The read is
//         acknowledged only when no access is pending or running, so reading reg 1
//         after a command both waits for it and returns its data.
//   reg 1 (write) acknowledged, no effect.
//
// Timing, as in the document's core: a write is acknowledged ACK_DELAY clocks after
// the one-clock write-detect pulse (the document's counter "count_5" runs 1..5 and
// acknowledges at 5, then stops). Every write detect also clears a free-running
// timeout counter; while its bit TOUT_BIT is 0 the core asserts IP2Bus_ToutSup,
// holding off the bus timeout during the long waits (the 10 ms board reset above
// all). With TOUT_BIT = 26 at 100 MHz that is 0.67 s. The board's active-low
// interrupt line nINT0 is synchronised and its falling edge raises IP2Bus_IntrEvent
// for one clock.
//
// The register layout's read-request bit, the reg-1 read hand-off and the reg-1
// write behaviour are this design's choices; the document gives the register count,
// the address field, the acknowledge counter and the timeout counter.
module adda16_user_logic
  import adda16_pkg::*;
#(
  parameter int unsigned ACK_DELAY     = 5,
  parameter int unsigned TOUT_BIT      = 26,
  parameter int unsigned RESET_CYCLES  = 1_000_000,
  parameter int unsigned STROBE_CYCLES = 2,
  parameter logic [2:0]  JPA_BANK      = 3'b100,
  parameter logic [1:0]  JPA_SUB       = 2'b00
) (
  // IPIC side
  input  logic        Bus2IP_Clk,
  input  logic        Bus2IP_Reset,
  input  logic [31:0] Bus2IP_Data,
  input  logic [3:0]  Bus2IP_BE,
  input  logic [1:0]  Bus2IP_RdCE,
  input  logic [1:0]  Bus2IP_WrCE,
  output logic [31:0] IP2Bus_Data,
  output logic        IP2Bus_WrAck,
  output logic        IP2Bus_RdAck,
  output logic        IP2Bus_ToutSup,
  output logic        IP2Bus_IntrEvent,
  output logic        reset_active,

  // ADDA16 bus pins
  output logic        busclk,
  output logic        nreset,
  output logic        niosel,
  output logic        nrd,
  output logic        nwr,
  output logic [3:0]  a,
  output logic [1:0]  a_sub,
  output logic [2:0]  a_bank,
  output logic [15:0] d_o,
  output logic        d_t,
  input  logic [15:0] d_i,
  output logic        rnw,
  input  logic        nint0
);

  localparam int AW = $clog2(ACK_DELAY + 2);

  logic        clk, rst;
  assign clk = Bus2IP_Clk;
  assign rst = Bus2IP_Reset;

  logic [31:0] slv_reg0;
  logic [15:0] slv_reg1;
  logic        wr_seen;         // reg-0 write already detected for this WrCE
  logic        slv_ack_detect;  // one clock at the start of a reg-0 write
  logic [AW-1:0] count_ack;
  logic        pending;
  logic [TOUT_BIT:0] timeout;
  logic [2:0]  int_sync;
  logic        wr1_ack, rd_ack;

  logic        fsm_ready, fsm_busy, fsm_done, fsm_rd_valid;
  logic [15:0] fsm_rd_data;

  assign slv_ack_detect = Bus2IP_WrCE[0] && !wr_seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      slv_reg0  <= '0;
      slv_reg1  <= '0;
      wr_seen   <= 1'b0;
      count_ack <= '0;
      pending   <= 1'b0;
      wr1_ack   <= 1'b0;
      rd_ack    <= 1'b0;
    end else begin
      // write detect and byte-wise register update
      if (!Bus2IP_WrCE[0]) wr_seen <= 1'b0;
      else                 wr_seen <= 1'b1;
      if (slv_ack_detect)
        for (int b = 0; b < 4; b++)
          if (Bus2IP_BE[b]) slv_reg0[b*8 +: 8] <= Bus2IP_Data[b*8 +: 8];

      // acknowledge counter: 1 on detect, counts to ACK_DELAY+1 and stops
      if (slv_ack_detect)                       count_ack <= AW'(1);
      else if (count_ack != '0 && count_ack <= AW'(ACK_DELAY)) count_ack <= count_ack + 1'b1;

      // hand the command to the bus state machine
      if (slv_ack_detect)                     pending <= 1'b1;
      else if (pending && fsm_ready)          pending <= 1'b0;

      if (fsm_rd_valid) slv_reg1 <= fsm_rd_data;

      wr1_ack <= Bus2IP_WrCE[1] && !wr1_ack;
      rd_ack  <= !rd_ack && (Bus2IP_RdCE[0] ||
                             (Bus2IP_RdCE[1] && !pending && !fsm_busy && !slv_ack_detect));
    end
  end

  assign IP2Bus_WrAck = (count_ack == AW'(ACK_DELAY)) || wr1_ack;
  assign IP2Bus_RdAck = rd_ack;
  assign IP2Bus_Data  = Bus2IP_RdCE[0] ? slv_reg0 : {16'h0000, slv_reg1};

  // timeout suppression counter
  always_ff @(posedge clk) begin
    if (rst || slv_ack_detect) timeout <= '0;
    else                       timeout <= timeout + 1'b1;
  end
  assign IP2Bus_ToutSup = !timeout[TOUT_BIT];

  // interrupt: falling edge of nINT0 after a two-flop synchroniser
  always_ff @(posedge clk) begin
    if (rst) int_sync <= 3'b111;
    else     int_sync <= {int_sync[1:0], nint0};
  end
  assign IP2Bus_IntrEvent = int_sync[2] && !int_sync[1];

  adda16_bus_fsm #(
    .RESET_CYCLES (RESET_CYCLES),
    .STROBE_CYCLES(STROBE_CYCLES),
    .JPA_BANK     (JPA_BANK),
    .JPA_SUB      (JPA_SUB)
  ) u_fsm (
    .clk         (clk),
    .rst         (rst),
    .cmd_valid   (pending),
    .cmd         (cmd_from_word(slv_reg0)),
    .cmd_ready   (fsm_ready),
    .busy        (fsm_busy),
    .done        (fsm_done),
    .rd_data     (fsm_rd_data),
    .rd_valid    (fsm_rd_valid),
    .reset_active(reset_active),
    .busclk      (busclk),
    .nreset      (nreset),
    .niosel      (niosel),
    .nrd         (nrd),
    .nwr         (nwr),
    .a           (a),
    .a_sub       (a_sub),
    .a_bank      (a_bank),
    .d_o         (d_o),
    .d_t         (d_t),
    .d_i         (d_i),
    .rnw         (rnw)
  );

endmodule
