// adda16_bus_fsm: Moore state machine that drives the ADDA16 converter board's
// asynchronous 16-bit bus from the FPGA clock.
//
// After reset it first holds nRESET low for RESET_CYCLES clocks (10 ms at 100 MHz,
// the board's minimum reset time, also the length observed on the original
// system), then waits in IDLE for a command. Each command runs one bus cycle with
// the timing of the C6713 external memory interface the board was designed for
// (setup 1, strobe 2, hold 1, turnaround 1):
//
//   ADDR    A3..A0 take the register address (nIOSEL, nRD, nWR high)
//   SEL     nIOSEL low
//   STROBE  nRD or nWR low for STROBE_CYCLES clocks; on the clock edge that ends
//           the strobe a read captures D15..D0 into rd_data
//   HOLD    strobe high, nIOSEL still low
//   TURN    nIOSEL high, address back to 0x0, one clock of turnaround
//
// so one access occupies 6 clocks plus the IDLE clock in which the next command is
// accepted. All bus outputs are decoded from the state register only (Moore).
// BUSCLK is the FPGA clock itself, forwarded to the board.
//
// Interface: cmd_valid/cmd_ready handshake (a command is taken when both are high);
// done pulses for one clock at the end of TURN; rd_valid pulses when rd_data is
// updated. The data bus is split in the FPGA I/O-buffer style: d_o is driven onto
// the pins when d_t is 0, d_i is what the pins carry. rnw is 1 except during a
// write access; an external bus driver uses it to choose the data direction.
// Address lines A18..A16 and A5..A4 must match the board's address jumpers; the
// original system tied them with resistors, here they are driven from the JPA_BANK
// and JPA_SUB parameters. Following the observed bus traces, the address is only
// driven during an access (the document's FPGA core instead drives it straight from
// the software register; the timing seen by the board is the same).
module adda16_bus_fsm
  import adda16_pkg::*;
#(
  parameter int unsigned RESET_CYCLES  = 1_000_000,  // nRESET low time in clocks
  parameter int unsigned STROBE_CYCLES = 2,          // nRD/nWR low time in clocks
  parameter logic [2:0]  JPA_BANK      = 3'b100,     // A18..A16 (JPA18 closed)
  parameter logic [1:0]  JPA_SUB       = 2'b00       // A5..A4
) (
  input  logic        clk,
  input  logic        rst,          // synchronous, active high

  // command side
  input  logic        cmd_valid,
  input  adda16_cmd_t cmd,
  output logic        cmd_ready,
  output logic        busy,
  output logic        done,
  output logic [15:0] rd_data,
  output logic        rd_valid,
  output logic        reset_active, // nRESET is being held low

  // ADDA16 bus pins
  output logic        busclk,
  output logic        nreset,
  output logic        niosel,
  output logic        nrd,
  output logic        nwr,
  output logic [3:0]  a,            // A3..A0
  output logic [1:0]  a_sub,        // A5..A4
  output logic [2:0]  a_bank,       // A18..A16
  output logic [15:0] d_o,
  output logic        d_t,          // 1: FPGA releases D15..D0
  input  logic [15:0] d_i,
  output logic        rnw
);

  typedef enum logic [2:0] {
    ST_INIT, ST_RESET, ST_IDLE, ST_ADDR, ST_SEL, ST_STROBE, ST_HOLD, ST_TURN
  } state_t;

  localparam int CW = $clog2(RESET_CYCLES + 1) > $clog2(STROBE_CYCLES + 1)
                    ? $clog2(RESET_CYCLES + 1) : $clog2(STROBE_CYCLES + 1);

  state_t      state, next_state;
  logic [CW-1:0] cnt;
  adda16_cmd_t cur;

  // NEXT_STATE_DECODE
  always_comb begin
    next_state = state;
    unique case (state)
      ST_INIT:   next_state = ST_RESET;
      ST_RESET:  if (cnt == CW'(RESET_CYCLES - 1)) next_state = ST_IDLE;
      ST_IDLE:   if (cmd_valid) next_state = ST_ADDR;
      ST_ADDR:   next_state = ST_SEL;
      ST_SEL:    next_state = ST_STROBE;
      ST_STROBE: if (cnt == CW'(STROBE_CYCLES - 1)) next_state = ST_HOLD;
      ST_HOLD:   next_state = ST_TURN;
      ST_TURN:   next_state = ST_IDLE;
      default:   next_state = ST_INIT;
    endcase
  end

  // SYNC_PROC
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_INIT;
      cnt      <= '0;
      cur      <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      state    <= next_state;
      rd_valid <= 1'b0;
      if (next_state != state) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
      if (state == ST_IDLE && cmd_valid) cur <= cmd;
      if (state == ST_STROBE && next_state == ST_HOLD && cur.rd) begin
        rd_data  <= d_i;
        rd_valid <= 1'b1;
      end
    end
  end

  // OUTPUT_DECODE
  logic in_access, in_select;
  assign in_access = state inside {ST_ADDR, ST_SEL, ST_STROBE, ST_HOLD};
  assign in_select = state inside {ST_SEL, ST_STROBE, ST_HOLD};

  assign busclk       = clk;
  assign nreset       = (state != ST_RESET);
  assign reset_active = (state == ST_RESET);
  assign niosel       = !in_select;
  assign nrd          = !(state == ST_STROBE && cur.rd);
  assign nwr          = !(state == ST_STROBE && !cur.rd);
  assign a            = in_access ? cur.addr : 4'h0;
  assign a_sub        = JPA_SUB;
  assign a_bank       = JPA_BANK;
  assign d_o          = (in_access && !cur.rd) ? cur.data : 16'h0000;
  assign d_t          = !(in_access && !cur.rd);
  assign rnw          = !(in_access && !cur.rd);

  assign cmd_ready = (state == ST_IDLE);
  assign busy      = (state != ST_IDLE);
  assign done      = (state == ST_TURN);

  // A strobe is only ever asserted inside a selected cycle, and never both at once.
  a_strobe_in_select: assert property (@(posedge clk) disable iff (rst)
    (!nrd || !nwr) |-> !niosel);
  a_one_strobe: assert property (@(posedge clk) disable iff (rst) !(!nrd && !nwr));

endmodule
