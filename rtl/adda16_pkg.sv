// adda16_pkg: register map, initial register values and the command word shared by
// the ADDA16 bus state machine, the own-core user logic, the receiver sequencer and
// the stand-alone CPLD initializer.
//
// The ADDA16 converter board exposes four registers on a 16-bit asynchronous bus,
// selected by address lines A3..A0: ADDA0 (read ADC0 / write DAC0) at 0x0, ADDA1
// (ADC1 / DAC1) at 0x1, the sampling frequency register FS at 0x4 and the
// configuration register CFG at 0x5. The receiver writes FS = 0x00 (sample clock
// taken from the external clock input) and CFG = 0x89 (clock output on, INT0 on
// "ADC ready", simultaneous DAC update after DAC1 is written).
//
// The command word layout (bit 20 = read request, bits 19..16 = register address,
// bits 15..0 = write data) follows the own core's software register, whose address
// field sits in bits 19..16; the read-request bit is this design's choice.
package adda16_pkg;

  // Register offsets on A3..A0.
  localparam logic [3:0] REG_ADDA0 = 4'h0;
  localparam logic [3:0] REG_ADDA1 = 4'h1;
  localparam logic [3:0] REG_FS    = 4'h4;
  localparam logic [3:0] REG_CFG   = 4'h5;

  // Values written during the initial procedure.
  localparam logic [15:0] FS_INIT  = 16'h0000;  // external sample clock
  localparam logic [15:0] CFG_INIT = 16'h0089;  // EXTCLKOUT=1, INT0=ADC ready, LDAC=001

  // CFG field positions.
  localparam int CFG_EXTCLKOUT = 7;
  localparam int CFG_INT1_LSB  = 5;
  localparam int CFG_INT0_LSB  = 3;
  localparam int CFG_LDAC_LSB  = 0;

  // Bit positions of the command word in software register 0.
  localparam int CMD_RD_BIT    = 20;
  localparam int CMD_ADDR_LSB  = 16;

  typedef struct packed {
    logic        rd;    // 1: read the register, 0: write it
    logic [3:0]  addr;  // A3..A0
    logic [15:0] data;  // write data
  } adda16_cmd_t;

  function automatic adda16_cmd_t cmd_from_word(logic [31:0] w);
    adda16_cmd_t c;
    c.rd   = w[CMD_RD_BIT];
    c.addr = w[CMD_ADDR_LSB +: 4];
    c.data = w[15:0];
    return c;
  endfunction

  function automatic logic [31:0] word_from_cmd(logic rd, logic [3:0] addr, logic [15:0] data);
    logic [31:0] w;
    w = '0;
    w[CMD_RD_BIT] = rd;
    w[CMD_ADDR_LSB +: 4] = addr;
    w[15:0] = data;
    return w;
  endfunction

endpackage
