// cpld_ramp_init: stand-alone ADDA16 exerciser for a CPLD, with no processor.
//
// It reuses the bus state machine of the FPGA core (adda16_bus_fsm) and replaces
// the processor with a small loop: after the board reset (nRESET low for
// RESET_CYCLES clocks) it writes FS = 0x00 to register 0x4 and CFG = 0x89 to
// register 0x5, then runs forever writing a counter i to DAC0 and DAC1 and adding
// RAMP_STEP to i after each pair. The board updates both DACs together after the
// DAC1 write, so a sawtooth (ramp) appears on the analog output. The data bus is
// output-only here: reads are never issued, so D15..D0 are always driven.
//
// Interface: board pins as in adda16_bus_fsm without d_i/d_t/rnw; ramp_value is the
// current i and ramp_writes counts the DAC pairs written. One DAC pair takes two
// bus accesses (7 clocks each with the default strobe). The loop, the counter and the
// output-only bus are the document's; writing i to both DACs and the step size are
// this design's choices.
module cpld_ramp_init
  import adda16_pkg::*;
#(
  parameter int unsigned RESET_CYCLES  = 1_000_000,
  parameter int unsigned STROBE_CYCLES = 2,
  parameter logic [2:0]  JPA_BANK      = 3'b100,
  parameter logic [1:0]  JPA_SUB       = 2'b00,
  parameter logic [15:0] RAMP_STEP     = 16'd1
) (
  input  logic        clk,
  input  logic        rst,
  output logic        busclk,
  output logic        nreset,
  output logic        niosel,
  output logic        nrd,
  output logic        nwr,
  output logic [3:0]  a,
  output logic [1:0]  a_sub,
  output logic [2:0]  a_bank,
  output logic [15:0] d,
  output logic [15:0] ramp_value,
  output logic [31:0] ramp_writes
);

  typedef enum logic [1:0] {Q_FS, Q_CFG, Q_DAC0, Q_DAC1} step_t;

  step_t       step;
  adda16_cmd_t cmd;
  logic        cmd_ready, fsm_busy, fsm_done, fsm_rd_valid, fsm_reset, fsm_d_t, fsm_rnw;
  logic [15:0] fsm_rd_data;

  always_comb begin
    cmd = '0;
    unique case (step)
      Q_FS:    begin cmd.addr = REG_FS;    cmd.data = FS_INIT;    end
      Q_CFG:   begin cmd.addr = REG_CFG;   cmd.data = CFG_INIT;   end
      Q_DAC0:  begin cmd.addr = REG_ADDA0; cmd.data = ramp_value; end
      default: begin cmd.addr = REG_ADDA1; cmd.data = ramp_value; end
    endcase
  end

  // advance when the state machine takes the command
  always_ff @(posedge clk) begin
    if (rst) begin
      step        <= Q_FS;
      ramp_value  <= '0;
      ramp_writes <= '0;
    end else if (cmd_ready) begin
      unique case (step)
        Q_FS:   step <= Q_CFG;
        Q_CFG:  step <= Q_DAC0;
        Q_DAC0: step <= Q_DAC1;
        default: begin
          step        <= Q_DAC0;
          ramp_value  <= ramp_value + RAMP_STEP;
          ramp_writes <= ramp_writes + 1'b1;
        end
      endcase
    end
  end

  adda16_bus_fsm #(
    .RESET_CYCLES (RESET_CYCLES),
    .STROBE_CYCLES(STROBE_CYCLES),
    .JPA_BANK     (JPA_BANK),
    .JPA_SUB      (JPA_SUB)
  ) u_fsm (
    .clk(clk), .rst(rst),
    .cmd_valid(1'b1), .cmd(cmd), .cmd_ready(cmd_ready),
    .busy(fsm_busy), .done(fsm_done),
    .rd_data(fsm_rd_data), .rd_valid(fsm_rd_valid), .reset_active(fsm_reset),
    .busclk(busclk), .nreset(nreset), .niosel(niosel), .nrd(nrd), .nwr(nwr),
    .a(a), .a_sub(a_sub), .a_bank(a_bank),
    .d_o(d), .d_t(fsm_d_t), .d_i(16'h0000), .rnw(fsm_rnw)
  );

endmodule
