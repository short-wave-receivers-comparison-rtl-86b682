// receiver_isr: the receiver's program flow as a hardware sequencer. It takes the
// place of the processor that runs the receiver program, and talks to the ADDA16
// own core (adda16_user_logic) through the same two software registers.
//
// Flow:
//   start-up   write FS = 0x00 (external sample clock) to register 0x4, then
//              CFG = 0x89 to register 0x5, as in the board's initial procedure;
//   idle       wait for the interrupt event (falling edge of nINT0, "ADC ready");
//   interrupt  read ADC0, push the sample into the quadrature buffers
//              (quad_sampler), whose counter marks every 4th sample; on the 4th
//              compute the AM demodulation (am_abs_demod) and write the result to
//              DAC0 and then DAC1 (the board updates both DACs together after the
//              DAC1 write); go back to idle.
// Each board access is one write of the command word to register 0 (acknowledged
// after the core's fixed delay) followed by a read of register 1, which the core
// acknowledges only when the access has finished; a read returns the ADC word.
//
// An interrupt that arrives while the sequencer is busy is remembered (one deep)
// and served next; a further one is counted in missed_irqs. The flow and the
// register values are the document's; running it in hardware instead of on a
// processor, the one-deep interrupt latch and the same value on both DACs are this
// design's choices.
module receiver_isr
  import adda16_pkg::*;
#(
  parameter int unsigned   W         = 16,
  parameter int unsigned   DECIM     = 4,
  parameter logic [15:0]   FS_VALUE  = FS_INIT,
  parameter logic [15:0]   CFG_VALUE = CFG_INIT
) (
  input  logic        clk,
  input  logic        rst,

  // IPIC master side towards the own core
  output logic [31:0] Bus2IP_Data,
  output logic [3:0]  Bus2IP_BE,
  output logic [1:0]  Bus2IP_RdCE,
  output logic [1:0]  Bus2IP_WrCE,
  input  logic [31:0] IP2Bus_Data,
  input  logic        IP2Bus_WrAck,
  input  logic        IP2Bus_RdAck,
  input  logic        IP2Bus_IntrEvent,

  // status / audio tap
  output logic        init_done,
  output logic        audio_valid,
  output logic signed [W-1:0] audio,
  output logic        audio_saturated,
  output logic [15:0] isr_count,     // interrupts served
  output logic [15:0] missed_irqs
);

  typedef enum logic [3:0] {
    ST_INIT_FS, ST_INIT_CFG, ST_WAIT_INT, ST_READ_ADC, ST_QUAD, ST_QCHK,
    ST_DEMOD, ST_DAC0, ST_DAC1
  } state_t;

  typedef enum logic [1:0] {P_START, P_WR, P_RD} phase_t;

  state_t state;
  phase_t phase;
  logic   irq_pending;
  logic [31:0] cmd_word;
  logic        access_done;       // register-1 read acknowledged this clock
  logic [15:0] rd_word;

  // quadrature buffers and demodulator
  logic                q_in_valid, q_out_valid;
  logic signed [W-1:0] q_in, q_cos, q_sin;   // q_in holds the last ADC0 word
  logic                d_start, d_busy, d_done, d_sat;
  logic signed [W-1:0] d_out;

  quad_sampler #(.W(W), .DECIM(DECIM)) u_quad (
    .clk(clk), .rst(rst),
    .in_valid(q_in_valid), .in_sample(q_in),
    .out_valid(q_out_valid), .out_cos(q_cos), .out_sin(q_sin)
  );

  am_abs_demod #(.W(W)) u_demod (
    .clk(clk), .rst(rst),
    .start(d_start), .re(q_cos), .im(q_sin),
    .busy(d_busy), .done(d_done), .u_nf(d_out), .saturated(d_sat)
  );

  // command word of the current step
  always_comb begin
    unique case (state)
      ST_INIT_FS:  cmd_word = word_from_cmd(1'b0, REG_FS,    FS_VALUE);
      ST_INIT_CFG: cmd_word = word_from_cmd(1'b0, REG_CFG,   CFG_VALUE);
      ST_READ_ADC: cmd_word = word_from_cmd(1'b1, REG_ADDA0, 16'h0000);
      ST_DAC0:     cmd_word = word_from_cmd(1'b0, REG_ADDA0, 16'(audio));
      ST_DAC1:     cmd_word = word_from_cmd(1'b0, REG_ADDA1, 16'(audio));
      default:     cmd_word = '0;
    endcase
  end

  assign Bus2IP_Data = cmd_word;
  assign Bus2IP_BE   = 4'hF;
  assign access_done = (phase == P_RD) && IP2Bus_RdAck;
  assign rd_word     = IP2Bus_Data[15:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= ST_INIT_FS;
      phase           <= P_START;
      Bus2IP_WrCE     <= 2'b00;
      Bus2IP_RdCE     <= 2'b00;
      irq_pending     <= 1'b0;
      init_done       <= 1'b0;
      audio_valid     <= 1'b0;
      audio           <= '0;
      audio_saturated <= 1'b0;
      isr_count       <= '0;
      missed_irqs     <= '0;
      q_in_valid      <= 1'b0;
      q_in            <= '0;
      d_start         <= 1'b0;
    end else begin
      audio_valid <= 1'b0;
      q_in_valid  <= 1'b0;
      d_start     <= 1'b0;

      // interrupt latch
      if (IP2Bus_IntrEvent) begin
        if (irq_pending && !(state == ST_WAIT_INT)) missed_irqs <= missed_irqs + 1'b1;
        irq_pending <= 1'b1;
      end

      // one board access: write command, then wait on the result register
      if (state inside {ST_INIT_FS, ST_INIT_CFG, ST_READ_ADC, ST_DAC0, ST_DAC1}) begin
        unique case (phase)
          P_START: begin
            Bus2IP_WrCE <= 2'b01;
            phase       <= P_WR;
          end
          P_WR: if (IP2Bus_WrAck) begin
            Bus2IP_WrCE <= 2'b00;
            Bus2IP_RdCE <= 2'b10;
            phase       <= P_RD;
          end
          P_RD: if (IP2Bus_RdAck) begin
            Bus2IP_RdCE <= 2'b00;
            phase       <= P_START;
          end
          default: phase <= P_START;
        endcase
      end

      unique case (state)
        ST_INIT_FS:  if (access_done) state <= ST_INIT_CFG;
        ST_INIT_CFG: if (access_done) begin
          state     <= ST_WAIT_INT;
          init_done <= 1'b1;
        end
        ST_WAIT_INT: if (irq_pending || IP2Bus_IntrEvent) begin
          irq_pending <= 1'b0;
          isr_count   <= isr_count + 1'b1;
          state       <= ST_READ_ADC;
        end
        ST_READ_ADC: if (access_done) begin
          q_in       <= W'(signed'(rd_word));
          q_in_valid <= 1'b1;
          state      <= ST_QUAD;
        end
        ST_QUAD: state <= ST_QCHK;          // quad_sampler registers the sample
        ST_QCHK: if (q_out_valid) begin
          d_start <= 1'b1;
          state   <= ST_DEMOD;
        end else begin
          state <= ST_WAIT_INT;
        end
        ST_DEMOD: if (d_done) begin
          audio           <= d_out;
          audio_saturated <= d_sat;
          audio_valid     <= 1'b1;
          state           <= ST_DAC0;
        end
        ST_DAC0: if (access_done) state <= ST_DAC1;
        ST_DAC1: if (access_done) state <= ST_WAIT_INT;
        default: state <= ST_INIT_FS;
      endcase
    end
  end

endmodule
