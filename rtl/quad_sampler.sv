// quad_sampler: delayed quadrature sampling with a single converter.
//
// The band-pass AM signal is sampled at four times the output rate f_A, with f_A
// chosen so that the carrier is k* = 1 + 4m times f_A (455 kHz = 13 x 35 kHz, so the
// converter runs at 140 kHz). The carrier then advances by a quarter period between
// two converter samples, and a sample delayed by one converter period is the
// 90-degree (Hilbert) partner of the current one. The stream is split into two
// branches: the direct branch, and a branch delayed by one sample (z^-1); both are
// decimated by 4. The pair (x[4k], x[4k-1]) is the cosine and sine channel of the
// complex baseband signal at rate f_A.
//
// Interface: in_valid marks one converter sample on in_sample. A modulo-DECIM
// counter runs on the valid samples; every DECIM-th sample (counter wrap) raises
// out_valid for one clock with out_cos = that sample and out_sin = the sample
// before it. Latency one clock. The delay, the decimation factor 4 and the split
// follow the document's block diagram; the counter phase at reset (first output
// after the 4th sample) is this design's choice.
module quad_sampler #(
  parameter int unsigned W     = 16,  // sample width (converter is 16 bit)
  parameter int unsigned DECIM = 4    // decimation factor of both branches
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_sample,
  output logic                out_valid,
  output logic signed [W-1:0] out_cos,
  output logic signed [W-1:0] out_sin
);

  localparam int PW = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic signed [W-1:0] z1;      // z^-1 branch
  logic [PW-1:0]       phase;   // global sample counter modulo DECIM

  always_ff @(posedge clk) begin
    if (rst) begin
      z1        <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_cos   <= '0;
      out_sin   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        z1 <= in_sample;
        if (phase == PW'(DECIM - 1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_cos   <= in_sample;
          out_sin   <= z1;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
