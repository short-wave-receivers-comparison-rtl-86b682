// am_abs_demod: baseband AM demodulation by absolute value.
//
// Once the quadrature sampler delivers the complex baseband sample (re = cosine
// channel, im = sine channel), the product demodulator reduces to the magnitude:
//     u_NF = 2 * sqrt(re^2 + im^2) - 1
// The factor 2 restores the amplitude halved by mixing, and the constant 1 removes
// the carrier's DC level from the audio. Samples are signed fixed point with W-1
// fraction bits (full scale = 1.0), so "1" is 2^(W-1); the result is saturated to
// the W-bit signed range. A carrier of amplitude 0.5 full scale and 100 % modulation
// thus spans the whole output range.
//
// How it works: one clock forms re^2 + im^2 (2W bits); an iterative bit-by-bit
// square root then produces one root bit per clock (W iterations); a last clock
// scales, subtracts and saturates. done rises W + 3 clocks after the clock edge that
// takes start (19 clocks for W = 16); start is ignored while busy. The square root is exact (floor). The formula is the
// document's; the fixed-point scaling, the saturation and the square-root method are
// this design's choices.
module am_abs_demod #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] u_nf,
  output logic                saturated   // last result was clipped
);

  localparam int IW = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_SQUARE, S_ROOT, S_OUT} state_t;

  state_t          state;
  logic [2*W-1:0]  rad;      // radicand, shifted out two bits per step
  logic [W+1:0]    rem;      // partial remainder
  logic [W-1:0]    root;
  logic [IW-1:0]   iter;
  logic signed [W-1:0] re_q, im_q;

  logic [W+3:0]    rem_sh, trial;
  assign rem_sh = {rem, rad[2*W-1 -: 2]};
  assign trial  = {2'b00, root, 2'b01};

  logic signed [2*W-1:0] re_sq, im_sq;
  assign re_sq = re_q * re_q;
  assign im_sq = im_q * im_q;

  // final scaling: 2*root - 2^(W-1), range -2^(W-1) .. 2^(W+1)
  logic signed [W+2:0] scaled;
  assign scaled = $signed({2'b00, root, 1'b0}) - $signed((W+3)'(1) <<< (W-1));

  localparam logic signed [W+2:0] MAXV = (W+3)'((1 << (W-1)) - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      rad       <= '0;
      rem       <= '0;
      root      <= '0;
      iter      <= '0;
      re_q      <= '0;
      im_q      <= '0;
      u_nf      <= '0;
      done      <= 1'b0;
      saturated <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          re_q  <= re;
          im_q  <= im;
          state <= S_SQUARE;
        end
        S_SQUARE: begin
          rad   <= unsigned'(re_sq) + unsigned'(im_sq);
          rem   <= '0;
          root  <= '0;
          iter  <= '0;
          state <= S_ROOT;
        end
        S_ROOT: begin
          rad <= rad << 2;
          if (rem_sh >= trial) begin
            rem  <= (W+2)'(rem_sh - trial);
            root <= {root[W-2:0], 1'b1};
          end else begin
            rem  <= (W+2)'(rem_sh);
            root <= {root[W-2:0], 1'b0};
          end
          iter <= iter + 1'b1;
          if (iter == IW'(W - 1)) state <= S_OUT;
        end
        S_OUT: begin
          if (scaled > MAXV) begin
            u_nf      <= W'(MAXV);
            saturated <= 1'b1;
          end else begin
            u_nf      <= W'(scaled);
            saturated <= 1'b0;
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
