// fft_core: in-place radix-2 FFT/IFFT engine with its own N-sample buffer.
//
// The buffer holds one line of N complex samples. While the engine is idle
// the owner loads and unloads it through the external port (one registered
// read and one write per cycle). A start pulse runs log2(N) Cooley-Tukey
// butterfly stages over the buffer, one butterfly per clock:
//   * forward (inverse=0): decimation in frequency, natural-order input,
//     bit-reversed output, no scaling (the output is the plain DFT sum);
//   * inverse (inverse=1): decimation in time, bit-reversed input,
//     natural-order output, each stage halves (the output is the IDFT with
//     its 1/N).
// Running forward and then inverse therefore needs no reordering pass: a
// pointwise product done between them simply works in bit-reversed order.
// Every butterfly output is rounded and saturated to 32 bits.
//
// Timing: each stage issues N/2 butterflies and then drains the 3-cycle
// read-compute-write pipeline, so a transform takes log2(N)*(N/2+3) cycles
// from start to done (done is a one-cycle pulse).
//
// The use of a Cooley-Tukey FFT follows the accelerator description; the
// radix, the fixed-point scaling, the twiddle format (Q1.16 in 18 bits) and
// the ordering scheme are this design's choices.
module fft_core
  import sar_pkg::*;
#(
  parameter int unsigned N = 8192          // transform length, power of two
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,        // pulse, accepted when idle
  input  logic                 inverse,      // 0 = forward DIF, 1 = inverse DIT
  output logic                 busy,
  output logic                 done,         // one-cycle pulse
  // external buffer port, used only while idle
  input  logic [$clog2(N)-1:0] ext_raddr,
  output cplx_t                ext_rdata,    // valid one cycle after ext_raddr
  input  logic                 ext_we,
  input  logic [$clog2(N)-1:0] ext_waddr,
  input  cplx_t                ext_wdata
);

  localparam int unsigned L  = $clog2(N);
  localparam int unsigned AW = L;

  // ---------------------------------------------------------------- buffer
  cplx_t             mem [N];
  logic [AW-1:0]     ra0, ra1, wa0, wa1;
  logic              we0, we1;
  cplx_t             wd0, wd1, rd0, rd1;

  always_ff @(posedge clk) begin
    if (we0) mem[wa0] <= wd0;
    if (we1) mem[wa1] <= wd1;
    rd0 <= mem[ra0];
    rd1 <= mem[ra1];
  end

  assign ext_rdata = rd0;

  // ---------------------------------------------------------- twiddle ROM
  // W[k] = cos(2*pi*k/N) - j*sin(2*pi*k/N), k < N/2, in Q1.16.
  logic signed [TW_W-1:0] tw_cos [N/2];
  logic signed [TW_W-1:0] tw_sin [N/2];

  initial begin
    for (int k = 0; k < N/2; k++) begin
      tw_cos[k] = TW_W'($rtoi($floor(65536.0 * $cos(2.0 * 3.14159265358979323846 * k / N) + 0.5)));
      tw_sin[k] = TW_W'($rtoi($floor(65536.0 * $sin(2.0 * 3.14159265358979323846 * k / N) + 0.5)));
    end
  end

  logic [AW-2:0]          tw_addr;
  logic signed [TW_W-1:0] twc_q, tws_q;
  always_ff @(posedge clk) begin
    twc_q <= tw_cos[tw_addr];
    tws_q <= tw_sin[tw_addr];
  end

  // ------------------------------------------------------------- control
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t            state;
  logic              inv_q;
  logic [$clog2(L+1)-1:0] stage;
  logic [AW-1:0]     bfly;           // butterfly counter, 0 .. N/2 (MSB = end)
  logic              issue;

  // stage-dependent geometry: lh = log2(half distance)
  logic [$clog2(L+1)-1:0] lh;
  logic [AW-1:0]     half, j, i0;
  logic [AW-2:0]     b_low;

  always_comb begin
    lh    = inv_q ? stage : ($clog2(L+1))'(L - 1) - stage;
    half  = AW'(1) << lh;
    b_low = bfly[AW-2:0];
    j     = AW'(b_low) & (half - AW'(1));
    i0    = ((AW'(b_low) >> lh) << (lh + 1)) | j;
    // twiddle exponent: forward j*2^stage, inverse j*2^(L-1-stage)
    tw_addr = inv_q ? (AW-1)'(j << (($clog2(L+1))'(L - 1) - stage))
                    : (AW-1)'(j << stage);
  end

  assign issue = (state == S_RUN);

  // pipeline registers
  logic          p1_v, p2_v;
  logic [AW-1:0] p1_i0, p1_i1, p2_i0, p2_i1;
  cplx_t         p2_a, p2_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      stage <= '0;
      bfly  <= '0;
      inv_q <= 1'b0;
      done  <= 1'b0;
      p1_v  <= 1'b0;
      p2_v  <= 1'b0;
      p1_i0 <= '0;
      p1_i1 <= '0;
    end else begin
      done <= 1'b0;
      p1_v <= issue;
      p2_v <= p1_v;
      p1_i0 <= i0;
      p1_i1 <= i0 | half;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          inv_q <= inverse;
          stage <= '0;
          bfly  <= '0;
        end
        S_RUN: begin
          if (bfly == AW'(N/2 - 1)) begin
            state <= S_DRAIN;
            bfly  <= '0;
          end else begin
            bfly <= bfly + AW'(1);
          end
        end
        S_DRAIN: if (!p1_v && !p2_v) begin
          if (stage == ($clog2(L+1))'(L - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ------------------------------------------------------------ butterfly
  // forward DIF: a' = a + b,          b' = (a - b) * W
  // inverse DIT: a' = (a + b*W') / 2, b' = (a - b*W') / 2,  W' = conj(W)
  logic signed [71:0] sr, si, dr, di, mr, mi, tr, ti;
  always_comb begin
    // forward path
    sr = 72'(rd0.re) + 72'(rd1.re);
    si = 72'(rd0.im) + 72'(rd1.im);
    dr = 72'(rd0.re) - 72'(rd1.re);
    di = 72'(rd0.im) - 72'(rd1.im);
    // (dr + j di)(c - j s) = dr*c + di*s + j(di*c - dr*s)
    mr = dr * 72'(twc_q) + di * 72'(tws_q);
    mi = di * 72'(twc_q) - dr * 72'(tws_q);
    // inverse path: t = b * (c + j s) = br*c - bi*s + j(bi*c + br*s), in Q.16
    tr = 72'(rd1.re) * 72'(twc_q) - 72'(rd1.im) * 72'(tws_q);
    ti = 72'(rd1.im) * 72'(twc_q) + 72'(rd1.re) * 72'(tws_q);
  end

  always_ff @(posedge clk) begin
    p2_i0 <= p1_i0;
    p2_i1 <= p1_i1;
    if (!inv_q) begin
      p2_a.re <= rnd_sat(sr, 0);
      p2_a.im <= rnd_sat(si, 0);
      p2_b.re <= rnd_sat(mr, TW_FRAC);
      p2_b.im <= rnd_sat(mi, TW_FRAC);
    end else begin
      p2_a.re <= rnd_sat((72'(rd0.re) <<< TW_FRAC) + tr, TW_FRAC + 1);
      p2_a.im <= rnd_sat((72'(rd0.im) <<< TW_FRAC) + ti, TW_FRAC + 1);
      p2_b.re <= rnd_sat((72'(rd0.re) <<< TW_FRAC) - tr, TW_FRAC + 1);
      p2_b.im <= rnd_sat((72'(rd0.im) <<< TW_FRAC) - ti, TW_FRAC + 1);
    end
  end

  // ---------------------------------------------------------- port muxing
  always_comb begin
    if (busy) begin
      ra0 = i0;
      ra1 = i0 | half;
      we0 = p2_v;
      we1 = p2_v;
      wa0 = p2_i0;
      wa1 = p2_i1;
      wd0 = p2_a;
      wd1 = p2_b;
    end else begin
      ra0 = ext_raddr;
      ra1 = '0;
      we0 = ext_we;
      we1 = 1'b0;
      wa0 = ext_waddr;
      wa1 = '0;
      wd0 = ext_wdata;
      wd1 = '0;
    end
  end

  // the owner must not use the external port while a transform runs
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !ext_we)
    else $error("fft_core: external write while busy");

endmodule
