// rcac_core: range / azimuth compression accelerator (RCAC).
//
// One core does the matched filtering of the range-Doppler algorithm in
// both directions; only the reference function it is given differs. For
// each line of N complex samples it:
//   1. reads the line from memory over AXI4 bursts into the FFT buffer,
//   2. transforms it (forward FFT, result in bit-reversed order),
//   3. multiplies every bin by the conjugate of the reference spectrum,
//   4. transforms back (inverse FFT, result in natural order),
//   5. writes the line back to the same address.
// The reference spectrum (N samples, already in the frequency domain, as
// produced by the host) is read once per run into a local buffer, stored
// at bit-reversed addresses so that step 3 walks both buffers in step.
// The host splits a segment between several cores by giving each a range
// of lines.
//
// Control (AXI-Lite, see ha_ctrl_regs): argument 0 DATA_PTR (byte address
// of line 0), 1 RG_REF_PTR, 2 AZ_REF_PTR, 3 MODE (bit0: 0 range
// compression, uses RG_REF_PTR; 1 azimuth compression, uses AZ_REF_PTR),
// 4 FIRST_LINE, 5 NUM_LINES. Line k sits at DATA_PTR + k*N*8.
// Memory: one AXI4 master, 64-bit, one sample per beat.
//
// Timing per line: N read beats, log2(N)*(N/2+3) cycles of FFT, N+2 cycles
// of multiplication, log2(N)*(N/2+3) cycles of IFFT and N write beats, plus
// memory latency; the stages run one after the other.
//
// The line-by-line in-place flow, the conjugate reference multiply and the
// range/azimuth mode follow the accelerator description. The fixed-point
// formats (32-bit I/Q samples, Q15.16 reference), the bit-reversed
// ordering and the register layout are this design's choices.
module rcac_core
  import sar_pkg::*;
#(
  parameter int unsigned N = 8192          // line length (FFT size)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_ctrl_req,
  output axil_resp_t s_ctrl_resp,
  output axi_req_t   m_axi_req,
  input  axi_resp_t  m_axi_resp,
  output logic       irq            // done level
);

  localparam int unsigned L = $clog2(N);

  function automatic logic [L-1:0] bitrev(input logic [L-1:0] v);
    for (int i = 0; i < L; i++) bitrev[i] = v[L-1-i];
  endfunction

  // ------------------------------------------------------------- control
  logic [31:0] args [HA_NARGS];
  logic        start, busy, finish;

  ha_ctrl_regs #(.NARGS(HA_NARGS)) u_regs (
    .clk, .rst_n,
    .s_req (s_ctrl_req),
    .s_resp(s_ctrl_resp),
    .args,
    .start,
    .busy,
    .finish,
    .done  (irq)
  );

  wire [ADDR_W-1:0] data_ptr   = args[0];
  wire [ADDR_W-1:0] rg_ref_ptr = args[1];
  wire [ADDR_W-1:0] az_ref_ptr = args[2];
  wire              mode_az    = args[3][0];
  wire [31:0]       first_line = args[4];
  wire [31:0]       num_lines  = args[5];

  // ----------------------------------------------------------------- DMA
  logic              rd_start, rd_busy, rd_valid, rd_ready;
  logic              wr_start, wr_busy, wr_done, wr_valid, wr_ready;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  cplx_t             rd_data, wr_data;

  axi_dma u_dma (
    .clk, .rst_n,
    .rd_start, .rd_addr, .rd_count(32'(N)), .rd_busy, .rd_valid, .rd_data, .rd_ready,
    .wr_start, .wr_addr, .wr_count(32'(N)), .wr_busy, .wr_done, .wr_valid, .wr_data, .wr_ready,
    .m_req (m_axi_req),
    .m_resp(m_axi_resp)
  );

  // ------------------------------------------------------------------ FFT
  logic          fft_start, fft_inv, fft_busy, fft_done;
  logic [L-1:0]  ext_raddr, ext_waddr;
  logic          ext_we;
  cplx_t         ext_rdata, ext_wdata;

  fft_core #(.N(N)) u_fft (
    .clk, .rst_n,
    .start  (fft_start),
    .inverse(fft_inv),
    .busy   (fft_busy),
    .done   (fft_done),
    .ext_raddr, .ext_rdata, .ext_we, .ext_waddr, .ext_wdata
  );

  // ----------------------------------------------------- reference buffer
  cplx_t        ref_mem [N];
  logic         ref_we;
  logic [L-1:0] ref_waddr, ref_raddr;
  cplx_t        ref_q;

  always_ff @(posedge clk) begin
    if (ref_we) ref_mem[ref_waddr] <= rd_data;
    ref_q <= ref_mem[ref_raddr];
  end

  // ----------------------------------------------------------- sequencer
  typedef enum logic [3:0] {
    S_IDLE, S_REF_CMD, S_REF_LOAD, S_LINE_CMD, S_LINE_LOAD, S_FFT, S_MUL,
    S_MUL_LAST, S_IFFT, S_WR_CMD, S_WR_STREAM, S_WR_WAIT
  } state_t;

  state_t        st;
  logic [L:0]    idx;          // sample counter
  logic [31:0]   line, left;
  logic          mul_v;
  logic [L-1:0]  mul_addr;
  logic          in_fire, out_fire;

  wire [ADDR_W-1:0] line_addr = data_ptr + ADDR_W'(line) * ADDR_W'(N * BYTES_PER_SAMPLE);

  assign busy     = (st != S_IDLE);
  assign in_fire  = rd_valid && rd_ready;
  assign out_fire = wr_valid && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      idx      <= '0;
      line     <= '0;
      left     <= '0;
      mul_v    <= 1'b0;
      mul_addr <= '0;
      finish   <= 1'b0;
    end else begin
      finish <= 1'b0;
      mul_v  <= (st == S_MUL);
      mul_addr <= idx[L-1:0];
      unique case (st)
        S_IDLE: if (start) begin
          st   <= S_REF_CMD;
          line <= first_line;
          left <= num_lines;
        end
        S_REF_CMD: if (!rd_busy) begin
          st  <= S_REF_LOAD;
          idx <= '0;
        end
        S_REF_LOAD: if (in_fire) begin
          idx <= idx + 1'b1;
          if (idx == (L+1)'(N - 1)) st <= S_LINE_CMD;
        end
        S_LINE_CMD: begin
          if (left == 0) begin
            st     <= S_IDLE;
            finish <= 1'b1;
          end else if (!rd_busy) begin
            st  <= S_LINE_LOAD;
            idx <= '0;
          end
        end
        S_LINE_LOAD: if (in_fire) begin
          idx <= idx + 1'b1;
          if (idx == (L+1)'(N - 1)) st <= S_FFT;
        end
        S_FFT: if (fft_done) begin
          st  <= S_MUL;
          idx <= '0;
        end
        S_MUL: begin
          idx <= idx + 1'b1;
          if (idx == (L+1)'(N - 1)) st <= S_MUL_LAST;
        end
        S_MUL_LAST: st <= S_IFFT;         // last product is written here
        S_IFFT: if (fft_done) st <= S_WR_CMD;
        S_WR_CMD: if (!wr_busy) begin
          st  <= S_WR_STREAM;
          idx <= '0;
        end
        S_WR_STREAM: if (out_fire) begin
          idx <= idx + 1'b1;
          if (idx == (L+1)'(N - 1)) st <= S_WR_WAIT;
        end
        S_WR_WAIT: if (wr_done) begin
          st   <= S_LINE_CMD;
          line <= line + 1;
          left <= left - 1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // FFT start pulses: on entry to S_FFT / S_IFFT
  logic st_fft_q, st_ifft_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_fft_q  <= 1'b0;
      st_ifft_q <= 1'b0;
    end else begin
      st_fft_q  <= (st == S_FFT);
      st_ifft_q <= (st == S_IFFT);
    end
  end
  assign fft_start = ((st == S_FFT) && !st_fft_q) || ((st == S_IFFT) && !st_ifft_q);
  assign fft_inv   = (st == S_IFFT);

  // conjugate multiply: y = x * conj(r), r in Q15.16
  logic signed [71:0] pr, pi;
  cplx_t              prod;
  always_comb begin
    pr = 72'(ext_rdata.re) * 72'(ref_q.re) + 72'(ext_rdata.im) * 72'(ref_q.im);
    pi = 72'(ext_rdata.im) * 72'(ref_q.re) - 72'(ext_rdata.re) * 72'(ref_q.im);
    prod.re = rnd_sat(pr, REF_FRAC);
    prod.im = rnd_sat(pi, REF_FRAC);
  end

  // DMA commands and buffer ports
  always_comb begin
    rd_start  = 1'b0;
    rd_addr   = line_addr;
    rd_ready  = (st == S_REF_LOAD) || (st == S_LINE_LOAD);
    wr_start  = 1'b0;
    wr_addr   = line_addr;
    wr_valid  = (st == S_WR_STREAM);
    wr_data   = ext_rdata;
    ref_we    = (st == S_REF_LOAD) && in_fire;
    ref_waddr = bitrev(idx[L-1:0]);
    ref_raddr = idx[L-1:0];
    ext_we    = 1'b0;
    ext_waddr = idx[L-1:0];
    ext_wdata = rd_data;
    ext_raddr = idx[L-1:0];
    unique case (st)
      S_REF_CMD: begin
        rd_start = !rd_busy;
        rd_addr  = mode_az ? az_ref_ptr : rg_ref_ptr;
      end
      S_LINE_CMD:  rd_start = (left != 0) && !rd_busy;
      S_LINE_LOAD: ext_we = in_fire;
      S_WR_CMD: begin
        wr_start  = !wr_busy;
        ext_raddr = '0;
      end
      S_WR_STREAM: ext_raddr = out_fire ? idx[L-1:0] + 1'b1 : idx[L-1:0];
      default: ;
    endcase
    // product of the sample read in the previous cycle
    if (mul_v) begin
      ext_we    = 1'b1;
      ext_waddr = mul_addr;
      ext_wdata = prod;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (st == S_WR_STREAM) |-> !fft_busy)
    else $error("rcac_core: unloading while the FFT runs");

endmodule
