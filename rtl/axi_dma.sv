// axi_dma: AXI4 burst master shared by the accelerators (their memory-side
// bus interface).
//
// The read half turns a command (byte address, number of 64-bit samples)
// into INCR bursts and delivers the returned samples on a valid/ready
// stream. The write half does the same for a stream of samples to be
// written. Bursts are at most 256 beats and never cross a 4 KB boundary,
// as AXI4 requires; addresses must be 8-byte aligned. Each half keeps one
// burst in flight, so responses need no ID. A write command completes
// (wr_done pulse) once the last burst's B response has arrived, so data is
// in memory when the owner sees it.
//
// Burst-mode transfers through an AXI master follow the accelerator
// description; the one-burst-in-flight scheme and the stream interface are
// this design's choices.
module axi_dma
  import sar_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // read command and data stream
  input  logic              rd_start,     // pulse, accepted when !rd_busy
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [31:0]       rd_count,     // samples, > 0
  output logic              rd_busy,
  output logic              rd_valid,
  output cplx_t             rd_data,
  input  logic              rd_ready,
  // write command and data stream
  input  logic              wr_start,     // pulse, accepted when !wr_busy
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [31:0]       wr_count,     // samples, > 0
  output logic              wr_busy,
  output logic              wr_done,      // pulse after the last B response
  input  logic              wr_valid,
  input  cplx_t             wr_data,
  output logic              wr_ready,
  // AXI4 master
  output axi_req_t          m_req,
  input  axi_resp_t         m_resp
);

  localparam int unsigned BSH = $clog2(BYTES_PER_SAMPLE);

  // beats of the next burst: min(remaining, 256, beats to the 4 KB boundary)
  function automatic logic [8:0] burst_beats(input logic [ADDR_W-1:0] a, input logic [31:0] rem);
    logic [9:0] to_4k;
    logic [31:0] n;
    to_4k = 10'((13'h1000 - {1'b0, a[11:0]}) >> BSH);
    n = rem;
    if (n > 32'(MAX_BURST)) n = 32'(MAX_BURST);
    if (n > 32'(to_4k))     n = 32'(to_4k);
    return n[8:0];
  endfunction

  // ------------------------------------------------------------- read half
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_t;
  rstate_t           rs;
  logic [ADDR_W-1:0] r_addr;
  logic [31:0]       r_rem;
  logic [8:0]        r_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs     <= R_IDLE;
      r_addr <= '0;
      r_rem  <= '0;
      r_len  <= '0;
    end else begin
      unique case (rs)
        R_IDLE: if (rd_start) begin
          rs     <= R_ADDR;
          r_addr <= rd_addr;
          r_rem  <= rd_count;
          r_len  <= burst_beats(rd_addr, rd_count);
        end
        R_ADDR: if (m_resp.ar_ready) rs <= R_DATA;
        R_DATA: if (m_resp.r_valid && rd_ready && m_resp.r_last) begin
          r_addr <= r_addr + (ADDR_W'(r_len) << BSH);
          r_rem  <= r_rem - 32'(r_len);
          r_len  <= burst_beats(r_addr + (ADDR_W'(r_len) << BSH), r_rem - 32'(r_len));
          rs     <= (r_rem == 32'(r_len)) ? R_IDLE : R_ADDR;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  assign rd_busy  = (rs != R_IDLE);
  assign rd_valid = (rs == R_DATA) && m_resp.r_valid;
  assign rd_data  = cplx_t'(m_resp.r_data);

  // ------------------------------------------------------------ write half
  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_t;
  wstate_t           ws;
  logic [ADDR_W-1:0] w_addr;
  logic [31:0]       w_rem;
  logic [8:0]        w_len, w_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws      <= W_IDLE;
      w_addr  <= '0;
      w_rem   <= '0;
      w_len   <= '0;
      w_cnt   <= '0;
      wr_done <= 1'b0;
    end else begin
      wr_done <= 1'b0;
      unique case (ws)
        W_IDLE: if (wr_start) begin
          ws     <= W_ADDR;
          w_addr <= wr_addr;
          w_rem  <= wr_count;
          w_len  <= burst_beats(wr_addr, wr_count);
        end
        W_ADDR: if (m_resp.aw_ready) begin
          ws    <= W_DATA;
          w_cnt <= '0;
        end
        W_DATA: if (wr_valid && m_resp.w_ready) begin
          w_cnt <= w_cnt + 9'd1;
          if (w_cnt == w_len - 9'd1) ws <= W_RESP;
        end
        W_RESP: if (m_resp.b_valid) begin
          w_addr <= w_addr + (ADDR_W'(w_len) << BSH);
          w_rem  <= w_rem - 32'(w_len);
          w_len  <= burst_beats(w_addr + (ADDR_W'(w_len) << BSH), w_rem - 32'(w_len));
          if (w_rem == 32'(w_len)) begin
            ws      <= W_IDLE;
            wr_done <= 1'b1;
          end else begin
            ws <= W_ADDR;
          end
        end
        default: ws <= W_IDLE;
      endcase
    end
  end

  assign wr_busy  = (ws != W_IDLE);
  assign wr_ready = (ws == W_DATA) && m_resp.w_ready;

  // ------------------------------------------------------------ AXI drive
  always_comb begin
    m_req          = '0;
    m_req.ar.addr  = r_addr;
    m_req.ar.len   = 8'(r_len - 9'd1);
    m_req.ar.size  = 3'(BSH);
    m_req.ar.burst = 2'b01;
    m_req.ar_valid = (rs == R_ADDR);
    m_req.r_ready  = (rs == R_DATA) && rd_ready;
    m_req.aw.addr  = w_addr;
    m_req.aw.len   = 8'(w_len - 9'd1);
    m_req.aw.size  = 3'(BSH);
    m_req.aw.burst = 2'b01;
    m_req.aw_valid = (ws == W_ADDR);
    m_req.w_data   = wr_data;
    m_req.w_strb   = '1;
    m_req.w_last   = (w_cnt == w_len - 9'd1);
    m_req.w_valid  = (ws == W_DATA) && wr_valid;
    m_req.b_ready  = (ws == W_RESP);
  end

  // a burst never crosses a 4 KB page
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_req.ar_valid |-> ({1'b0, m_req.ar.addr[11:0]} + ((13'(m_req.ar.len) + 13'd1) << BSH)) <= 13'h1000)
    else $error("axi_dma: read burst crosses 4 KB");
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_req.aw_valid |-> ({1'b0, m_req.aw.addr[11:0]} + ((13'(m_req.aw.len) + 13'd1) << BSH)) <= 13'h1000)
    else $error("axi_dma: write burst crosses 4 KB");

endmodule
