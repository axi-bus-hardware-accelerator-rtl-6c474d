// cor_core: corner turn accelerator (COR), a block transpose through BRAM.
//
// A segment in memory is a row-major matrix of complex samples: NROWS rows
// (azimuth lines) of NCOLS samples (range cells). The corner turn writes its
// transpose, NCOLS rows of NROWS samples, to a second buffer so that the
// azimuth lines become contiguous. Transposing sample by sample would make
// either the reads or the writes jump by a whole row each time; instead the
// matrix is cut into BLK x BLK blocks. A block is fetched with BLK bursts
// (one per source row, contiguous), held in on-chip RAM, and written back
// with BLK bursts (one per destination row, again contiguous), reading the
// RAM column-wise.
//
// The block RAM holds two blocks. The fetch engine fills one bank while the
// write engine empties the other, so block k+1 is being read while block k
// is being written (a ping-pong buffer; each bank has a full flag).
// Several cores can share a segment: each is given a band of source rows.
//
// Control (AXI-Lite, see ha_ctrl_regs): argument 0 SRC_PTR, 1 DST_PTR,
// 2 NCOLS (samples per source row), 3 NROWS (source rows in the whole
// segment = samples per destination row), 4 FIRST_ROW, 5 NUM_ROWS.
// NCOLS, FIRST_ROW and NUM_ROWS must be multiples of BLK. Source sample
// (r,c) is at SRC_PTR + (r*NCOLS + c)*8, its image (c,r) at
// DST_PTR + (c*NROWS + r)*8.
//
// Timing: per block, BLK read bursts and BLK write bursts of BLK beats; with
// both banks in use the fetch of one block overlaps the write of the other.
//
// The block technique, the BRAM block cache and the overlap of reading and
// writing follow the accelerator description; the block size default (64)
// is the smallest of the sizes it evaluates. The two-bank structure, the
// one-burst-per-row scheme and the register layout are this design's
// choices.
module cor_core
  import sar_pkg::*;
#(
  parameter int unsigned BLK = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_ctrl_req,
  output axil_resp_t s_ctrl_resp,
  output axi_req_t   m_axi_req,
  input  axi_resp_t  m_axi_resp,
  output logic       irq
);

  localparam int unsigned BB = BLK * BLK;
  localparam int unsigned BW = $clog2(BLK);
  localparam int unsigned AW = $clog2(2 * BB);

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

  wire [ADDR_W-1:0] src_ptr   = args[0];
  wire [ADDR_W-1:0] dst_ptr   = args[1];
  wire [31:0]       ncols     = args[2];
  wire [31:0]       nrows     = args[3];
  wire [31:0]       first_row = args[4];
  wire [31:0]       num_rows  = args[5];
  wire [31:0]       end_row   = first_row + num_rows;

  // ----------------------------------------------------------------- DMA
  logic              rd_start, rd_busy, rd_valid, rd_ready;
  logic              wr_start, wr_busy, wr_done, wr_valid, wr_ready;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  cplx_t             rd_data, wr_data;

  axi_dma u_dma (
    .clk, .rst_n,
    .rd_start, .rd_addr, .rd_count(32'(BLK)), .rd_busy, .rd_valid, .rd_data, .rd_ready,
    .wr_start, .wr_addr, .wr_count(32'(BLK)), .wr_busy, .wr_done, .wr_valid, .wr_data, .wr_ready,
    .m_req (m_axi_req),
    .m_resp(m_axi_resp)
  );

  // ---------------------------------------------------- block RAM (2 banks)
  cplx_t         bram [2 * BB];
  logic          b_we;
  logic [AW-1:0] b_waddr, b_raddr;
  cplx_t         b_rdata;

  always_ff @(posedge clk) begin
    if (b_we) bram[b_waddr] <= rd_data;
    b_rdata <= bram[b_raddr];
  end

  logic [1:0] full, full_set, full_clr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full <= '0;
    else        full <= (full | full_set) & ~full_clr;
  end

  // --------------------------------------------------------- fetch engine
  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_CMD, R_DATA} rstate_t;
  rstate_t     rs;
  logic        rbank;
  logic [31:0] r_row0, r_col0;
  logic [BW-1:0] r_i, r_j;
  logic        in_fire;

  assign in_fire  = rd_valid && rd_ready;
  assign rd_ready = (rs == R_DATA);
  assign rd_start = (rs == R_CMD) && !rd_busy;
  assign rd_addr  = src_ptr + (ADDR_W'((r_row0 + 32'(r_i)) * ncols + r_col0) << $clog2(BYTES_PER_SAMPLE));
  assign b_we     = in_fire;
  assign b_waddr  = {rbank, r_i, r_j};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs     <= R_IDLE;
      rbank  <= 1'b0;
      r_row0 <= '0;
      r_col0 <= '0;
      r_i    <= '0;
      r_j    <= '0;
    end else begin
      unique case (rs)
        R_IDLE: if (start && num_rows != 0 && ncols != 0) begin
          rs     <= R_WAIT;
          rbank  <= 1'b0;
          r_row0 <= first_row;
          r_col0 <= '0;
        end
        R_WAIT: if (!full[rbank]) begin
          rs  <= R_CMD;
          r_i <= '0;
        end
        R_CMD: if (!rd_busy) begin
          rs  <= R_DATA;
          r_j <= '0;
        end
        R_DATA: if (in_fire) begin
          r_j <= r_j + 1'b1;
          if (r_j == BW'(BLK - 1)) begin
            if (r_i == BW'(BLK - 1)) begin
              rbank <= ~rbank;
              rs    <= R_WAIT;
              if (r_col0 + 32'(BLK) >= ncols) begin
                r_col0 <= '0;
                r_row0 <= r_row0 + 32'(BLK);
                if (r_row0 + 32'(BLK) >= end_row) rs <= R_IDLE;
              end else begin
                r_col0 <= r_col0 + 32'(BLK);
              end
            end else begin
              r_i <= r_i + 1'b1;
              rs  <= R_CMD;
            end
          end
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    full_set = '0;
    if (rs == R_DATA && in_fire && r_j == BW'(BLK - 1) && r_i == BW'(BLK - 1))
      full_set[rbank] = 1'b1;
  end

  // --------------------------------------------------------- write engine
  typedef enum logic [2:0] {W_IDLE, W_WAIT, W_CMD, W_STREAM, W_FLUSH} wstate_t;
  wstate_t     ws;
  logic        wbank;
  logic [31:0] w_row0, w_col0;
  logic [BW-1:0] w_i, w_j;
  logic        out_fire, last_i, last_j;

  assign out_fire = wr_valid && wr_ready;
  assign wr_valid = (ws == W_STREAM);
  assign wr_data  = b_rdata;
  assign wr_start = (ws == W_CMD) && !wr_busy;
  assign wr_addr  = dst_ptr + (ADDR_W'((w_col0 + 32'(w_j)) * nrows + w_row0) << $clog2(BYTES_PER_SAMPLE));
  assign last_i   = (w_i == BW'(BLK - 1));
  assign last_j   = (w_j == BW'(BLK - 1));

  // column-wise RAM read, one cycle ahead of the stream
  always_comb begin
    if (ws == W_STREAM && out_fire && !last_i) b_raddr = {wbank, w_i + 1'b1, w_j};
    else if (ws == W_CMD)                      b_raddr = {wbank, BW'(0), w_j};
    else                                       b_raddr = {wbank, w_i, w_j};
  end

  always_comb begin
    full_clr = '0;
    if (ws == W_STREAM && out_fire && last_i && last_j) full_clr[wbank] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws     <= W_IDLE;
      wbank  <= 1'b0;
      w_row0 <= '0;
      w_col0 <= '0;
      w_i    <= '0;
      w_j    <= '0;
      finish <= 1'b0;
    end else begin
      finish <= 1'b0;
      unique case (ws)
        W_IDLE: if (start) begin
          if (num_rows == 0 || ncols == 0) begin
            finish <= 1'b1;
          end else begin
            ws     <= W_WAIT;
            wbank  <= 1'b0;
            w_row0 <= first_row;
            w_col0 <= '0;
          end
        end
        W_WAIT: if (full[wbank]) begin
          ws  <= W_CMD;
          w_j <= '0;
        end
        W_CMD: if (!wr_busy) begin
          ws  <= W_STREAM;
          w_i <= '0;
        end
        W_STREAM: if (out_fire) begin
          w_i <= w_i + 1'b1;
          if (last_i) begin
            if (last_j) begin
              wbank <= ~wbank;
              ws    <= W_WAIT;
              if (w_col0 + 32'(BLK) >= ncols) begin
                w_col0 <= '0;
                w_row0 <= w_row0 + 32'(BLK);
                if (w_row0 + 32'(BLK) >= end_row) ws <= W_FLUSH;
              end else begin
                w_col0 <= w_col0 + 32'(BLK);
              end
            end else begin
              w_j <= w_j + 1'b1;
              ws  <= W_CMD;
            end
          end
        end
        W_FLUSH: if (wr_done) begin
          ws     <= W_IDLE;
          finish <= 1'b1;
        end
        default: ws <= W_IDLE;
      endcase
    end
  end

  assign busy = (rs != R_IDLE) || (ws != W_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) (full_set & full) == 2'b00)
    else $error("cor_core: bank refilled before it was written out");

endmodule
