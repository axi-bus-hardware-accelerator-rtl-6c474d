// axil_xbar: AXI-Lite control-path interconnect, one master (the host
// processor) to NS accelerator control ports.
//
// Slave i answers the 64 KB window BASE + i*0x10000. An access outside all
// windows is completed here with a DECERR response. Each direction handles
// one transaction at a time: the target is decoded and registered when the
// address appears, then address and data are forwarded until each is
// accepted, then the response is returned. The master's address must stay
// stable until it is accepted, as AXI requires.
//
// Timing: one cycle of decode before the address reaches the slave.
//
// That the host reaches every accelerator over the AXI interconnect follows
// the architecture; the address map (64 KB windows from 0x44A0_0000) and the
// decoding scheme are this design's choices.
module axil_xbar
  import sar_pkg::*;
#(
  parameter int unsigned          NS   = 3,
  parameter logic [ADDR_W-1:0]    BASE = 32'h44A0_0000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_req,
  output axil_resp_t s_resp,
  output axil_req_t  m_req  [NS],
  input  axil_resp_t m_resp [NS]
);

  localparam int unsigned IW = (NS > 1) ? $clog2(NS) : 1;

  typedef struct packed {
    logic          hit;
    logic [IW-1:0] idx;
  } target_t;

  function automatic target_t decode(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] off;
    off = a - BASE;
    decode.hit = (off >> 16) < ADDR_W'(NS);
    decode.idx = IW'(off >> 16);
  endfunction

  typedef enum logic [1:0] {X_IDLE, X_FWD, X_RESP} xstate_t;

  // ---------------------------------------------------------------- write
  xstate_t ws;
  target_t wt;
  logic    aw_done, w_done, aw_acc, w_acc, b_fire;

  always_comb begin
    aw_acc = wt.hit ? m_resp[wt.idx].aw_ready : 1'b1;
    w_acc  = wt.hit ? m_resp[wt.idx].w_ready  : 1'b1;
    b_fire = s_resp.b_valid && s_req.b_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws      <= X_IDLE;
      wt      <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else begin
      unique case (ws)
        X_IDLE: if (s_req.aw_valid) begin
          wt      <= decode(s_req.aw_addr);
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          ws      <= X_FWD;
        end
        X_FWD: begin
          if (s_req.aw_valid && aw_acc) aw_done <= 1'b1;
          if (s_req.w_valid && w_acc)   w_done  <= 1'b1;
          if ((aw_done || (s_req.aw_valid && aw_acc)) && (w_done || (s_req.w_valid && w_acc)))
            ws <= X_RESP;
        end
        X_RESP: if (b_fire) ws <= X_IDLE;
        default: ws <= X_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------------- read
  xstate_t rs;
  target_t rt;
  logic    ar_acc, r_fire;

  always_comb begin
    ar_acc = rt.hit ? m_resp[rt.idx].ar_ready : 1'b1;
    r_fire = s_resp.r_valid && s_req.r_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= X_IDLE;
      rt <= '0;
    end else begin
      unique case (rs)
        X_IDLE: if (s_req.ar_valid) begin
          rt <= decode(s_req.ar_addr);
          rs <= X_FWD;
        end
        X_FWD:  if (s_req.ar_valid && ar_acc) rs <= X_RESP;
        X_RESP: if (r_fire) rs <= X_IDLE;
        default: rs <= X_IDLE;
      endcase
    end
  end

  // -------------------------------------------------------------- routing
  always_comb begin
    s_resp = '0;
    for (int i = 0; i < NS; i++) begin
      m_req[i]         = '0;
      m_req[i].aw_addr = s_req.aw_addr;
      m_req[i].w_data  = s_req.w_data;
      m_req[i].w_strb  = s_req.w_strb;
      m_req[i].ar_addr = s_req.ar_addr;
    end
    // write
    if (ws == X_FWD) begin
      s_resp.aw_ready = !aw_done && aw_acc;
      s_resp.w_ready  = !w_done && w_acc;
      if (wt.hit) begin
        m_req[wt.idx].aw_valid = s_req.aw_valid && !aw_done;
        m_req[wt.idx].w_valid  = s_req.w_valid && !w_done;
      end
    end else if (ws == X_RESP) begin
      if (wt.hit) begin
        s_resp.b_valid         = m_resp[wt.idx].b_valid;
        s_resp.b_resp          = m_resp[wt.idx].b_resp;
        m_req[wt.idx].b_ready  = s_req.b_ready;
      end else begin
        s_resp.b_valid = 1'b1;
        s_resp.b_resp  = RESP_DECERR;
      end
    end
    // read
    if (rs == X_FWD) begin
      s_resp.ar_ready = ar_acc;
      if (rt.hit) m_req[rt.idx].ar_valid = s_req.ar_valid;
    end else if (rs == X_RESP) begin
      if (rt.hit) begin
        s_resp.r_valid        = m_resp[rt.idx].r_valid;
        s_resp.r_data         = m_resp[rt.idx].r_data;
        s_resp.r_resp         = m_resp[rt.idx].r_resp;
        m_req[rt.idx].r_ready = s_req.r_ready;
      end else begin
        s_resp.r_valid = 1'b1;
        s_resp.r_data  = '0;
        s_resp.r_resp  = RESP_DECERR;
      end
    end
  end

endmodule
