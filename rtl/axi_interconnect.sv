// axi_interconnect: shares one AXI4 slave port (the DDR memory controller)
// among NM accelerator masters.
//
// Reads and writes are arbitrated separately, so one master can read while
// another writes. Each direction grants one master at a time, round-robin
// starting after the last winner, and holds the grant for the whole burst:
// a read grant ends with the R beat flagged last, a write grant with the B
// response. Only the granted master sees ready/valid from the slave; the
// others wait. With every master keeping one burst in flight per direction
// no transaction IDs are needed.
//
// Timing: the grant is registered, so an AR or AW reaches the slave one
// cycle after the master raises it, and a new grant can be taken in the
// cycle after the previous burst ends.
//
// The accelerators sharing the DDR through an AXI interconnect follow the
// architecture; the arbitration scheme is this design's choice.
module axi_interconnect
  import sar_pkg::*;
#(
  parameter int unsigned NM = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  s_req  [NM],
  output axi_resp_t s_resp [NM],
  output axi_req_t  m_req,
  input  axi_resp_t m_resp
);

  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;

  // round-robin pick among request bits, starting after 'last'
  function automatic logic [IW-1:0] rr_pick(input logic [NM-1:0] req, input logic [IW-1:0] last);
    int unsigned k;
    rr_pick = last;
    for (int unsigned i = 1; i <= NM; i++) begin
      k = (32'(last) + i) % NM;
      if (req[k]) return IW'(k);
    end
  endfunction

  logic [NM-1:0] ar_req, aw_req;
  always_comb begin
    for (int i = 0; i < NM; i++) begin
      ar_req[i] = s_req[i].ar_valid;
      aw_req[i] = s_req[i].aw_valid;
    end
  end

  // ---------------------------------------------------------------- read
  logic          r_busy, r_take;
  logic [IW-1:0] r_sel, r_last, r_pick;

  assign r_pick = rr_pick(ar_req, r_last);
  assign r_take = !r_busy && (ar_req != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_busy <= 1'b0;
      r_sel  <= '0;
      r_last <= IW'(NM - 1);
    end else if (!r_busy) begin
      if (r_take) begin
        r_busy <= 1'b1;
        r_sel  <= r_pick;
        r_last <= r_pick;
      end
    end else if (m_resp.r_valid && m_req.r_ready && m_resp.r_last) begin
      r_busy <= 1'b0;
    end
  end

  // --------------------------------------------------------------- write
  logic          w_busy, w_take;
  logic [IW-1:0] w_sel, w_last, w_pick;

  assign w_pick = rr_pick(aw_req, w_last);
  assign w_take = !w_busy && (aw_req != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy <= 1'b0;
      w_sel  <= '0;
      w_last <= IW'(NM - 1);
    end else if (!w_busy) begin
      if (w_take) begin
        w_busy <= 1'b1;
        w_sel  <= w_pick;
        w_last <= w_pick;
      end
    end else if (m_resp.b_valid && m_req.b_ready) begin
      w_busy <= 1'b0;
    end
  end

  // ----------------------------------------------------------- routing
  // The address is forwarded only once the grant is registered, so the
  // channel a master sees is stable for the whole burst.
  logic ar_phase, aw_phase;   // address handshake of the grant still pending
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_phase <= 1'b0;
      aw_phase <= 1'b0;
    end else begin
      if (r_take)                                ar_phase <= 1'b1;
      else if (m_req.ar_valid && m_resp.ar_ready) ar_phase <= 1'b0;
      if (w_take)                                aw_phase <= 1'b1;
      else if (m_req.aw_valid && m_resp.aw_ready) aw_phase <= 1'b0;
    end
  end

  always_comb begin
    m_req = '0;
    for (int i = 0; i < NM; i++) s_resp[i] = '0;
    // read
    if (r_busy) begin
      m_req.ar       = s_req[r_sel].ar;
      m_req.ar_valid = ar_phase && s_req[r_sel].ar_valid;
      m_req.r_ready  = s_req[r_sel].r_ready;
      s_resp[r_sel].ar_ready = ar_phase && m_resp.ar_ready;
      s_resp[r_sel].r_data   = m_resp.r_data;
      s_resp[r_sel].r_resp   = m_resp.r_resp;
      s_resp[r_sel].r_last   = m_resp.r_last;
      s_resp[r_sel].r_valid  = !ar_phase && m_resp.r_valid;
    end
    // write
    if (w_busy) begin
      m_req.aw       = s_req[w_sel].aw;
      m_req.aw_valid = aw_phase && s_req[w_sel].aw_valid;
      m_req.w_data   = s_req[w_sel].w_data;
      m_req.w_strb   = s_req[w_sel].w_strb;
      m_req.w_last   = s_req[w_sel].w_last;
      m_req.w_valid  = s_req[w_sel].w_valid;
      m_req.b_ready  = s_req[w_sel].b_ready;
      s_resp[w_sel].aw_ready = aw_phase && m_resp.aw_ready;
      s_resp[w_sel].w_ready  = m_resp.w_ready;
      s_resp[w_sel].b_resp   = m_resp.b_resp;
      s_resp[w_sel].b_valid  = m_resp.b_valid;
    end
  end

  // AXI rule: a master keeps its address valid until it is accepted
  for (genvar g = 0; g < NM; g++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     s_req[g].ar_valid && !s_resp[g].ar_ready |=> s_req[g].ar_valid)
      else $error("axi_interconnect: AR dropped by master %0d", g);
    assert property (@(posedge clk) disable iff (!rst_n)
                     s_req[g].aw_valid && !s_resp[g].aw_ready |=> s_req[g].aw_valid)
      else $error("axi_interconnect: AW dropped by master %0d", g);
  end

endmodule
