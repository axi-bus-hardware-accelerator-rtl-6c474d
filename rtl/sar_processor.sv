// sar_processor: programmable-logic part of an onboard SAR image processor
// for the simplified range-Doppler algorithm (no range cell migration
// correction).
//
// A host soft processor stores the raw echo segment in DDR, computes the
// range and azimuth reference spectra, and then drives three passes over
// the segment with the accelerators built here:
//   1. range compression: NUM_RCAC compression cores (rcac_core, MODE=0)
//      each filter their own band of range lines in place;
//   2. corner turn: NUM_COR corner-turn cores (cor_core) each transpose
//      their own band of rows into a second buffer;
//   3. azimuth compression: the same compression cores (MODE=1) filter
//      the transposed lines in place, which gives the image.
// Each pass ends when every core involved reports done.
//
// Interfaces:
//   s_ctrl  AXI-Lite slave from the host. Core i has a 64 KB register
//           window at 0x44A0_0000 + i*0x10000: compression cores first
//           (0 .. NUM_RCAC-1), then the corner-turn cores.
//   m_mem   AXI4 master, 64-bit, to the DDR memory controller; all cores
//           share it through a round-robin interconnect.
//   irq     per-core done levels, same order as the register windows.
//
// The partitioning (FFT-multiply-IFFT and corner turn in hardware,
// reference generation and sequencing on the host), the merged range /
// azimuth core, the main configuration of two compression cores and one
// corner-turn core, and the splitting of a segment into bands of lines
// between cores follow the architecture this design implements. The host,
// DDR controller, Ethernet, timer and UART are outside this module.
module sar_processor
  import sar_pkg::*;
#(
  parameter int unsigned N_FFT    = 8192,   // segment line length (FFT size)
  parameter int unsigned NUM_RCAC = 2,      // compression cores
  parameter int unsigned NUM_COR  = 1,      // corner-turn cores
  parameter int unsigned COR_BLK  = 64      // corner-turn block edge
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_ctrl_req,
  output axil_resp_t s_ctrl_resp,
  output axi_req_t   m_mem_req,
  input  axi_resp_t  m_mem_resp,
  output logic [NUM_RCAC+NUM_COR-1:0] irq
);

  localparam int unsigned NC = NUM_RCAC + NUM_COR;

  axil_req_t  ctl_req  [NC];
  axil_resp_t ctl_resp [NC];
  axi_req_t   mem_req  [NC];
  axi_resp_t  mem_resp [NC];

  axil_xbar #(.NS(NC)) u_ctrl_xbar (
    .clk, .rst_n,
    .s_req (s_ctrl_req),
    .s_resp(s_ctrl_resp),
    .m_req (ctl_req),
    .m_resp(ctl_resp)
  );

  for (genvar i = 0; i < NUM_RCAC; i++) begin : g_rcac
    rcac_core #(.N(N_FFT)) u_rcac (
      .clk, .rst_n,
      .s_ctrl_req (ctl_req[i]),
      .s_ctrl_resp(ctl_resp[i]),
      .m_axi_req  (mem_req[i]),
      .m_axi_resp (mem_resp[i]),
      .irq        (irq[i])
    );
  end

  for (genvar i = 0; i < NUM_COR; i++) begin : g_cor
    cor_core #(.BLK(COR_BLK)) u_cor (
      .clk, .rst_n,
      .s_ctrl_req (ctl_req[NUM_RCAC + i]),
      .s_ctrl_resp(ctl_resp[NUM_RCAC + i]),
      .m_axi_req  (mem_req[NUM_RCAC + i]),
      .m_axi_resp (mem_resp[NUM_RCAC + i]),
      .irq        (irq[NUM_RCAC + i])
    );
  end

  axi_interconnect #(.NM(NC)) u_mem_ic (
    .clk, .rst_n,
    .s_req (mem_req),
    .s_resp(mem_resp),
    .m_req (m_mem_req),
    .m_resp(m_mem_resp)
  );

endmodule
