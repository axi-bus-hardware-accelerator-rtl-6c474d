// sar_flow_env: one SAR processor build with its own memory and host,
// taken through the complete focusing flow on an N x N segment. Used by
// tb_sar_workloads to compare builds that differ in segment size, number
// of cores and corner-turn block size.
//
// On a rising `go` the environment writes a random raw segment and
// unit-impulse reference spectra (delays MR in range, MA in azimuth) into
// its memory, then runs:
//   1. range compression, the N lines split into NR equal bands, one per
//      compression core, all started before waiting for any;
//   2. corner turn, the N rows split into NC equal bands, one per
//      corner-turn core;
//   3. azimuth compression of the transposed lines, split as in 1.
// Completion is taken from the irq levels, so host polling does not load
// the memory port. Each pass is timed from the first register write to
// the last done. The final image must equal the raw data shifted by
// (MR, MA) within 16 LSB; every sample is checked.
//
// Outputs: done (level, after the image check), checks, failures and the
// three pass latencies in cycles. No $finish here: the caller ends the
// simulation.
module sar_flow_env
  import sar_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned NR  = 2,
  parameter int unsigned NC  = 1,
  parameter int unsigned BLK = 8,
  parameter int unsigned MR  = 3,
  parameter int unsigned MA  = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   go,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint cyc_rg,
  output longint cyc_ct,
  output longint cyc_az
);

  localparam logic [31:0] BASE = 32'h44A0_0000;
  localparam longint RAW = 64'h1000_0000, CT = 64'h2000_0000;
  localparam longint RG  = 64'h0800_0000, AZ = 64'h0900_0000;
  localparam real PI = 3.14159265358979323846;

  axil_req_t  c_req;
  axil_resp_t c_resp;
  axi_req_t   m_req;
  axi_resp_t  m_resp;
  logic [NR+NC-1:0] irq;

  sar_processor #(.N_FFT(N), .NUM_RCAC(NR), .NUM_COR(NC), .COR_BLK(BLK)) dut (
    .clk, .rst_n, .s_ctrl_req(c_req), .s_ctrl_resp(c_resp),
    .m_mem_req(m_req), .m_mem_resp(m_resp), .irq
  );
  axi_mem_model #(.STALL_PCT(10)) u_mem (.clk, .rst_n, .req(m_req), .resp(m_resp));
  axil_host u_host (.clk, .req(c_req), .resp(c_resp));

  longint cycle = 0;
  always @(posedge clk) cycle++;

  function automatic logic [31:0] win(input int core, input int reg_idx);
    return BASE + 32'(core) * 32'h10000 + 32'(reg_idx * 4);
  endfunction

  task automatic wr(input int core, input int reg_idx, input logic [31:0] v);
    logic [1:0] r;
    u_host.write(win(core, reg_idx), v, r);
    checks++;
    if (r != RESP_OKAY) failures++;
  endtask

  function automatic logic [63:0] pack(input real re, input real im);
    cplx_t c;
    c.re = 32'($rtoi(re));
    c.im = 32'($rtoi(im));
    return c;
  endfunction

  // compression pass over the segment at `data`, lines split across cores
  task automatic compress(input longint data, input int mode, output longint lat);
    longint t0;
    t0 = cycle;
    for (int c = 0; c < int'(NR); c++) begin
      wr(c, 1, 32'(data));
      wr(c, 2, 32'(RG));
      wr(c, 3, 32'(AZ));
      wr(c, 4, 32'(mode));
      wr(c, 5, c * int'(N / NR));
      wr(c, 6, int'(N / NR));
      wr(c, 0, 1);
    end
    wait (&irq[NR-1:0]);
    lat = cycle - t0;
  endtask

  cplx_t raw [N][N];

  initial begin
    real a;
    cplx_t got, exp;
    longint t0;
    done = 0; checks = 0; failures = 0;
    cyc_rg = 0; cyc_ct = 0; cyc_az = 0;
    @(posedge go);
    for (int l = 0; l < int'(N); l++)
      for (int n = 0; n < int'(N); n++) begin
        raw[l][n].re = 32'($signed($urandom_range(131072)) - 65536);
        raw[l][n].im = 32'($signed($urandom_range(131072)) - 65536);
        u_mem.poke(RAW + longint'(l * int'(N) + n) * 8, raw[l][n]);
      end
    for (int k = 0; k < int'(N); k++) begin
      a = -2.0 * PI * k * MR / N;
      u_mem.poke(RG + k * 8, pack($floor(65536.0 * $cos(a) + 0.5), $floor(65536.0 * $sin(a) + 0.5)));
      a = -2.0 * PI * k * MA / N;
      u_mem.poke(AZ + k * 8, pack($floor(65536.0 * $cos(a) + 0.5), $floor(65536.0 * $sin(a) + 0.5)));
    end

    compress(RAW, 0, cyc_rg);

    t0 = cycle;
    for (int c = 0; c < int'(NC); c++) begin
      wr(NR + c, 1, 32'(RAW));
      wr(NR + c, 2, 32'(CT));
      wr(NR + c, 3, N);
      wr(NR + c, 4, N);
      wr(NR + c, 5, c * int'(N / NC));
      wr(NR + c, 6, int'(N / NC));
      wr(NR + c, 0, 1);
    end
    wait (&irq[NR+NC-1:NR]);
    cyc_ct = cycle - t0;

    compress(CT, 1, cyc_az);

    for (int rg = 0; rg < int'(N); rg++)
      for (int az = 0; az < int'(N); az++) begin
        got = u_mem.peek(CT + longint'(rg * int'(N) + az) * 8);
        exp = raw[(az + MA) % N][(rg + MR) % N];
        checks++;
        if (int'(got.re) - int'(exp.re) > 16 || int'(exp.re) - int'(got.re) > 16 ||
            int'(got.im) - int'(exp.im) > 16 || int'(exp.im) - int'(got.im) > 16) begin
          failures++;
          if (failures < 6)
            $display("FAIL N=%0d NR=%0d NC=%0d BLK=%0d image[%0d][%0d]: got (%0d,%0d) expected (%0d,%0d)",
                     N, NR, NC, BLK, rg, az, got.re, got.im, exp.re, exp.im);
        end
      end
    done = 1;
  end

endmodule
