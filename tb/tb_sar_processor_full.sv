// tb_sar_processor_full: the SAR processor fabric at its default size
// (8192-sample lines, 64 x 64 corner-turn blocks, two compression cores,
// one corner-turn core) taken through one step of each pass of the
// range-Doppler flow on an 8192 x 8192 segment.
//
// Simulating a whole segment would take about a billion cycles, so the
// test runs the parts that exercise every path at full size:
//   1. range compression of the first line of each sub-segment (line 0 on
//      core 0 and line 4096 on core 1, in parallel);
//   2. corner turn of the 64-row band of lines 0..63 (128 blocks);
//   3. azimuth compression of transposed lines 0 and 4096, again one per
//      core.
// As in the reduced test the references are spectra of unit impulses, so
// each compressed line must come back circularly shifted (by MR = 1000 in
// range, MA = 77 in azimuth); every corner-turned sample is checked
// exactly. The single-line latency of pass 1 is checked against
// 2*13*(4096+3) FFT cycles plus 4*8192 transfer cycles.
module tb_sar_processor_full;
  import sar_pkg::*;

  localparam int unsigned N = 8192, BAND = 64, HALF = 4096;
  localparam int unsigned MR = 1000, MA = 77;
  localparam logic [31:0] BASE = 32'h44A0_0000;
  localparam longint RAW = 64'h4000_0000, CT = 64'h6000_0000;
  localparam longint RG  = 64'h0100_0000, AZ = 64'h0110_0000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  c_req;
  axil_resp_t c_resp;
  axi_req_t   m_req;
  axi_resp_t  m_resp;
  logic [2:0] irq;

  sar_processor dut (
    .clk, .rst_n, .s_ctrl_req(c_req), .s_ctrl_resp(c_resp),
    .m_mem_req(m_req), .m_mem_resp(m_resp), .irq
  );
  axi_mem_model #(.STALL_PCT(10)) u_mem (.clk, .rst_n, .req(m_req), .resp(m_resp));
  axil_host u_host (.clk, .req(c_req), .resp(c_resp));

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] win(input int core, input int reg_idx);
    return BASE + 32'(core) * 32'h10000 + 32'(reg_idx * 4);
  endfunction

  task automatic wr(input int core, input int reg_idx, input logic [31:0] v);
    logic [1:0] r;
    u_host.write(win(core, reg_idx), v, r);
  endtask

  task automatic rd(input int core, input int reg_idx, output logic [31:0] v);
    logic [1:0] r;
    u_host.read(win(core, reg_idx), v, r);
  endtask

  task automatic start_rcac(input int core, input longint data, input int mode, input int first);
    wr(core, 1, 32'(data));
    wr(core, 2, 32'(RG));
    wr(core, 3, 32'(AZ));
    wr(core, 4, 32'(mode));
    wr(core, 5, first);
    wr(core, 6, 1);
    wr(core, 0, 1);
  endtask

  function automatic logic [63:0] pack(input real re, input real im);
    cplx_t c;
    c.re = 32'($rtoi(re));
    c.im = 32'($rtoi(im));
    return c;
  endfunction

  task automatic check(input longint a, input cplx_t exp, input int tol, input string what);
    cplx_t got;
    int dr, di;
    got = u_mem.peek(a);
    dr = int'(got.re) - int'(exp.re);
    di = int'(got.im) - int'(exp.im);
    checks++;
    if (dr > tol || dr < -tol || di > tol || di < -tol) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %h: got (%0d,%0d) expected (%0d,%0d)",
                                  what, a, got.re, got.im, exp.re, exp.im);
    end
  endtask

  cplx_t line_a [N], line_b [N];
  cplx_t band [BAND][N];

  initial begin
    real a;
    cplx_t v;
    longint t0, lat;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // raw data: lines 0..63 and 4096 (the rest of the segment reads as zero)
    for (int l = 0; l <= BAND; l++) begin
      int line;
      line = (l == BAND) ? HALF : l;
      for (int n = 0; n < N; n++) begin
        v.re = 32'($signed($urandom_range(65536)) - 32768);
        v.im = 32'($signed($urandom_range(65536)) - 32768);
        u_mem.poke(RAW + (longint'(line) * N + n) * 8, v);
      end
    end
    for (int k = 0; k < N; k++) begin
      a = -2.0 * PI * k * MR / N;
      u_mem.poke(RG + k * 8, pack($floor(65536.0 * $cos(a) + 0.5), $floor(65536.0 * $sin(a) + 0.5)));
      a = -2.0 * PI * k * MA / N;
      u_mem.poke(AZ + k * 8, pack($floor(65536.0 * $cos(a) + 0.5), $floor(65536.0 * $sin(a) + 0.5)));
    end

    // ---- 1. range compression, one line per core
    for (int n = 0; n < N; n++) begin
      line_a[n] = u_mem.peek(RAW + n * 8);
      line_b[n] = u_mem.peek(RAW + (longint'(HALF) * N + n) * 8);
    end
    t0 = cycle;
    start_rcac(0, RAW, 0, 0);
    start_rcac(1, RAW, 0, HALF);
    wait (irq[0] && irq[1]);
    lat = cycle - t0;
    $display("range pass: %0d cycles", lat);
    checks++;
    // both lines in parallel: bounded by one line plus memory sharing
    if (lat < 2 * 13 * (HALF + 3) + 4 * N || lat > 2 * 13 * (HALF + 3) + 10 * N) begin
      failures++;
      $display("FAIL range pass latency %0d", lat);
    end
    for (int n = 0; n < N; n++) begin
      check(RAW + n * 8, line_a[(n + MR) % N], 8, "range line 0");
      check(RAW + (longint'(HALF) * N + n) * 8, line_b[(n + MR) % N], 8, "range line 4096");
    end

    // ---- 2. corner turn of rows 0..63
    for (int r = 0; r < BAND; r++)
      for (int c = 0; c < N; c++) band[r][c] = u_mem.peek(RAW + (longint'(r) * N + c) * 8);
    t0 = cycle;
    wr(2, 1, 32'(RAW));
    wr(2, 2, 32'(CT));
    wr(2, 3, N);
    wr(2, 4, N);
    wr(2, 5, 0);
    wr(2, 6, BAND);
    wr(2, 0, 1);
    wait (irq[2]);
    $display("corner turn of a %0d-row band: %0d cycles", BAND, cycle - t0);
    for (int c = 0; c < N; c++)
      for (int r = 0; r < BAND; r++)
        check(CT + (longint'(c) * N + r) * 8, band[r][c], 0, "corner turn");

    // ---- 3. azimuth compression, one line per core
    for (int n = 0; n < N; n++) begin
      line_a[n] = u_mem.peek(CT + n * 8);
      line_b[n] = u_mem.peek(CT + (longint'(HALF) * N + n) * 8);
    end
    t0 = cycle;
    start_rcac(0, CT, 1, 0);
    start_rcac(1, CT, 1, HALF);
    wait (irq[0] && irq[1]);
    $display("azimuth pass: %0d cycles", cycle - t0);
    for (int n = 0; n < N; n++) begin
      check(CT + n * 8, line_a[(n + MA) % N], 8, "azimuth line 0");
      check(CT + (longint'(HALF) * N + n) * 8, line_b[(n + MA) % N], 8, "azimuth line 4096");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
