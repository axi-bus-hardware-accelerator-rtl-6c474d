// tb_rcac_core: self-checking test of the range/azimuth compression core.
//
// A random segment of lines sits in a behavioural AXI memory with random
// back-pressure. Pass 1 (range mode) uses a reference whose conjugate
// multiply is a circular shift by M0 samples, so every processed line must
// come back rotated; lines outside FIRST_LINE..FIRST_LINE+NUM_LINES-1 must
// be untouched. Pass 2 (azimuth mode) uses a random reference and compares
// with FFT, conjugate multiply and IFFT computed here in floating point.
// Pass 3 checks the per-line cycle count with back-pressure switched off.
module tb_rcac_core;
  import sar_pkg::*;

  localparam int unsigned N     = 64;
  localparam int unsigned LINES = 6;
  localparam int unsigned M0    = 5;
  localparam real PI = 3.14159265358979323846;
  localparam longint DATA = 64'h1000_0000, RG = 64'h0800_0000, AZ = 64'h0900_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  c_req;
  axil_resp_t c_resp;
  axi_req_t   m_req;
  axi_resp_t  m_resp, m2_resp;
  logic       irq;
  logic       use_fast = 0;
  axi_resp_t  m_resp_fast;

  rcac_core #(.N(N)) dut (
    .clk, .rst_n, .s_ctrl_req(c_req), .s_ctrl_resp(c_resp),
    .m_axi_req(m_req), .m_axi_resp(m_resp), .irq
  );

  // two memories: one with stalls, one without, sharing contents through poke
  axi_mem_model #(.STALL_PCT(30)) u_mem (.clk, .rst_n, .req(use_fast ? '0 : m_req), .resp(m2_resp));
  axi_mem_model #(.STALL_PCT(0))  u_fast (.clk, .rst_n, .req(use_fast ? m_req : '0), .resp(m_resp_fast));
  assign m_resp = use_fast ? m_resp_fast : m2_resp;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- AXI-Lite host
  axil_host u_host (.clk, .req(c_req), .resp(c_resp));

  task automatic lite_write(input logic [31:0] a, input logic [31:0] d);
    logic [1:0] r;
    u_host.write(a, d, r);
  endtask

  task automatic lite_read(input logic [31:0] a, output logic [31:0] d);
    logic [1:0] r;
    u_host.read(a, d, r);
  endtask

  task automatic run_core(input logic [31:0] mode, input int first, input int num, output int cyc);
    logic [31:0] st;
    lite_write(32'h04, 32'(DATA));
    lite_write(32'h08, 32'(RG));
    lite_write(32'h0c, 32'(AZ));
    lite_write(32'h10, mode);
    lite_write(32'h14, 32'(first));
    lite_write(32'h18, 32'(num));
    lite_write(32'h00, 32'h1);
    cyc = 0;
    while (!irq) begin @(negedge clk); cyc++; end
    lite_read(32'h00, st);
    checks++;
    if (st[2:0] != 3'b110) begin failures++; $display("FAIL status %b", st[2:0]); end
  endtask

  function automatic logic [63:0] pack(input real re, input real im);
    cplx_t c;
    c.re = 32'($rtoi(re));
    c.im = 32'($rtoi(im));
    return c;
  endfunction

  // memory helpers working on both models
  function automatic void poke2(input longint a, input logic [63:0] v);
    u_mem.poke(a, v);
    u_fast.poke(a, v);
  endfunction
  function automatic cplx_t peek_cur(input longint a);
    return use_fast ? u_fast.peek(a) : u_mem.peek(a);
  endfunction

  real xr [LINES][N], xi [LINES][N];
  real rr [N], ri [N];

  task automatic check_sample(input longint a, input real er, input real ei, input real tol, input string what);
    cplx_t got;
    got = peek_cur(a);
    checks++;
    if ($itor(got.re) - er > tol || er - $itor(got.re) > tol ||
        $itor(got.im) - ei > tol || ei - $itor(got.im) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %h: got (%0d,%0d) expected (%f,%f)", what, a, got.re, got.im, er, ei);
    end
  endtask

  initial begin
    int cyc;
    real a, Xr [N], Xi [N], Yr, Yi, yr, yi;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // raw lines
    for (int l = 0; l < LINES; l++)
      for (int n = 0; n < N; n++) begin
        xr[l][n] = $itor($signed($urandom_range(2*100000)) - 100000);
        xi[l][n] = $itor($signed($urandom_range(2*100000)) - 100000);
        poke2(DATA + (l * N + n) * 8, pack(xr[l][n], xi[l][n]));
      end
    // range reference: spectrum of a unit impulse at M0 (Q15.16)
    for (int k = 0; k < N; k++) begin
      a = -2.0 * PI * k * M0 / N;
      poke2(RG + k * 8, pack($floor(65536.0 * $cos(a) + 0.5), $floor(65536.0 * $sin(a) + 0.5)));
    end

    // ---- pass 1: range mode, lines 1..4 rotate by M0
    run_core(32'd0, 1, 4, cyc);
    for (int l = 0; l < LINES; l++)
      for (int n = 0; n < N; n++) begin
        if (l >= 1 && l <= 4)
          check_sample(DATA + (l * N + n) * 8, xr[l][(n + M0) % N], xi[l][(n + M0) % N], 8.0, "range");
        else
          check_sample(DATA + (l * N + n) * 8, xr[l][n], xi[l][n], 0.0, "untouched");
      end
    // the rotated lines are the new contents
    for (int l = 1; l <= 4; l++) begin
      real tr [N], ti [N];
      for (int n = 0; n < N; n++) begin tr[n] = xr[l][(n + M0) % N]; ti[n] = xi[l][(n + M0) % N]; end
      for (int n = 0; n < N; n++) begin
        xr[l][n] = tr[n]; xi[l][n] = ti[n];
        poke2(DATA + (l * N + n) * 8, pack(tr[n], ti[n]));
      end
    end

    // ---- pass 2: azimuth mode, random reference, lines 2..3
    for (int k = 0; k < N; k++) begin
      rr[k] = $itor($signed($urandom_range(2*131072)) - 131072);
      ri[k] = $itor($signed($urandom_range(2*131072)) - 131072);
      poke2(AZ + k * 8, pack(rr[k], ri[k]));
    end
    run_core(32'd1, 2, 2, cyc);
    for (int l = 2; l <= 3; l++) begin
      for (int k = 0; k < N; k++) begin
        Xr[k] = 0; Xi[k] = 0;
        for (int n = 0; n < N; n++) begin
          a = -2.0 * PI * k * n / N;
          Xr[k] += xr[l][n] * $cos(a) - xi[l][n] * $sin(a);
          Xi[k] += xr[l][n] * $sin(a) + xi[l][n] * $cos(a);
        end
      end
      for (int n = 0; n < N; n++) begin
        yr = 0; yi = 0;
        for (int k = 0; k < N; k++) begin
          Yr = (Xr[k] * rr[k] + Xi[k] * ri[k]) / 65536.0;
          Yi = (Xi[k] * rr[k] - Xr[k] * ri[k]) / 65536.0;
          a = 2.0 * PI * k * n / N;
          yr += (Yr * $cos(a) - Yi * $sin(a)) / N;
          yi += (Yr * $sin(a) + Yi * $cos(a)) / N;
        end
        check_sample(DATA + (l * N + n) * 8, yr, yi, 16.0, "azimuth");
      end
    end

    // ---- pass 3: latency of one line without back-pressure
    use_fast = 1;
    run_core(32'd0, 0, 1, cyc);
    begin
      int lo;
      lo = 2 * $clog2(N) * (N/2 + 3) + 4 * N;   // reference, read, multiply, write
      checks++;
      if (cyc < lo || cyc > lo + 60) begin
        failures++;
        $display("FAIL one-line latency %0d cycles, expected %0d..%0d", cyc, lo, lo + 60);
      end else $display("one line (with reference load) took %0d cycles", cyc);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
