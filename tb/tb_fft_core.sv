// tb_fft_core: self-checking test of the in-place FFT engine.
//
// Loads random complex lines, runs a forward transform and compares the
// bit-reversed result with a direct DFT computed here in floating point,
// then runs an inverse transform on a random bit-reversed spectrum and
// compares with a direct inverse DFT (including 1/N). Also checks that each
// transform takes log2(N)*(N/2+3) cycles.
module tb_fft_core;
  import sar_pkg::*;

  localparam int unsigned N = 64;
  localparam int unsigned L = $clog2(N);
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start = 0, inverse = 0, busy, done;
  logic [L-1:0] ext_raddr = '0, ext_waddr = '0;
  logic         ext_we = 0;
  cplx_t        ext_rdata, ext_wdata;

  fft_core #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int br(input int v);
    int r = 0;
    for (int i = 0; i < L; i++) if (v[i]) r |= 1 << (L - 1 - i);
    return r;
  endfunction

  real xr [N], xi [N], er [N], ei [N];

  task automatic load();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ext_we = 1; ext_waddr = L'(i);
      ext_wdata.re = 32'($rtoi(xr[i]));
      ext_wdata.im = 32'($rtoi(xi[i]));
    end
    @(negedge clk); ext_we = 0;
  endtask

  task automatic run(input logic inv);
    int cyc = 0;
    @(negedge clk); start = 1; inverse = inv;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != L * (N/2 + 3)) begin
      failures++;
      $display("FAIL cycles %0d, expected %0d", cyc, L * (N/2 + 3));
    end
  endtask

  task automatic compare(input bit bitrev_out, input real tol);
    real dr, di;
    for (int k = 0; k < N; k++) begin
      @(negedge clk); ext_raddr = L'(bitrev_out ? br(k) : k);
      @(negedge clk);
      dr = $itor(ext_rdata.re) - er[k];
      di = $itor(ext_rdata.im) - ei[k];
      checks++;
      if (dr > tol || dr < -tol || di > tol || di < -tol) begin
        failures++;
        if (failures < 10)
          $display("FAIL bin %0d got (%0d,%0d) expected (%f,%f)", k, ext_rdata.re, ext_rdata.im, er[k], ei[k]);
      end
    end
  endtask

  initial begin
    real a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      // forward: natural in, bit-reversed out, unscaled
      for (int i = 0; i < N; i++) begin
        xr[i] = $itor($signed($urandom_range(2*262144)) - 262144);
        xi[i] = $itor($signed($urandom_range(2*262144)) - 262144);
      end
      for (int k = 0; k < N; k++) begin
        er[k] = 0; ei[k] = 0;
        for (int n = 0; n < N; n++) begin
          a = -2.0 * PI * k * n / N;
          er[k] += xr[n] * $cos(a) - xi[n] * $sin(a);
          ei[k] += xr[n] * $sin(a) + xi[n] * $cos(a);
        end
      end
      load();
      run(1'b0);
      compare(1'b1, 64.0);
      // inverse: bit-reversed in, natural out, scaled by 1/N
      for (int i = 0; i < N; i++) begin
        xr[br(i)] = $itor($signed($urandom_range(2*16777216)) - 16777216);
        xi[br(i)] = $itor($signed($urandom_range(2*16777216)) - 16777216);
      end
      for (int n = 0; n < N; n++) begin
        er[n] = 0; ei[n] = 0;
        for (int k = 0; k < N; k++) begin
          a = 2.0 * PI * k * n / N;
          er[n] += (xr[br(k)] * $cos(a) - xi[br(k)] * $sin(a)) / N;
          ei[n] += (xr[br(k)] * $sin(a) + xi[br(k)] * $cos(a)) / N;
        end
      end
      load();
      run(1'b1);
      compare(1'b0, 64.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
