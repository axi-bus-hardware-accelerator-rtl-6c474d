// tb_sar_processor: end-to-end test of the SAR processor fabric at reduced
// size (32 x 32 segment, 32-point lines, 8 x 8 corner-turn blocks, two
// compression cores, one corner-turn core).
//
// The testbench plays the host: it places a random raw segment and two
// reference spectra in a behavioural DDR with back-pressure and runs the
// simplified range-Doppler flow:
//   1. range compression, core 0 on lines 0..15 and core 1 on lines 16..31
//      at the same time (MODE=0);
//   2. corner turn of the whole segment into a second buffer;
//   3. azimuth compression of the transposed lines, split the same way
//      (MODE=1).
// The references are spectra of unit impulses at MR and MA, so matched
// filtering is a known circular shift and the final image must equal
// raw[(az+MA) mod 32][(rg+MR) mod 32] at image position [rg][az]. Every
// pass is also checked on its own against a snapshot of its input.
//
// Mechanisms counted (each must happen at least once): both compression
// cores busy at once; bursts from the two cores interleaved on the memory
// port; a burst split at a 4 KB boundary; corner-turn fetch and write
// overlapping (ping-pong); the switch from range to azimuth mode (the azimuth reference is fetched).
module tb_sar_processor;
  import sar_pkg::*;

  localparam int unsigned N = 32, BLK = 8, NR = 2;
  localparam int unsigned MR = 3, MA = 7;
  localparam logic [31:0] BASE = 32'h44A0_0000;
  localparam longint RAW = 64'h1000_0F80;      // lines cross a 4 KB boundary
  localparam longint CT  = 64'h2000_0000;
  localparam longint RG  = 64'h0800_0000, AZ = 64'h0900_0000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  c_req;
  axil_resp_t c_resp;
  axi_req_t   m_req;
  axi_resp_t  m_resp;
  logic [NR:0] irq;

  sar_processor #(.N_FFT(N), .NUM_RCAC(NR), .NUM_COR(1), .COR_BLK(BLK)) dut (
    .clk, .rst_n, .s_ctrl_req(c_req), .s_ctrl_resp(c_resp),
    .m_mem_req(m_req), .m_mem_resp(m_resp), .irq
  );
  axi_mem_model #(.STALL_PCT(20)) u_mem (.clk, .rst_n, .req(m_req), .resp(m_resp));
  axil_host u_host (.clk, .req(c_req), .resp(c_resp));

  int checks = 0, failures = 0;
  int n_parallel = 0, n_interleave = 0, n_split = 0, n_overlap = 0, n_mode_switch = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ bus observers
  logic rd_open = 0, wr_open = 0, cor_phase = 0;
  int   last_band = -1;
  always @(posedge clk) begin
    if (m_req.ar_valid && m_resp.ar_ready) begin
      rd_open <= 1;
      // the azimuth reference is fetched only in azimuth mode
      if (longint'(m_req.ar.addr) == AZ) n_mode_switch++;
      // burst shorter than a line that ends exactly on a 4 KB boundary
      if (!cor_phase && int'(m_req.ar.len) + 1 < int'(N) &&
          ((longint'(m_req.ar.addr) + (longint'(m_req.ar.len) + 1) * 8) % 4096) == 0)
        n_split++;
      // which band of lines (core) the burst belongs to
      if (!cor_phase && (m_req.ar.addr >= 32'(RAW) || m_req.ar.addr >= 32'(CT))) begin
        int band;
        longint base;
        base = (m_req.ar.addr >= 32'(CT)) ? CT : RAW;
        band = int'((longint'(m_req.ar.addr) - base) / (N * 8) / (N / NR));
        if (longint'(m_req.ar.addr) - base < N * N * 8) begin
          if (last_band >= 0 && band != last_band) n_interleave++;
          last_band = band;
        end
      end
    end else if (m_resp.r_valid && m_req.r_ready && m_resp.r_last) rd_open <= 0;
    if (m_req.aw_valid && m_resp.aw_ready) wr_open <= 1;
    else if (m_resp.b_valid && m_req.b_ready) wr_open <= 0;
    if (cor_phase && rd_open && wr_open) n_overlap++;
  end

  // ---------------------------------------------------------- host side
  function automatic logic [31:0] win(input int core, input int reg_idx);
    return BASE + 32'(core) * 32'h10000 + 32'(reg_idx * 4);
  endfunction

  task automatic wr(input int core, input int reg_idx, input logic [31:0] v);
    logic [1:0] r;
    u_host.write(win(core, reg_idx), v, r);
    checks++;
    if (r != RESP_OKAY) begin failures++; $display("FAIL write response %0d", r); end
  endtask

  task automatic rd(input int core, input int reg_idx, output logic [31:0] v);
    logic [1:0] r;
    u_host.read(win(core, reg_idx), v, r);
  endtask

  task automatic start_rcac(input int core, input longint data, input int mode, input int first, input int num);
    wr(core, 1, 32'(data));
    wr(core, 2, 32'(RG));
    wr(core, 3, 32'(AZ));
    wr(core, 4, 32'(mode));
    wr(core, 5, first);
    wr(core, 6, num);
    wr(core, 0, 1);
  endtask

  // poll both compression cores until done, noting when both ran together
  task automatic wait_rcacs();
    logic [31:0] s0, s1;
    do begin
      rd(0, 0, s0);
      rd(1, 0, s1);
      if (s0[0] && s1[0]) n_parallel++;
    end while (!(s0[1] && s1[1]));
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

  cplx_t raw [N][N], snap [N][N];

  initial begin
    real a;
    logic [31:0] st;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int l = 0; l < N; l++)
      for (int n = 0; n < N; n++) begin
        raw[l][n].re = 32'($signed($urandom_range(131072)) - 65536);
        raw[l][n].im = 32'($signed($urandom_range(131072)) - 65536);
        u_mem.poke(RAW + (l * N + n) * 8, raw[l][n]);
      end
    for (int k = 0; k < N; k++) begin
      a = -2.0 * PI * k * MR / N;
      u_mem.poke(RG + k * 8, pack($floor(65536.0 * $cos(a) + 0.5), $floor(65536.0 * $sin(a) + 0.5)));
      a = -2.0 * PI * k * MA / N;
      u_mem.poke(AZ + k * 8, pack($floor(65536.0 * $cos(a) + 0.5), $floor(65536.0 * $sin(a) + 0.5)));
    end

    // ---- 1. range compression on two cores
    for (int l = 0; l < N; l++) for (int n = 0; n < N; n++) snap[l][n] = u_mem.peek(RAW + (l * N + n) * 8);
    start_rcac(0, RAW, 0, 0, N / 2);
    start_rcac(1, RAW, 0, N / 2, N / 2);
    wait_rcacs();
    for (int l = 0; l < N; l++)
      for (int n = 0; n < N; n++)
        check(RAW + (l * N + n) * 8, snap[l][(n + MR) % N], 8, "range compression");

    // ---- 2. corner turn
    for (int l = 0; l < N; l++) for (int n = 0; n < N; n++) snap[l][n] = u_mem.peek(RAW + (l * N + n) * 8);
    cor_phase = 1;
    wr(NR, 1, 32'(RAW));
    wr(NR, 2, 32'(CT));
    wr(NR, 3, N);
    wr(NR, 4, N);
    wr(NR, 5, 0);
    wr(NR, 6, N);
    wr(NR, 0, 1);
    do rd(NR, 0, st); while (!st[1]);
    checks++;
    if (!irq[NR]) begin failures++; $display("FAIL corner-turn irq low"); end
    cor_phase = 0;
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++)
        check(CT + (c * N + r) * 8, snap[r][c], 0, "corner turn");

    // ---- 3. azimuth compression on two cores (mode switch)
    for (int l = 0; l < N; l++) for (int n = 0; n < N; n++) snap[l][n] = u_mem.peek(CT + (l * N + n) * 8);
    start_rcac(0, CT, 1, 0, N / 2);
    start_rcac(1, CT, 1, N / 2, N / 2);
    rd(0, 4, st);
    checks++;
    if (st != 1) begin failures++; $display("FAIL mode register %0d", st); end
    wait_rcacs();
    for (int l = 0; l < N; l++)
      for (int n = 0; n < N; n++)
        check(CT + (l * N + n) * 8, snap[l][(n + MA) % N], 8, "azimuth compression");

    // ---- whole flow against the raw data
    for (int rg = 0; rg < N; rg++)
      for (int az = 0; az < N; az++)
        check(CT + (rg * N + az) * 8, raw[(az + MA) % N][(rg + MR) % N], 16, "image");

    checks += 5;
    if (n_parallel == 0)    begin failures++; $display("FAIL cores never ran in parallel"); end
    if (n_interleave == 0)  begin failures++; $display("FAIL bursts of the two cores never interleaved"); end
    if (n_split == 0)       begin failures++; $display("FAIL no burst split at 4 KB"); end
    if (n_overlap == 0)     begin failures++; $display("FAIL corner-turn fetch and write never overlapped"); end
    if (n_mode_switch == 0) begin failures++; $display("FAIL mode switch not seen"); end
    $display("parallel polls %0d, interleaved bursts %0d, 4 KB splits %0d, overlap cycles %0d, mode switches %0d",
             n_parallel, n_interleave, n_split, n_overlap, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
