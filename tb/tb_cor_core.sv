// tb_cor_core: self-checking test of the block corner-turn core.
//
// A 32-row x 48-column segment of distinct samples is transposed with
// 8 x 8 blocks through a memory with random back-pressure; every sample of
// the destination is checked. A second run transposes only rows 8..23 into
// a fresh buffer (the band a second core would take) and checks that the
// rest of the destination stays untouched. The test also counts the cycles
// in which fetching one block overlapped writing the previous one, and
// fails if the ping-pong overlap never happened.
module tb_cor_core;
  import sar_pkg::*;

  localparam int unsigned BLK = 8, NROWS = 32, NCOLS = 48;
  localparam longint SRC = 64'h2000_0000, DST = 64'h3000_0000, DST2 = 64'h3800_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  c_req;
  axil_resp_t c_resp;
  axi_req_t   m_req;
  axi_resp_t  m_resp;
  logic       irq;

  cor_core #(.BLK(BLK)) dut (
    .clk, .rst_n, .s_ctrl_req(c_req), .s_ctrl_resp(c_resp),
    .m_axi_req(m_req), .m_axi_resp(m_resp), .irq
  );
  axi_mem_model #(.STALL_PCT(20)) u_mem (.clk, .rst_n, .req(m_req), .resp(m_resp));
  axil_host u_host (.clk, .req(c_req), .resp(c_resp));

  int checks = 0, failures = 0, overlap_cycles = 0;

  // a read burst and a write burst outstanding at the same time on the bus
  logic rd_open = 0, wr_open = 0;
  always @(posedge clk) begin
    if (m_req.ar_valid && m_resp.ar_ready) rd_open <= 1;
    else if (m_resp.r_valid && m_req.r_ready && m_resp.r_last) rd_open <= 0;
    if (m_req.aw_valid && m_resp.aw_ready) wr_open <= 1;
    else if (m_resp.b_valid && m_req.b_ready) wr_open <= 0;
    if (rd_open && wr_open) overlap_cycles++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] tag(input int r, input int c);
    return {16'h5A5A, 16'(r), 16'hC3C3, 16'(c)};
  endfunction

  task automatic run(input longint dst, input int first, input int num);
    logic [1:0] br;
    logic [31:0] st;
    u_host.write(32'h04, 32'(SRC), br);
    u_host.write(32'h08, 32'(dst), br);
    u_host.write(32'h0c, NCOLS, br);
    u_host.write(32'h10, NROWS, br);
    u_host.write(32'h14, first, br);
    u_host.write(32'h18, num, br);
    u_host.write(32'h00, 1, br);
    u_host.read(32'h00, st, br);
    checks++;
    if (st[2:0] != 3'b001) begin failures++; $display("FAIL status after start %b", st[2:0]); end
    while (!irq) @(negedge clk);
    u_host.read(32'h00, st, br);
    checks++;
    if (st[2:0] != 3'b110) begin failures++; $display("FAIL status %b", st[2:0]); end
  endtask

  initial begin
    logic [63:0] got;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < NCOLS; c++)
        u_mem.poke(SRC + (r * NCOLS + c) * 8, tag(r, c));

    // whole segment
    run(DST, 0, NROWS);
    for (int c = 0; c < NCOLS; c++)
      for (int r = 0; r < NROWS; r++) begin
        got = u_mem.peek(DST + (c * NROWS + r) * 8);
        checks++;
        if (got !== tag(r, c)) begin
          failures++;
          if (failures < 10) $display("FAIL dst(%0d,%0d) = %h", c, r, got);
        end
      end

    // band of rows 8..23 only
    run(DST2, 8, 16);
    for (int c = 0; c < NCOLS; c++)
      for (int r = 0; r < NROWS; r++) begin
        got = u_mem.peek(DST2 + (c * NROWS + r) * 8);
        checks++;
        if (got !== ((r >= 8 && r < 24) ? tag(r, c) : 64'd0)) begin
          failures++;
          if (failures < 10) $display("FAIL band dst(%0d,%0d) = %h", c, r, got);
        end
      end

    checks++;
    if (overlap_cycles == 0) begin failures++; $display("FAIL fetch and write never overlapped"); end
    $display("ping-pong overlap cycles: %0d", overlap_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
