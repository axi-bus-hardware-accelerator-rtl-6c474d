// tb_axil_xbar: self-checking test of the AXI-Lite control interconnect.
//
// Three accelerator register blocks (ha_ctrl_regs) sit behind the crossbar.
// The test writes distinct argument values through each 64 KB window,
// reads them all back, checks that a start written to one window pulses
// only that block's start, and that addresses outside every window get a
// DECERR response on both writes and reads.
module tb_axil_xbar;
  import sar_pkg::*;

  localparam int unsigned NS = 3;
  localparam logic [31:0] BASE = 32'h44A0_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  h_req;
  axil_resp_t h_resp;
  axil_req_t  m_req  [NS];
  axil_resp_t m_resp [NS];

  axil_xbar #(.NS(NS), .BASE(BASE)) dut (.clk, .rst_n, .s_req(h_req), .s_resp(h_resp), .m_req, .m_resp);
  axil_host u_host (.clk, .req(h_req), .resp(h_resp));

  logic [31:0] args [NS][HA_NARGS];
  logic        start [NS], done [NS];
  int          starts [NS];

  for (genvar g = 0; g < NS; g++) begin : g_s
    ha_ctrl_regs u_regs (
      .clk, .rst_n, .s_req(m_req[g]), .s_resp(m_resp[g]), .args(args[g]),
      .start(start[g]), .busy(1'b0), .finish(start[g]), .done(done[g])
    );
    always @(posedge clk) if (start[g]) starts[g]++;
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [1:0]  r;
    logic [31:0] d;
    for (int i = 0; i < NS; i++) starts[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++)
      for (int a = 0; a < HA_NARGS; a++) begin
        u_host.write(BASE + 32'(s) * 32'h10000 + 32'(4 + 4 * a), 32'hC0DE_0000 + 32'(s * 16 + a), r);
        expect_eq(32'(r), 32'(RESP_OKAY), "write response");
      end
    for (int s = 0; s < NS; s++)
      for (int a = 0; a < HA_NARGS; a++) begin
        u_host.read(BASE + 32'(s) * 32'h10000 + 32'(4 + 4 * a), d, r);
        expect_eq(d, 32'hC0DE_0000 + 32'(s * 16 + a), "read back");
        expect_eq(32'(r), 32'(RESP_OKAY), "read response");
      end
    // start only block 1
    u_host.write(BASE + 32'h10000, 32'h1, r);
    repeat (3) @(negedge clk);
    expect_eq(32'(starts[0]), 0, "block 0 starts");
    expect_eq(32'(starts[1]), 1, "block 1 starts");
    expect_eq(32'(starts[2]), 0, "block 2 starts");
    u_host.read(BASE + 32'h10000, d, r);
    expect_eq(d & 32'h7, 32'h6, "block 1 done+idle");
    u_host.read(BASE, d, r);
    expect_eq(d & 32'h7, 32'h4, "block 0 idle, not done");
    // outside every window
    u_host.write(BASE + 32'(NS) * 32'h10000, 32'h1234, r);
    expect_eq(32'(r), 32'(RESP_DECERR), "write decode error");
    u_host.read(BASE - 32'h4, d, r);
    expect_eq(32'(r), 32'(RESP_DECERR), "read decode error");
    // nothing changed by the stray write
    u_host.read(BASE + 32'h20000 + 32'h4, d, r);
    expect_eq(d, 32'hC0DE_0020, "block 2 arg 0 intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
