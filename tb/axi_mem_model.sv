// axi_mem_model: behavioural AXI4 slave memory for the testbenches, standing
// in for the DDR3 memory controller and DRAM.
//
// Storage is a sparse associative array of 64-bit words, so a full
// 8192 x 8192 segment address space costs only what is touched. Reads and
// writes are served one burst at a time per direction (INCR bursts only).
// STALL_PCT inserts random ready/valid gaps to exercise back-pressure.
// Testbenches load and inspect the contents with poke() and peek().
// Words never written read back as zero.
module axi_mem_model
  import sar_pkg::*;
#(
  parameter int unsigned STALL_PCT = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  req,
  output axi_resp_t resp
);

  logic [63:0] mem [longint unsigned];

  function automatic void poke(input longint unsigned byte_addr, input logic [63:0] v);
    mem[byte_addr >> 3] = v;
  endfunction

  function automatic logic [63:0] peek(input longint unsigned byte_addr);
    if (mem.exists(byte_addr >> 3)) return mem[byte_addr >> 3];
    return 64'd0;
  endfunction

  function automatic logic go();
    return ($urandom_range(99) >= STALL_PCT);
  endfunction

  // read side
  logic        r_act;
  logic [31:0] r_addr;
  logic [8:0]  r_left;
  logic        r_gap;
  int unsigned reads, writes;

  // write side
  logic        w_act, b_pend;
  logic [31:0] w_addr;
  logic [8:0]  w_left;
  logic        w_gap;

  always_comb begin
    resp          = '0;
    resp.ar_ready = !r_act;
    resp.r_valid  = r_act && !r_gap;
    resp.r_data   = peek(longint'(r_addr));
    resp.r_last   = (r_left == 9'd1);
    resp.r_resp   = RESP_OKAY;
    resp.aw_ready = !w_act && !b_pend;
    resp.w_ready  = w_act && !w_gap;
    resp.b_valid  = b_pend;
    resp.b_resp   = RESP_OKAY;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_act <= 1'b0; r_addr <= '0; r_left <= '0; r_gap <= 1'b0;
      w_act <= 1'b0; b_pend <= 1'b0; w_addr <= '0; w_left <= '0; w_gap <= 1'b0;
      reads <= 0; writes <= 0;
    end else begin
      r_gap <= !go();
      w_gap <= !go();
      if (req.ar_valid && resp.ar_ready) begin
        r_act  <= 1'b1;
        r_addr <= req.ar.addr;
        r_left <= 9'(req.ar.len) + 9'd1;
        reads  <= reads + 1;
        if (req.ar.burst != 2'b01 || req.ar.size != 3'd3)
          $error("axi_mem_model: unsupported read burst");
        if ({1'b0, req.ar.addr[11:0]} + ((13'(req.ar.len) + 13'd1) << 3) > 13'h1000)
          $error("axi_mem_model: read burst crosses 4 KB");
      end else if (resp.r_valid && req.r_ready) begin
        r_addr <= r_addr + 32'd8;
        r_left <= r_left - 9'd1;
        if (r_left == 9'd1) r_act <= 1'b0;
      end
      if (req.aw_valid && resp.aw_ready) begin
        w_act  <= 1'b1;
        w_addr <= req.aw.addr;
        w_left <= 9'(req.aw.len) + 9'd1;
        writes <= writes + 1;
        if ({1'b0, req.aw.addr[11:0]} + ((13'(req.aw.len) + 13'd1) << 3) > 13'h1000)
          $error("axi_mem_model: write burst crosses 4 KB");
      end else if (req.w_valid && resp.w_ready) begin
        mem[longint'(w_addr) >> 3] = req.w_data;
        w_addr <= w_addr + 32'd8;
        w_left <= w_left - 9'd1;
        if ((w_left == 9'd1) != req.w_last) $error("axi_mem_model: WLAST misplaced");
        if (w_left == 9'd1) begin
          w_act  <= 1'b0;
          b_pend <= 1'b1;
        end
      end
      if (b_pend && req.b_ready) b_pend <= 1'b0;
    end
  end

endmodule
