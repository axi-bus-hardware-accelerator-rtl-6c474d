// ha_ctrl_regs: AXI-Lite control port of an accelerator (its host-side bus
// interface).
//
// The host (the soft processor) writes the accelerator's arguments and
// starts it here, then polls for completion or takes the done level as an
// interrupt. Register map (byte offsets, 32-bit registers):
//   0x00 CTRL  bit0 start: write 1 to start; reads 1 until the run ends
//              bit1 done:  set when the run ends, cleared by the next start
//              bit2 idle
//   0x04 + 4*i argument i, i = 0 .. NARGS-1 (read/write)
// Writes take AW and W together and answer with one B beat; reads answer
// one cycle after AR. Byte strobes are ignored (whole-word writes).
// Arguments must not be changed while the accelerator runs.
//
// The start/done/idle handshake mirrors the usual layout of HLS-generated
// control ports; the exact offsets are this design's choice.
module ha_ctrl_regs
  import sar_pkg::*;
#(
  parameter int unsigned NARGS = HA_NARGS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_req,
  output axil_resp_t  s_resp,
  output logic [31:0] args [NARGS],
  output logic        start,      // one-cycle pulse
  input  logic        busy,       // accelerator running
  input  logic        finish,     // one-cycle pulse at the end of a run
  output logic        done        // sticky done, usable as an interrupt
);

  localparam int unsigned IW = $clog2(NARGS + 1);

  logic          running;
  logic          wr_fire;
  logic [IW-1:0] widx, ridx;

  logic          b_valid, r_valid;
  logic [1:0]    b_resp, r_resp;
  logic [31:0]   r_data;

  assign wr_fire = s_req.aw_valid && s_req.w_valid && !b_valid;
  assign widx    = IW'(s_req.aw_addr[IW+1:2]);
  assign ridx    = IW'(s_req.ar_addr[IW+1:2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NARGS; i++) args[i] <= '0;
      start          <= 1'b0;
      running        <= 1'b0;
      done           <= 1'b0;
      b_valid        <= 1'b0;
      b_resp         <= RESP_OKAY;
      r_valid        <= 1'b0;
      r_resp         <= RESP_OKAY;
      r_data         <= '0;
    end else begin
      start <= 1'b0;
      if (finish) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
      // write channel
      if (wr_fire) begin
        b_valid <= 1'b1;
        b_resp  <= RESP_OKAY;
        if (widx == '0) begin
          if (s_req.w_data[0] && !running && !busy) begin
            start   <= 1'b1;
            running <= 1'b1;
            done    <= 1'b0;
          end
        end else if (32'(widx) <= NARGS) begin
          args[widx - IW'(1)] <= s_req.w_data;
        end else begin
          b_resp <= RESP_DECERR;
        end
      end else if (b_valid && s_req.b_ready) begin
        b_valid <= 1'b0;
      end
      // read channel
      if (s_req.ar_valid && !r_valid) begin
        r_valid <= 1'b1;
        r_resp  <= RESP_OKAY;
        if (ridx == '0)
          r_data <= {29'd0, !(running || busy), done, running || busy};
        else if (32'(ridx) <= NARGS)
          r_data <= args[ridx - IW'(1)];
        else begin
          r_data <= '0;
          r_resp <= RESP_DECERR;
        end
      end else if (r_valid && s_req.r_ready) begin
        r_valid <= 1'b0;
      end
    end
  end

  always_comb begin
    s_resp          = '0;
    s_resp.aw_ready = wr_fire;
    s_resp.w_ready  = wr_fire;
    s_resp.b_valid  = b_valid;
    s_resp.b_resp   = b_resp;
    s_resp.ar_ready = !r_valid;
    s_resp.r_valid  = r_valid;
    s_resp.r_resp   = r_resp;
    s_resp.r_data   = r_data;
  end

endmodule
