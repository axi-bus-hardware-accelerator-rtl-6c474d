// axil_host: behavioural AXI-Lite master for the testbenches, standing in
// for the host soft processor. Testbenches call write() and read() through
// the instance; each completes one transaction before returning. Inputs
// change only just after a falling edge, and ready/valid are sampled once
// they have settled, one time unit later.
module axil_host
  import sar_pkg::*;
(
  input  logic       clk,
  output axil_req_t  req,
  input  axil_resp_t resp
);

  initial req = '0;

  task automatic write(input logic [31:0] a, input logic [31:0] d, output logic [1:0] bresp);
    logic aw_ok = 0, w_ok = 0;
    @(negedge clk);
    req.aw_addr = a; req.aw_valid = 1; req.w_data = d; req.w_strb = '1; req.w_valid = 1;
    req.b_ready = 1;
    while (!(aw_ok && w_ok)) begin
      #1;
      if (req.aw_valid && resp.aw_ready) aw_ok = 1;
      if (req.w_valid && resp.w_ready)   w_ok = 1;
      @(negedge clk);
      if (aw_ok) req.aw_valid = 0;
      if (w_ok)  req.w_valid  = 0;
    end
    #1;
    while (!resp.b_valid) begin @(negedge clk); #1; end
    bresp = resp.b_resp;
    @(negedge clk); req.b_ready = 0;
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] d, output logic [1:0] rresp);
    @(negedge clk);
    req.ar_addr = a; req.ar_valid = 1; req.r_ready = 1;
    #1;
    while (!resp.ar_ready) begin @(negedge clk); #1; end
    @(negedge clk); req.ar_valid = 0;
    #1;
    while (!resp.r_valid) begin @(negedge clk); #1; end
    d = resp.r_data;
    rresp = resp.r_resp;
    @(negedge clk); req.r_ready = 0;
  endtask

endmodule
