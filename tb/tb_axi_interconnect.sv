// tb_axi_interconnect: self-checking test of the shared memory-port
// interconnect.
//
// Three burst masters (axi_dma instances) run at once through the
// interconnect into one behavioural memory with back-pressure. Each master
// writes its own region (with bursts split at 4 KB boundaries) and then
// reads back the region written by another master, so data routed to the
// wrong master or written from the wrong master is caught. The test counts
// cycles in which several masters requested the same direction (contention)
// and cycles in which a read and a write ran for different masters at once,
// and fails if either never happened.
module tb_axi_interconnect;
  import sar_pkg::*;

  localparam int unsigned NM = 3;
  localparam int unsigned CNT = 700;     // samples per region (crosses 4 KB)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t  s_req [NM];
  axi_resp_t s_resp [NM];
  axi_req_t  m_req;
  axi_resp_t m_resp;

  axi_interconnect #(.NM(NM)) dut (.clk, .rst_n, .s_req, .s_resp, .m_req, .m_resp);
  axi_mem_model #(.STALL_PCT(25)) u_mem (.clk, .rst_n, .req(m_req), .resp(m_resp));

  logic        rd_start [NM], wr_start [NM], rd_busy [NM], wr_busy [NM], wr_done [NM];
  logic        rd_valid [NM], rd_ready [NM], wr_valid [NM], wr_ready [NM];
  logic [31:0] rd_addr [NM], wr_addr [NM];
  cplx_t       rd_data [NM], wr_data [NM];

  for (genvar g = 0; g < NM; g++) begin : g_m
    axi_dma u_dma (
      .clk, .rst_n,
      .rd_start(rd_start[g]), .rd_addr(rd_addr[g]), .rd_count(CNT), .rd_busy(rd_busy[g]),
      .rd_valid(rd_valid[g]), .rd_data(rd_data[g]), .rd_ready(rd_ready[g]),
      .wr_start(wr_start[g]), .wr_addr(wr_addr[g]), .wr_count(CNT), .wr_busy(wr_busy[g]),
      .wr_done(wr_done[g]), .wr_valid(wr_valid[g]), .wr_data(wr_data[g]), .wr_ready(wr_ready[g]),
      .m_req(s_req[g]), .m_resp(s_resp[g])
    );
  end

  int checks = 0, failures = 0, contention = 0, concurrent = 0;
  logic wr_written [NM];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    int nar, naw;
    nar = 0; naw = 0;
    for (int i = 0; i < NM; i++) begin
      nar += int'(s_req[i].ar_valid);
      naw += int'(s_req[i].aw_valid);
    end
    if (nar > 1 || naw > 1) contention++;
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < NM; j++)
        if (i != j && s_resp[i].r_valid && s_req[i].r_ready && s_req[j].w_valid && s_resp[j].w_ready)
          concurrent++;
  end

  function automatic logic [63:0] pat(input int m, input int i);
    return {8'hA0 + 8'(m), 24'(i), 32'(i * 2654435761)};
  endfunction

  function automatic logic [31:0] region(input int m);
    return 32'h0010_0000 + 32'(m) * 32'h0001_0000 + 32'h0c00;   // not 4 KB aligned
  endfunction

  // one master: write own region, then read the next master's region
  task automatic master(input int m);
    int sent = 0, recv = 0, src;
    src = (m + 1) % NM;
    @(negedge clk);
    wr_addr[m] = region(m); wr_start[m] = 1;
    @(negedge clk); wr_start[m] = 0;
    while (sent < CNT) begin
      wr_valid[m] = ($urandom_range(3) != 0);
      wr_data[m]  = pat(m, sent);
      #1;
      if (wr_valid[m] && wr_ready[m]) sent++;
      @(negedge clk);
    end
    wr_valid[m] = 0;
    while (wr_busy[m]) @(negedge clk);
    // wait for the source master's data to be in memory
    wait (wr_written[src]);
    @(negedge clk);
    rd_addr[m] = region(src); rd_start[m] = 1;
    @(negedge clk); rd_start[m] = 0;
    while (recv < CNT) begin
      rd_ready[m] = ($urandom_range(3) != 0);
      #1;
      if (rd_valid[m] && rd_ready[m]) begin
        checks++;
        if (rd_data[m] !== pat(src, recv)) begin
          failures++;
          if (failures < 10) $display("FAIL master %0d sample %0d: %h", m, recv, rd_data[m]);
        end
        recv++;
      end
      @(negedge clk);
    end
    rd_ready[m] = 0;
  endtask

  initial begin
    for (int i = 0; i < NM; i++) begin
      rd_start[i] = 0; wr_start[i] = 0; rd_ready[i] = 0; wr_valid[i] = 0;
      rd_addr[i] = 0; wr_addr[i] = 0; wr_data[i] = '0; wr_written[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin master(0); end
      begin master(1); end
      begin master(2); end
    join_none
    // flag each region once its write command has completed
    fork
      begin @(posedge wr_done[0]); wr_written[0] = 1; end
      begin @(posedge wr_done[1]); wr_written[1] = 1; end
      begin @(posedge wr_done[2]); wr_written[2] = 1; end
    join
    wait fork;
    checks += 2;
    if (contention == 0) begin failures++; $display("FAIL no contention happened"); end
    if (concurrent == 0) begin failures++; $display("FAIL reads and writes never overlapped"); end
    $display("contention cycles %0d, concurrent read/write cycles %0d", contention, concurrent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
