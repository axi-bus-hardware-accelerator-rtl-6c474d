// tb_sar_workloads: the processor configurations the design is meant to
// be compared over, each run through the whole focusing flow at reduced
// segment size (see sar_flow_env):
//   * number of cores: 1, 2 and 4 compression cores with as many
//     corner-turn cores (32 x 32 segment, 8 x 8 blocks);
//   * segment size: 16, 32 and 64 samples per line with the default core
//     mix (two compression cores, one corner-turn core);
//   * corner-turn block size: 4, 8 and 16 with the default core mix.
// Every build must produce the correct image. On top of that:
//   * each compression pass must take at least the cycles its FFTs need,
//     lines/core * (2*log2(N)*(N/2+3) + 2N), and at most 1.6 times that
//     plus a fixed allowance for the host and the reference load;
//   * compression speed-up over one core must reach 1.8 for two cores and
//     3.2 for four (the work divides evenly and the cores only share the
//     memory port);
//   * the corner turn shares one memory port, so extra cores may not speed
//     it up, but must not slow it down by more than 10 %; no build may move
//     more than one sample per cycle; and its time must stay within a
//     factor 2 across the block sizes.
// The measured cycle counts and speed-ups are printed.
module tb_sar_workloads;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 8;
  //                          1 core  2 cores 4 cores main   N=16   N=64   BLK=4  BLK=16
  localparam int CN   [NCFG] = '{32,    32,     32,     32,    16,    64,    32,    32};
  localparam int CNR  [NCFG] = '{1,     2,      4,      2,     2,     2,     2,     2};
  localparam int CNC  [NCFG] = '{1,     2,      4,      1,     1,     1,     1,     1};
  localparam int CBLK [NCFG] = '{8,     8,      8,      8,     8,     8,     4,     16};

  logic   go = 0;
  logic   done [NCFG];
  int     e_checks [NCFG], e_failures [NCFG];
  longint rg [NCFG], ct [NCFG], az [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_env
    sar_flow_env #(.N(CN[g]), .NR(CNR[g]), .NC(CNC[g]), .BLK(CBLK[g])) u_env (
      .clk, .rst_n, .go, .done(done[g]), .checks(e_checks[g]), .failures(e_failures[g]),
      .cyc_rg(rg[g]), .cyc_ct(ct[g]), .cyc_az(az[g])
    );
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic longint fft_bound(input int i);
    int l;
    l = $clog2(CN[i]);
    return longint'(CN[i] / CNR[i]) * longint'(2 * l * (CN[i] / 2 + 3) + 2 * CN[i]);
  endfunction

  initial begin
    bit all_done;
    real s2, s4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    go = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NCFG; i++) if (!done[i]) all_done = 0;
    end while (!all_done);

    for (int i = 0; i < NCFG; i++) begin
      checks += e_checks[i];
      failures += e_failures[i];
      $display("N=%0d cores %0d+%0d BLK=%0d: range %0d, corner turn %0d, azimuth %0d cycles (FFT bound %0d)",
               CN[i], CNR[i], CNC[i], CBLK[i], rg[i], ct[i], az[i], fft_bound(i));
      expect_true(rg[i] >= fft_bound(i) && az[i] >= fft_bound(i), $sformatf("config %0d faster than its FFTs", i));
      expect_true(rg[i] * 10 <= fft_bound(i) * 16 + 10 * (40 * CNR[i] + 4 * CN[i] + 200) &&
                  az[i] * 10 <= fft_bound(i) * 16 + 10 * (40 * CNR[i] + 4 * CN[i] + 200),
                  $sformatf("config %0d compression too slow", i));
    end

    s2 = real'(rg[0]) / real'(rg[1]);
    s4 = real'(rg[0]) / real'(rg[2]);
    $display("compression speed-up: 2 cores %.2f, 4 cores %.2f", s2, s4);
    expect_true(s2 >= 1.8, "two-core compression speed-up");
    expect_true(s4 >= 3.2, "four-core compression speed-up");
    $display("corner-turn speed-up: 2 cores %.2f, 4 cores %.2f",
             real'(ct[0]) / real'(ct[1]), real'(ct[0]) / real'(ct[2]));
    // the corner turn is bound by the single memory port: more cores may not
    // help, but must not cost more than 10 %, and no build can beat one
    // read beat per sample
    expect_true(ct[1] * 10 <= ct[0] * 11 && ct[2] * 10 <= ct[0] * 11, "corner turn slower with more cores");
    for (int i = 0; i < NCFG; i++)
      expect_true(ct[i] >= longint'(CN[i] * CN[i]), $sformatf("config %0d corner turn faster than the memory port", i));
    expect_true(ct[6] <= 2 * ct[3] && ct[3] <= 2 * ct[6] && ct[7] <= 2 * ct[3] && ct[3] <= 2 * ct[7],
                "corner-turn time depends strongly on the block size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
