// tb_rate_workload: the arbitrator under the transfer rate used for a real
// configuration download, at its default sizes.
//
// The client sends 400 bytes of TCP payload every 25 us. At a 71.777 MHz
// RAD clock that is one packet every 1794 clocks. Each packet gives
//  - the outgoing TCP flow: the whole packet (400 bytes payload, 40 bytes of
//    IP and TCP header, 8 bytes of AAL5 trailer = 448 bytes) in 10 cells of
//    48 payload bytes, sent back to back as 14-word cells;
//  - the client flow: the 400 payload bytes, 100 words, in one appl_tde burst.
//    They are control cells of 14 words each, so cells straddle packets.
// While tca_out_app is low the upstream holds the next packet back (the
// packet in progress completes). The arbitrator can send one cell every
// 14 + 150 = 164 clocks, about 10.9 cells per packet period, while the
// traffic above asks for about 17.1, so the client FIFO fills to the TCA
// threshold and the upstream is throttled.
//
// Checked: every word of both flows comes out in order, nothing is lost;
// start-of-cell pulses are at least 164 clocks apart and exactly 164 while
// throttled; TCA is dropped at least once. The achieved client rate is
// printed in bytes per 25 us.
module tb_rate_workload;
  import tcp_prog_pkg::*;

  localparam int PERIOD     = 1794;   // clocks per 25 us at 71.777 MHz
  localparam int TCP_CELLS  = 10;     // cells per 448-byte AAL5 frame
  localparam int CC_WORDS   = 100;    // 400 payload bytes
  localparam int N_PACKETS  = 150;

  logic  rad_clk = 0, rad_reset_l = 1;
  logic  tcpmod_sod = 0, appl_tde = 0, appl_eof = 0;
  word_t tcpmod_data = '0, appl_data = '0, d_sw_xmit;
  logic  soc_sw_xmit, tca_out_app;
  int checks = 0, failures = 0;

  arbitrator dut (.*);

  always #5 rad_clk = ~rad_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at clock %0d", what, clk_n); end
  endtask

  int clk_n = 0;
  always @(posedge rad_clk) clk_n <= clk_n + 1;

  word_t tref[$], cref[$];
  int tseq = 0, cseq = 0;
  int n_held = 0;

  task automatic send_tcp_cells(input int n);
    for (int c = 0; c < n; c++)
      for (int w = 0; w < CELL_WORDS; w++) begin
        @(negedge rad_clk);
        tcpmod_sod  = (w == 0);
        tcpmod_data = 32'hA000_0000 | tseq;
        tref.push_back(tcpmod_data);
        tseq++;
      end
    @(negedge rad_clk);
    tcpmod_sod = 0; tcpmod_data = '0;
  endtask

  task automatic send_cc(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge rad_clk);
      appl_tde  = 1;
      appl_eof  = (i == n - 1);
      appl_data = 32'hC000_0000 | cseq;
      cref.push_back(appl_data);
      cseq++;
    end
    @(negedge rad_clk);
    appl_tde = 0; appl_eof = 0; appl_data = '0;
  endtask

  // ---- output monitor ----
  int cap = 14;
  bit cur_tcp;
  int last_sod = -1, first_sod = -1;
  int n_cells_t = 0, n_cells_c = 0, n_tight = 0, n_tca_fall = 0;
  logic tca_prev = 1;

  always @(posedge rad_clk) if (rad_reset_l) begin
    #1;
    if (tca_prev && !tca_out_app) n_tca_fall++;
    tca_prev = tca_out_app;
    if (soc_sw_xmit) begin
      check(cap == 14, "start of cell inside a cell");
      if (last_sod >= 0) begin
        check(clk_n - last_sod >= 14 + 150, "cell spacing");
        if (!tca_out_app) begin
          check(clk_n - last_sod == 14 + 150, "spacing while throttled");
          n_tight++;
        end
      end else first_sod = clk_n;
      last_sod = clk_n;
      cur_tcp = (d_sw_xmit[31:28] == 4'hA);
      if (cur_tcp) n_cells_t++; else n_cells_c++;
      cap = 0;
    end
    if (cap < 14) begin
      word_t exp;
      if (cur_tcp) exp = (tref.size() > 0) ? tref.pop_front() : 32'hDEAD_BEEF;
      else         exp = (cref.size() > 0) ? cref.pop_front() : 32'hDEAD_BEEF;
      check(d_sw_xmit == exp, "cell word");
      cap++;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge rad_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_end;
    #1 rad_reset_l = 0;
    repeat (4) @(posedge rad_clk);
    @(negedge rad_clk) rad_reset_l = 1;
    t0 = clk_n;
    for (int p = 0; p < N_PACKETS; p++) begin
      int start;
      while (!tca_out_app) begin n_held++; @(posedge rad_clk); end
      start = clk_n;
      fork send_tcp_cells(TCP_CELLS); send_cc(CC_WORDS); join
      while (clk_n - start < PERIOD) @(posedge rad_clk);
    end
    t_end = clk_n;
    // drain what forms whole cells
    while (cref.size() >= 14 || tref.size() > 0 || cap < 14) @(posedge rad_clk);
    repeat (400) @(posedge rad_clk);
    check(tref.size() == 0, "all TCP words delivered");
    check(cref.size() == (cseq % 14), "all complete client cells delivered");
    check(n_tca_fall > 0, "TCA throttled the upstream");
    check(n_tight > 0, "output ran at full rate");
    check(n_cells_t == N_PACKETS * TCP_CELLS, "TCP cell count");
    $display("packets=%0d in %0d clocks (%0d unthrottled); held %0d clocks; cells tcp=%0d cc=%0d",
             N_PACKETS, t_end - t0, N_PACKETS * PERIOD, n_held, n_cells_t, n_cells_c);
    $display("client rate achieved: %0d bytes per 25 us (offered 400)",
             (N_PACKETS * CC_WORDS * 4 * PERIOD) / (t_end - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
