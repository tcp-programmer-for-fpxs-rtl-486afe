// tb_arbitrator: end-to-end test of the arbitrator at its default sizes
// (two 4096-word FIFOs, a 150-clock gap between cells, TCA at 3000 words).
//
// The testbench plays the TCP splitter: it sends 14-word TCP cells with a
// one-clock start-of-cell pulse (single and back to back) and client words
// framed by appl_tde in bursts of random length, and it stops the client
// flow while tca_out_app is low, as the upstream would. Every word carries
// its flow and a sequence number. Checked on d_sw_xmit/soc_sw_xmit:
//  - each cell is the next 14 words of one flow, in order, nothing lost or
//    duplicated, data zero between cells, everything delivered at the end;
//  - TCP first: a client cell is never sent while the TCP FIFO certainly
//    held a whole cell, and a TCP cell only when it could have held one;
//  - start-of-cell spacing of at least 14 + 150 clocks, exactly that when a
//    cell was certainly waiting;
//  - tca_out_app low exactly while the client FIFO holds 3000 words or more,
//    with the FIFO level worked out from the words sent and the cells seen.
// Each of these mechanisms must occur at least once: back-to-back TCP cells,
// TCP chosen over a waiting client cell, a client cell sent, the gap
// enforced, TCA dropped and raised again.
module tb_arbitrator;
  import tcp_prog_pkg::*;

  localparam int SC = 150;
  localparam int TH = 3000;

  logic  rad_clk = 0, rad_reset_l = 1;
  logic  tcpmod_sod = 0, appl_tde = 0, appl_eof = 0;
  word_t tcpmod_data = '0, appl_data = '0, d_sw_xmit;
  logic  soc_sw_xmit, tca_out_app;
  int checks = 0, failures = 0;

  arbitrator dut (.*);

  always #5 rad_clk = ~rad_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at edge %0d", what, edge_n); end
  endtask

  // ---- stimulus bookkeeping ----
  word_t tref[$], cref[$];
  int tseq = 0, cseq = 0;
  int fed_t = 0, fed_c = 0;         // words presented so far
  int n_b2b = 0;

  // words presented up to and including edge k
  int edge_n = 0;
  int fed_t_h[int], fed_c_h[int];
  always @(posedge rad_clk) begin
    fed_t_h[edge_n] = fed_t + ((tcp_active) ? 1 : 0);
    fed_c_h[edge_n] = fed_c + (appl_tde ? 1 : 0);
    edge_n++;
  end
  // the word on the TCP inputs in this clock is part of a cell
  bit tcp_active = 0;

  task automatic send_tcp_cells(input int n);
    for (int c = 0; c < n; c++) begin
      for (int w = 0; w < CELL_WORDS; w++) begin
        @(negedge rad_clk);
        if (tcp_active) fed_t++;
        tcp_active  = 1;
        tcpmod_sod  = (w == 0);
        tcpmod_data = 32'hA000_0000 | tseq;
        tref.push_back(tcpmod_data);
        tseq++;
      end
    end
    if (n > 1) n_b2b += n - 1;
    @(negedge rad_clk);
    if (tcp_active) fed_t++;
    tcp_active = 0; tcpmod_sod = 0; tcpmod_data = $urandom;
  endtask

  // a client burst; pauses while TCA is low (upstream reacts in one clock)
  task automatic send_cc(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge rad_clk);
      if (appl_tde) fed_c++;
      while (!tca_out_app) begin
        appl_tde = 0; appl_eof = 0; appl_data = $urandom;
        @(negedge rad_clk);
      end
      appl_tde  = 1;
      appl_eof  = (i == n - 1);
      appl_data = 32'hC000_0000 | cseq;
      cref.push_back(appl_data);
      cseq++;
    end
    @(negedge rad_clk);
    if (appl_tde) fed_c++;
    appl_tde = 0; appl_eof = 0; appl_data = $urandom;
  endtask

  // ---- output monitor ----
  int cap = 14;
  bit cur_tcp;
  int last_sod = -1;
  int taken_t = 0, taken_c = 0;     // cells started before the current one
  int cc_sods[$];                   // edges of client-cell start pulses
  int n_cells_t = 0, n_cells_c = 0, n_tcp_over_cc = 0, n_gap = 0;
  int n_tca_fall = 0, n_tca_rise = 0;
  logic tca_prev = 1;

  // client words read from the FIFO at edges before e
  function automatic int cc_reads_before(input int e);
    int r = 0;
    foreach (cc_sods[i]) begin
      for (int k = cc_sods[i] - 1; k <= cc_sods[i] + 12; k++) if (k < e) r++;
    end
    return r;
  endfunction

  always @(posedge rad_clk) if (rad_reset_l) begin
    int e;
    #1;
    e = edge_n - 1;
    if (soc_sw_xmit) begin
      int d;
      check(cap == 14, "start of cell inside a cell");
      d = e - 2;
      cur_tcp = (d_sw_xmit[31:28] == 4'hA);
      if (cur_tcp) begin
        // could the TCP FIFO have held a cell? (words written by edge d-1)
        check(fed_t_h[d] - 14 * taken_t >= 14, "TCP cell without a full cell");
        if (fed_c_h[d - 3] - 14 * taken_c >= 14) n_tcp_over_cc++;
        taken_t++; n_cells_t++;
      end else begin
        check(fed_c_h[d] - 14 * taken_c >= 14, "client cell without a full cell");
        check(fed_t_h[d - 3] - 14 * taken_t < 14, "client cell while TCP had a cell");
        taken_c++; n_cells_c++;
        cc_sods.push_back(e);
      end
      if (last_sod >= 0) begin
        int dmin;
        dmin = last_sod - 2 + 14 + SC;
        check(e - last_sod >= 14 + SC, "gap too short");
        if (fed_t_h[dmin - 3] - 14 * (taken_t - (cur_tcp ? 1 : 0)) >= 14 ||
            fed_c_h[dmin - 3] - 14 * (taken_c - (cur_tcp ? 0 : 1)) >= 14) begin
          check(e - last_sod == 14 + SC, "gap not exact");
          n_gap++;
        end
      end
      last_sod = e;
      cap = 0;
    end
    if (cap < 14) begin
      word_t exp;
      if (cur_tcp) exp = (tref.size() > 0) ? tref.pop_front() : 32'hDEAD_BEEF;
      else         exp = (cref.size() > 0) ? cref.pop_front() : 32'hDEAD_BEEF;
      check(d_sw_xmit == exp, "cell word");
      if (d_sw_xmit != exp) $display("  got %h exp %h", d_sw_xmit, exp);
      cap++;
    end else begin
      check(d_sw_xmit == '0, "idle output");
    end
    // TCA: the client FIFO level seen at edge e (a word presented at edge
    // k is written at edge k+1 and counted from edge k+2)
    if (e > 3) begin
      int lvl;
      lvl = fed_c_h[e - 2] - cc_reads_before(e);
      check(tca_out_app == (lvl < TH), "tca_out_app");
      if (tca_prev && !tca_out_app) n_tca_fall++;
      if (!tca_prev && tca_out_app) n_tca_rise++;
    end
    tca_prev = tca_out_app;
  end

  initial begin
    repeat (300000) @(posedge rad_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rad_reset_l = 0;
    repeat (4) @(posedge rad_clk);
    @(negedge rad_clk) rad_reset_l = 1;
    // one TCP cell, one client cell
    send_tcp_cells(1);
    send_cc(14);
    repeat (400) @(posedge rad_clk);
    // back-to-back TCP cells racing a client cell
    fork send_tcp_cells(3); send_cc(28); join
    repeat (5 * (14 + SC)) @(posedge rad_clk);
    // mixed traffic: TCP packets of several cells, client bursts of any length
    for (int i = 0; i < 20; i++) begin
      fork send_tcp_cells(1 + ($urandom % 4)); send_cc(1 + ($urandom % 60)); join
      repeat ($urandom % 400) @(posedge rad_clk);
    end
    // a long client transfer: fills the client FIFO past the TCA threshold
    send_cc(TH + 200);
    fork send_tcp_cells(2); send_cc(100); join
    // drain
    while (dut.u_tcp_fifo.count >= 14 || dut.u_cc_fifo.count >= 14 || cap < 14)
      @(posedge rad_clk);
    repeat (400) @(posedge rad_clk);
    check(tref.size() == 0, "all TCP words delivered");
    check(cref.size() == (cseq % 14), "all complete client cells delivered");
    check(n_b2b > 0, "back-to-back TCP cells");
    check(n_cells_c > 0, "client cells sent");
    check(n_tcp_over_cc > 0, "TCP chosen over a waiting client cell");
    check(n_gap > 0, "inter-cell gap enforced");
    check(n_tca_fall > 0, "TCA deasserted");
    check(n_tca_rise > 0, "TCA reasserted");
    $display("cells tcp=%0d cc=%0d b2b=%0d tcp_over_cc=%0d gaps=%0d tca_fall=%0d tca_rise=%0d",
             n_cells_t, n_cells_c, n_b2b, n_tcp_over_cc, n_gap, n_tca_fall, n_tca_rise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
