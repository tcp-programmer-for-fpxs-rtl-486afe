// tb_read_selector: self-checking test of the read selector against two
// behavioural FIFO models held in the testbench (registered read data, a
// fill count that reflects a write at once and a read from the next clock).
// Small sizes keep it short: START_COUNT = 10, TCA_THRESHOLD = 40.
//
// Checked, independently of the selector's internals:
//  - every output cell is 14 consecutive words that are the next 14 words of
//    one flow, in order, with sod_out on the first word only, and data_out is
//    zero outside cells;
//  - the flow chosen: TCP whenever the TCP FIFO held a full cell at the
//    decision clock (two clocks before sod_out), the control-cell FIFO only
//    when it did not;
//  - the spacing of start-of-cell pulses: never less than 14 + START_COUNT
//    clocks, and exactly that when a cell was waiting;
//  - tca_out, one clock after the control-cell FIFO level, is low exactly
//    while that level is TCA_THRESHOLD or more.
module tb_read_selector;
  import tcp_prog_pkg::*;

  localparam int DEPTH = 64;
  localparam int SC    = 10;
  localparam int TH    = 40;
  localparam int CW    = $clog2(DEPTH) + 1;

  logic clk = 0, rst_n = 1;
  logic tcp_empty, cc_empty, tcp_re, cc_re, sod_out, tca_out;
  logic [CW-1:0] tcp_count, cc_count;
  word_t tcp_dout = '0, cc_dout = '0, data_out;
  int checks = 0, failures = 0;

  read_selector #(.FIFO_DEPTH(DEPTH), .START_COUNT(SC), .TCA_THRESHOLD(TH)) dut (.*);

  always #5 clk = ~clk;

  // ---- FIFO models ----
  word_t tq[$], cq[$];
  int tq_n = 0, cq_n = 0;
  assign tcp_count = CW'(tq_n);
  assign cc_count  = CW'(cq_n);
  assign tcp_empty = (tq_n == 0);
  assign cc_empty  = (cq_n == 0);

  always @(posedge clk) begin
    if (tcp_re && tq.size() > 0) begin tcp_dout <= tq.pop_front(); tq_n <= tq_n - 1; end
    if (cc_re  && cq.size() > 0) begin cc_dout  <= cq.pop_front(); cq_n <= cq_n - 1; end
  end

  // reference copies of all words pushed, in order
  word_t tref[$], cref[$];
  int tseq = 0, cseq = 0;

  task automatic push_tcp(input int n);
    repeat (n) begin
      @(negedge clk);
      if (tq_n >= DEPTH) continue;   // a real FIFO would drop it
      tq.push_back(32'hA000_0000 | tseq); tref.push_back(32'hA000_0000 | tseq);
      tq_n++; tseq++;
    end
  endtask
  task automatic push_cc(input int n);
    repeat (n) begin
      @(negedge clk);
      if (cq_n >= DEPTH) continue;
      cq.push_back(32'hC000_0000 | cseq); cref.push_back(32'hC000_0000 | cseq);
      cq_n++; cseq++;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at edge %0d", what, edge_n); end
  endtask

  // ---- history of the levels the selector saw at each edge ----
  int edge_n = 0;
  int hist_t[int], hist_c[int];
  always @(posedge clk) begin
    hist_t[edge_n] = tq_n;
    hist_c[edge_n] = cq_n;
    edge_n++;
  end

  // ---- output monitor ----
  int cap = 14;           // words of the current output cell captured
  bit cur_tcp;
  int last_sod = -1;
  int n_cells_t = 0, n_cells_c = 0, n_tcp_over_cc = 0, n_gap_exact = 0;
  int n_tca_fall = 0, n_tca_rise = 0;
  logic tca_prev = 1;

  always @(posedge clk) if (rst_n) begin
    int e;
    #1;
    e = edge_n - 1;       // index of the edge just passed
    // tca_out is registered from the level seen at this edge
    if (e > 1) begin
      check(tca_out == (hist_c[e] < TH), "tca_out");
      if (tca_prev && !tca_out) n_tca_fall++;
      if (!tca_prev && tca_out) n_tca_rise++;
    end
    tca_prev = tca_out;
    if (sod_out) begin
      int d;
      check(cap == 14, "sod_out inside a cell");
      d = e - 2;
      cur_tcp = (data_out[31:28] == 4'hA);
      if (cur_tcp) begin
        check(hist_t[d] >= 14, "TCP cell started without a full cell");
        if (hist_c[d] >= 14) n_tcp_over_cc++;
        n_cells_t++;
      end else begin
        check(hist_c[d] >= 14, "CC cell started without a full cell");
        check(hist_t[d] < 14, "CC cell chosen while TCP had a cell");
        n_cells_c++;
      end
      if (last_sod >= 0) begin
        int dmin;
        dmin = last_sod - 2 + 14 + SC;
        check(e - last_sod >= 14 + SC, "gap too short");
        if (hist_t[dmin] >= 14 || hist_c[dmin] >= 14) begin
          check(e - last_sod == 14 + SC, "gap not exact");
          n_gap_exact++;
        end
      end
      last_sod = e;
      cap = 0;
    end
    if (cap < 14) begin
      word_t exp;
      if (cur_tcp) exp = (tref.size() > 0) ? tref.pop_front() : 32'hDEAD_BEEF;
      else         exp = (cref.size() > 0) ? cref.pop_front() : 32'hDEAD_BEEF;
      check(data_out == exp, "cell word");
      if (data_out != exp) $display("  got %h exp %h", data_out, exp);
      cap++;
    end else begin
      check(data_out == '0, "idle data_out");
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // A: both flows hold two cells: TCP, TCP, then CC, CC
    fork push_tcp(28); push_cc(28); join
    repeat (5 * (14 + SC)) @(posedge clk);
    // B: a partial TCP cell does not block a full CC cell
    fork push_tcp(10); push_cc(14); join
    repeat (2 * (14 + SC)) @(posedge clk);
    push_tcp(4);
    repeat (2 * (14 + SC)) @(posedge clk);
    // C: random interleaved traffic
    for (int i = 0; i < 40; i++) begin
      fork push_tcp($urandom % 20); push_cc($urandom % 20); join
      repeat ($urandom % 60) @(posedge clk);
    end
    // D: fill the control-cell FIFO over the TCA threshold
    push_cc(TH + 5 - cq_n);
    // drain: let every complete cell go out
    while (tq_n >= 14 || cq_n >= 14) @(posedge clk);
    repeat (3 * (14 + SC)) @(posedge clk);
    check(cap == 14, "last cell finished");
    check(n_cells_t > 0 && n_cells_c > 0, "both flows served");
    check(n_tcp_over_cc > 0, "TCP priority exercised");
    check(n_gap_exact > 0, "inter-cell gap exercised");
    check(n_tca_fall > 0 && n_tca_rise > 0, "TCA deassert and reassert exercised");
    $display("cells tcp=%0d cc=%0d tcp_over_cc=%0d gaps=%0d tca_fall=%0d tca_rise=%0d",
             n_cells_t, n_cells_c, n_tcp_over_cc, n_gap_exact, n_tca_fall, n_tca_rise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
