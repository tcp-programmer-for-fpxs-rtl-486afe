// tb_tcp_fsm: self-checking test of the TCP-flow write controller.
// Cells of 14 words, each word tagged with its cell and word number, are
// presented with a one-clock start-of-cell pulse: single cells, runs of
// back-to-back cells and idle gaps holding junk data. Every word written
// (fifo_we) must be the next expected cell word, arrive exactly one clock
// after it was presented, and no idle word may be written. The init pulse
// after reset is checked too.
module tb_tcp_fsm;
  import tcp_prog_pkg::*;

  logic clk = 0, rst_n = 1, tcp_sod = 0;
  word_t tcp_data = '0, fifo_din;
  logic fifo_we, fifo_init;
  int checks = 0, failures = 0;
  int cycle = 0;

  tcp_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  word_t exp_q[$];        // words expected to be written, in order
  int    exp_t[$];        // cycle in which each should be written
  int    n_b2b = 0, n_cells = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // present one cell starting at the next clock
  task automatic send_cell(input int id);
    for (int w = 0; w < CELL_WORDS; w++) begin
      @(negedge clk);
      tcp_sod  = (w == 0);
      tcp_data = {8'hA5, 12'(id), 12'(w)};
      exp_q.push_back(tcp_data);
      exp_t.push_back(cycle + 1);
    end
    n_cells++;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      tcp_sod = 0;
      tcp_data = word_t'($urandom) | 32'h0100_0000;  // junk, never written
    end
  endtask

  // writes observed at each rising edge
  always @(posedge clk) if (rst_n) begin
    #1;
    if (fifo_we) begin
      check(exp_q.size() > 0, "unexpected write");
      if (exp_q.size() > 0) begin
        word_t e; int t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        check(fifo_din == e, "written word");
        check(cycle == t, "write latency");
        if (fifo_din != e) $display("  got %h exp %h", fifo_din, e);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    check(fifo_init == 1, "init during reset");
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #2;
    check(fifo_init == 0, "init released");
    idle(4);
    send_cell(1);
    idle(7);
    // back-to-back runs
    for (int r = 0; r < 20; r++) begin
      int len;
      len = 1 + ($urandom % 4);
      for (int c = 0; c < len; c++) send_cell(100 * r + c);
      if (len > 1) n_b2b += len - 1;
      idle(1 + ($urandom % 5));
    end
    idle(5);
    check(exp_q.size() == 0, "all words written");
    check(n_b2b > 0, "back-to-back cells exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
