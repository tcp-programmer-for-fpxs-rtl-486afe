// tb_cc_fsm: self-checking test of the client-flow write controller.
// Random bursts of words framed by cc_tde, of any length including single
// words, are presented with random data; words with cc_tde low carry junk.
// Every valid word must be written exactly once, in order, one clock after
// it was presented, and nothing else may be written.
module tb_cc_fsm;
  import tcp_prog_pkg::*;

  logic clk = 0, rst_n = 1, cc_tde = 0;
  word_t cc_data = '0, fifo_din;
  logic fifo_we, fifo_init;
  int checks = 0, failures = 0;
  int cycle = 0;

  cc_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  word_t exp_q[$];
  int    exp_t[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    if (fifo_we) begin
      check(exp_q.size() > 0, "unexpected write");
      if (exp_q.size() > 0) begin
        word_t e; int t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        check(fifo_din == e, "written word");
        check(cycle == t, "write latency");
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
    for (int b = 0; b < 300; b++) begin
      int len, gap;
      len = 1 + ($urandom % 30);
      gap = (b % 3 == 0) ? 0 : 1 + ($urandom % 4);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        cc_tde  = 1;
        cc_data = $urandom;
        exp_q.push_back(cc_data);
        exp_t.push_back(cycle + 1);
      end
      repeat (gap) begin
        @(negedge clk);
        cc_tde  = 0;
        cc_data = $urandom;
      end
    end
    @(negedge clk) cc_tde = 0;
    repeat (4) @(posedge clk);
    #2;
    check(exp_q.size() == 0, "all words written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
