// tb_gen_fifo: self-checking test of gen_fifo at a small depth (16 words).
// A queue model in the testbench predicts dout, count and the four flags
// under random writes and reads, including writes to a full FIFO (dropped),
// reads of an empty FIFO (ignored) and a synchronous init. Reads return data
// one clock after the enable; the check is made in that clock.
module tb_gen_fifo;
  localparam int W = 32;
  localparam int D = 16;

  logic clk = 0, rst_n = 1, init = 0, we = 0, re = 0;
  logic [W-1:0] din = '0, dout;
  logic [$clog2(D):0] count;
  logic empty, almost_empty, full, almost_full;
  int checks = 0, failures = 0;

  gen_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] model[$];
  logic [W-1:0] exp_dout = '0;
  int n_full_writes = 0, n_empty_reads = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d model=%0d dout=%h exp=%h", what, count, model.size(), dout, exp_dout);
    end
  endtask

  task automatic step(input bit w, input bit r, input bit clr);
    logic [W-1:0] d;
    d = $urandom;
    @(negedge clk);
    we = w; re = r; din = d; init = clr;
    @(posedge clk);
    #1;
    if (clr) begin
      model.delete();
      exp_dout = '0;
    end else begin
      bit was_full, was_empty;
      was_full  = (model.size() == D);
      was_empty = (model.size() == 0);
      if (r && was_empty) n_empty_reads++;
      if (r && !was_empty) exp_dout = model.pop_front();
      if (w && was_full) n_full_writes++;
      if (w && !was_full) model.push_back(d);
    end
    check(count == model.size(), "count");
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == D), "full");
    check(almost_empty == (model.size() <= 1), "almost_empty");
    check(almost_full == (model.size() >= D - 1), "almost_full");
    check(dout == exp_dout, "dout");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill past full, then drain past empty
    repeat (D + 4) step(1, 0, 0);
    check(full, "full after fill");
    repeat (D + 4) step(0, 1, 0);
    check(empty, "empty after drain");
    // random traffic with a bias that moves the level up and down
    for (int phase = 0; phase < 8; phase++) begin
      repeat (500) step(($urandom % 4) < ((phase % 2) ? 1 : 3), ($urandom % 4) < ((phase % 2) ? 3 : 1), 0);
    end
    // simultaneous read and write, then init
    repeat (5) step(1, 0, 0);
    repeat (50) step(1, 1, 0);
    step(1, 1, 1);
    check(empty && count == 0, "init clears");
    repeat (20) step($urandom % 2, $urandom % 2, 0);
    check(n_full_writes > 0 && n_empty_reads > 0, "overflow and underflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
