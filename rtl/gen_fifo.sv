// gen_fifo: synchronous first-in first-out buffer, 32 bits x 4096 words by
// default, used twice in the arbitrator (TCP_GEN_FIFO for the outgoing TCP
// flow and CTRL_GEN_FIFO for the client control-cell flow).
//
// Operation: a word on din is stored on a rising clock edge with we high
// unless the FIFO is full (a write to a full FIFO is dropped). With re high
// and the FIFO not empty the oldest word is removed and appears on dout one
// clock later (registered read, as a block-RAM FIFO). init clears the FIFO
// synchronously; rst_n clears it asynchronously. count is the number of
// words held, updated one clock after the write or read that changes it;
// empty, full, almost_empty (at most one word) and almost_full (at most one
// free place) derive from it.
//
// The size and the port set (we, re, init, empty, almost_empty, full,
// almost_full, a fill count) follow the design; the memory organisation,
// read latency and behaviour on overflow and underflow are this
// implementation's choices.
module gen_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic                     we,
  input  logic [WIDTH-1:0]         din,
  input  logic                     re,
  output logic [WIDTH-1:0]         dout,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     empty,
  output logic                     almost_empty,
  output logic                     full,
  output logic                     almost_full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty        = (count == '0);
  assign full         = (count == (AW+1)'(DEPTH));
  assign almost_empty = (count <= (AW+1)'(1));
  assign almost_full  = (count >= (AW+1)'(DEPTH - 1));

  assign do_wr = we && !full;
  assign do_rd = re && !empty;

  // Storage array: no reset, so it can map onto block RAM.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      dout   <= '0;
    end else if (init) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      dout   <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) begin
        rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
        dout   <= mem[rd_ptr];
      end
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
