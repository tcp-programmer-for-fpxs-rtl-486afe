// tcp_fsm: write controller for the outgoing TCP flow (TCP_FSM).
//
// The TCP splitter presents the outgoing flow as 32-bit words on tcp_data
// with tcp_sod high for one clock on the first word of each 14-word cell.
// The controller has two states. In START it waits for tcp_sod; the word
// that arrives with tcp_sod is written and the machine moves to ACTIVE, where
// it writes one word per clock while a word counter runs up. When the counter
// reaches 14 (a whole cell written) it is reset: if tcp_sod is high again in
// that clock a back-to-back cell follows and the machine stays ACTIVE,
// otherwise it returns to START.
//
// Interface and timing: fifo_we and fifo_din are registered and drive the
// write side of TCP_GEN_FIFO, so each accepted word reaches the FIFO one clock
// after it is presented. fifo_init is high while rst_n is low and for the
// first clock after reset, to clear the FIFO.
//
// The two states, the count to 14 and the behaviour at a count of 14 follow
// the design. That a cell's 14 words arrive on consecutive clocks, the
// one-clock registered latency and the length of the init pulse are this
// implementation's choices.
module tcp_fsm
  import tcp_prog_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tcp_sod,
  input  word_t tcp_data,
  output logic  fifo_we,
  output logic  fifo_init,
  output word_t fifo_din
);

  fsm_state_t  state;
  logic [3:0]  count;   // words of the current cell already written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_START;
      count     <= '0;
      fifo_we   <= 1'b0;
      fifo_din  <= '0;
      fifo_init <= 1'b1;
    end else begin
      fifo_init <= 1'b0;
      fifo_din  <= tcp_data;
      unique case (state)
        ST_START: begin
          if (tcp_sod) begin
            state   <= ST_ACTIVE;
            fifo_we <= 1'b1;
            count   <= 4'd1;
          end else begin
            fifo_we <= 1'b0;
            count   <= '0;
          end
        end
        ST_ACTIVE: begin
          if (count == 4'(CELL_WORDS)) begin
            if (tcp_sod) begin        // next cell follows back to back
              fifo_we <= 1'b1;
              count   <= 4'd1;
            end else begin
              state   <= ST_START;
              fifo_we <= 1'b0;
              count   <= '0;
            end
          end else begin
            fifo_we <= 1'b1;
            count   <= count + 4'd1;
          end
        end
        default: state <= ST_START;
      endcase
    end
  end

endmodule
