// cc_fsm: write controller for the client application flow (CC_FSM).
//
// The client flow from the TCP splitter carries no start-of-cell marker;
// instead a data enable, cc_tde, is high for every valid word on cc_data.
// The controller has two states: START, where nothing is written, and
// ACTIVE, entered when cc_tde rises and left when it falls, in which every
// valid word is written into CTRL_GEN_FIFO. No word count is kept: any
// number of words may be written.
//
// Interface and timing: fifo_we and fifo_din are registered, so a valid word
// reaches the FIFO write port one clock after it is presented. fifo_init is
// high while rst_n is low and for the first clock after reset.
//
// The two states and their conditions follow the design; the registered
// outputs and the init pulse length are this implementation's choices.
module cc_fsm
  import tcp_prog_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cc_tde,
  input  word_t cc_data,
  output logic  fifo_we,
  output logic  fifo_init,
  output word_t fifo_din
);

  fsm_state_t state;

  // The registered word is written while the machine is ACTIVE: the state
  // register holds cc_tde of the previous clock, aligned with fifo_din.
  assign fifo_we = (state == ST_ACTIVE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_START;
      fifo_din  <= '0;
      fifo_init <= 1'b1;
    end else begin
      fifo_init <= 1'b0;
      fifo_din  <= cc_data;
      unique case (state)
        ST_START:  state <= cc_tde ? ST_ACTIVE : ST_START;
        ST_ACTIVE: state <= cc_tde ? ST_ACTIVE : ST_START;
        default:   state <= ST_START;
      endcase
    end
  end

endmodule
