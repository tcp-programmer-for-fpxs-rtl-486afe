// read_selector: output scheduler of the arbitrator (READ_SELECTOR).
//
// It drains TCP_GEN_FIFO (outgoing TCP flow) and CTRL_GEN_FIFO (client
// control-cell flow) one whole 14-word cell at a time onto the RAD switch
// transmit port. Two states:
//   START  - sleeps: a delay counter runs for START_COUNT clocks after each
//            cell. Once it has run out, a cell is started as soon as one FIFO
//            holds a complete cell (at least 14 words). The TCP FIFO always
//            wins; the control-cell FIFO is served only when the TCP FIFO
//            has no complete cell. The choice is held in a flag (0 = TCP,
//            1 = control cell).
//   ACTIVE - reads 14 consecutive words from the chosen FIFO, then returns
//            to START with the delay counter cleared.
// The gap keeps back-to-back cells from overflowing the input buffer of the
// network interface device behind the port. Independently, tca_out
// (transmit cell available, active high) is dropped while the control-cell
// FIFO holds TCA_THRESHOLD words or more, which stalls the upstream flow.
//
// Interface and timing: the FIFOs have a one-clock registered read, and the
// output word is registered once more, so the first word of a cell appears
// on data_out two clocks after its read enable, with sod_out high in that
// same clock only. data_out is zero between cells. With both FIFOs holding
// cells, a new cell starts every CELL_WORDS + START_COUNT clocks
// (164 at the defaults). tca_out is registered from the FIFO count.
//
// From the design: the two states, the TCP-first priority, the 14-word cell,
// the 150-clock gap (START_COUNT), the 3000-word threshold and the one-clock
// start-of-cell pulse. The design's state diagram labels the condition as a
// FIFO level above 14 words while the text asks for a complete cell; a
// complete cell (14 words or more) is used here so that a lone final cell is
// not held back. Pipeline latencies are this implementation's own.
module read_selector
  import tcp_prog_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 4096,
  parameter int unsigned START_COUNT   = 150,
  parameter int unsigned TCA_THRESHOLD = 3000,
  localparam int unsigned CW           = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // TCP_GEN_FIFO read side
  input  logic          tcp_empty,
  input  logic [CW-1:0] tcp_count,
  input  word_t         tcp_dout,
  output logic          tcp_re,
  // CTRL_GEN_FIFO read side
  input  logic          cc_empty,
  input  logic [CW-1:0] cc_count,
  input  word_t         cc_dout,
  output logic          cc_re,
  // RAD switch transmit port and back-pressure
  output word_t         data_out,
  output logic          sod_out,
  output logic          tca_out
);

  localparam int unsigned DW = $clog2(START_COUNT + 1);
  localparam logic [DW-1:0] DLY_LAST = DW'((START_COUNT > 0) ? START_COUNT - 1 : 0);

  fsm_state_t state;
  flow_sel_t  sel;
  logic [DW-1:0] dly;     // clocks spent sleeping in START
  logic [3:0]    rcnt;    // words of the current cell already read
  logic          tcp_cell, cc_cell, start_cell;

  // Output pipeline, aligned with the registered FIFO read data.
  logic          rd_v1, first1;
  flow_sel_t     sel1;

  assign tcp_cell   = (tcp_count >= CW'(CELL_WORDS));
  assign cc_cell    = (cc_count  >= CW'(CELL_WORDS));
  assign start_cell = (state == ST_START) && (dly >= DLY_LAST) && (tcp_cell || cc_cell);

  assign tcp_re = (state == ST_ACTIVE) && (sel == SEL_TCP);
  assign cc_re  = (state == ST_ACTIVE) && (sel == SEL_CC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_START;
      sel   <= SEL_TCP;
      dly   <= '0;
      rcnt  <= '0;
    end else begin
      unique case (state)
        ST_START: begin
          rcnt <= '0;
          if (start_cell) begin
            state <= ST_ACTIVE;
            sel   <= tcp_cell ? SEL_TCP : SEL_CC;
          end else if (dly < DLY_LAST) begin
            dly <= dly + 1'b1;
          end
        end
        ST_ACTIVE: begin
          if (rcnt == 4'(CELL_WORDS - 1)) begin
            state <= ST_START;
            dly   <= '0;
            rcnt  <= '0;
          end else begin
            rcnt <= rcnt + 4'd1;
          end
        end
        default: state <= ST_START;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v1    <= 1'b0;
      first1   <= 1'b0;
      sel1     <= SEL_TCP;
      data_out <= '0;
      sod_out  <= 1'b0;
      tca_out  <= 1'b1;
    end else begin
      rd_v1    <= (state == ST_ACTIVE);
      first1   <= (state == ST_ACTIVE) && (rcnt == '0);
      sel1     <= sel;
      data_out <= rd_v1 ? ((sel1 == SEL_TCP) ? tcp_dout : cc_dout) : '0;
      sod_out  <= first1;
      tca_out  <= (cc_count < CW'(TCA_THRESHOLD));
    end
  end

  // A cell is only started when 14 words are held, so a read never finds
  // its FIFO empty; the start-of-cell pulse lasts one clock.
  a_no_tcp_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                       tcp_re |-> !tcp_empty);
  a_no_cc_underflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                       cc_re |-> !cc_empty);
  a_sod_one_clock:    assert property (@(posedge clk) disable iff (!rst_n)
                                       sod_out |=> !sod_out);

endmodule
