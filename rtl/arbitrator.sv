// arbitrator: the output stage of the TCP programmer, and the top of this RTL.
//
// Behind the protocol wrappers and the TCP splitter two flows leave the
// programmer on the same RAD switch port: the outgoing TCP flow (VCI 50,
// forwarded towards the server or the next programmer in a chain) and the
// client flow (VCI 34, the control cells carrying the configuration bit file
// for the device to be reprogrammed). The arbitrator buffers each flow in its
// own FIFO and interleaves them cell by cell:
//   tcp_fsm        writes each 14-word TCP cell, marked by tcpmod_sod, into
//                  TCP_GEN_FIFO (u_tcp_fifo);
//   cc_fsm         writes every client word marked by appl_tde into
//                  CTRL_GEN_FIFO (u_cc_fifo);
//   read_selector  sends whole cells from the two FIFOs, TCP first, with a
//                  start-of-cell pulse, a START_COUNT-clock gap between cells,
//                  and drops tca_out_app when the control-cell FIFO fills to
//                  TCA_THRESHOLD words.
//
// Ports follow the splitter/arbitrator interface of the design: rad_clk,
// rad_reset_l (active low), tcpmod_sod/tcpmod_data (outgoing TCP flow),
// appl_tde/appl_eof/appl_data (client flow), d_sw_xmit/soc_sw_xmit (cells to
// the RAD switch port) and tca_out_app (flow control back to the splitter).
// appl_eof is part of that interface but the arbitrator's behaviour does not
// depend on it (the client flow is framed by appl_tde alone), so it is
// accepted and left unused. Likewise the almost-empty, full and almost-full
// flags of the two FIFOs are not needed by the selector, which works from the
// fill counts; they stay unconnected inside this module.
//
// Timing: a cell word enters a FIFO one clock after it is presented. A cell
// leaves no earlier than START_COUNT clocks after the previous one ended,
// with its first word two clocks after the selector starts reading it.
module arbitrator
  import tcp_prog_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 4096,
  parameter int unsigned START_COUNT   = 150,
  parameter int unsigned TCA_THRESHOLD = 3000
) (
  input  logic  rad_clk,
  input  logic  rad_reset_l,
  input  logic  tcpmod_sod,
  input  word_t tcpmod_data,
  input  logic  appl_tde,
  input  logic  appl_eof,
  input  word_t appl_data,
  output word_t d_sw_xmit,
  output logic  soc_sw_xmit,
  output logic  tca_out_app
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic          tcp_we, tcp_init, tcp_re, tcp_empty;
  word_t         tcp_din, tcp_dout;
  logic [CW-1:0] tcp_count;

  logic          cc_we, cc_init, cc_re, cc_empty;
  word_t         cc_din, cc_dout;
  logic [CW-1:0] cc_count;

  // Flags of the FIFOs that the selector does not need.
  logic tcp_almost_empty, tcp_full, tcp_almost_full;
  logic cc_almost_empty, cc_full, cc_almost_full;

  tcp_fsm u_tcp_fsm (
    .clk       (rad_clk),
    .rst_n     (rad_reset_l),
    .tcp_sod   (tcpmod_sod),
    .tcp_data  (tcpmod_data),
    .fifo_we   (tcp_we),
    .fifo_init (tcp_init),
    .fifo_din  (tcp_din)
  );

  cc_fsm u_cc_fsm (
    .clk       (rad_clk),
    .rst_n     (rad_reset_l),
    .cc_tde    (appl_tde),
    .cc_data   (appl_data),
    .fifo_we   (cc_we),
    .fifo_init (cc_init),
    .fifo_din  (cc_din)
  );

  gen_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_tcp_fifo (
    .clk          (rad_clk),
    .rst_n        (rad_reset_l),
    .init         (tcp_init),
    .we           (tcp_we),
    .din          (tcp_din),
    .re           (tcp_re),
    .dout         (tcp_dout),
    .count        (tcp_count),
    .empty        (tcp_empty),
    .almost_empty (tcp_almost_empty),
    .full         (tcp_full),
    .almost_full  (tcp_almost_full)
  );

  gen_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_cc_fifo (
    .clk          (rad_clk),
    .rst_n        (rad_reset_l),
    .init         (cc_init),
    .we           (cc_we),
    .din          (cc_din),
    .re           (cc_re),
    .dout         (cc_dout),
    .count        (cc_count),
    .empty        (cc_empty),
    .almost_empty (cc_almost_empty),
    .full         (cc_full),
    .almost_full  (cc_almost_full)
  );

  read_selector #(
    .FIFO_DEPTH    (FIFO_DEPTH),
    .START_COUNT   (START_COUNT),
    .TCA_THRESHOLD (TCA_THRESHOLD)
  ) u_read_selector (
    .clk       (rad_clk),
    .rst_n     (rad_reset_l),
    .tcp_empty (tcp_empty),
    .tcp_count (tcp_count),
    .tcp_dout  (tcp_dout),
    .tcp_re    (tcp_re),
    .cc_empty  (cc_empty),
    .cc_count  (cc_count),
    .cc_dout   (cc_dout),
    .cc_re     (cc_re),
    .data_out  (d_sw_xmit),
    .sod_out   (soc_sw_xmit),
    .tca_out   (tca_out_app)
  );

endmodule
