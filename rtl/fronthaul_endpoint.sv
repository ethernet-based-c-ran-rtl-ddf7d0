// fronthaul_endpoint: one end (RRH or BBU) of the 10 Gigabit Ethernet fronthaul.
//
// It connects the 32-bit EUTRA IQ interface (30.72 MHz) to the 64-bit
// AXI4-Stream user interface of a 10G Ethernet MAC (156.25 MHz). The MAC,
// the PCS/PMA and the transceiver are outside this module; their AXI4-Stream
// signals are the m_* (transmit) and s_* (receive) ports.
//
//   TX: EUTRA iq_tx -> latency_injector -> tx_fifo (32->64, clock crossing)
//       -> framer -> m_axis
//   RX: s_axis -> deframer -> rx_fifo (64->32, clock crossing)
//       -> data_if_ctrl -> iq_rx / basic_frame_first_word
//
// data_if_ctrl produces the CPRI-style flags the EUTRA module expects
// (iq_tx_enable, basic_frame_first_word) on an 8-word basic-frame grid.
// `test_mode` selects the standalone link test instead: iq_counter_gen fills
// the TX FIFO with a counter and iq_seq_checker checks the received words.
// `chk_err_btn` makes the counter skip one value (a deliberate error);
// `chk_clear_btn` clears the checker's error LED.
// Change test_mode only while both resets are held.
// Latency measurement: on the RRH a push-button (`lat_btn`) injects one basic
// frame of 0x55555555 and raises `lat_trigger_out`. On the BBU,
// `lat_trigger_in` (wired from the RRH) starts latency_meter, which stops when
// the sequence reaches iq_rx. Both ends carry both halves; unused inputs
// can be tied low.
// Status pulses (fn_error, crc_error, hdr_error, drop_full) are in the eth_clk
// domain; tx_drop and rx_underflow are in the eutra_clk domain.
// Both resets are synchronous, active high, and must overlap by a few cycles of
// the slower clock. The block structure follows the design. Wiring both
// measurement halves and the test source into every endpoint is this
// implementation's choice.
module fronthaul_endpoint
  import fh_pkg::*;
#(
  parameter logic [47:0] DEST_MAC     = DEF_DEST_MAC,
  parameter logic [47:0] SRC_MAC      = DEF_SRC_MAC,
  parameter int unsigned FIFO_DEPTH64 = 4096
) (
  input  logic        eth_clk,
  input  logic        eth_rst,
  input  logic        eutra_clk,
  input  logic        eutra_rst,

  // EUTRA side
  input  logic        enable,
  input  logic [31:0] iq_tx,
  output logic        iq_tx_enable,
  output logic [31:0] iq_rx,
  output logic        basic_frame_first_word,

  // MAC transmit AXI4-Stream
  output logic [63:0] m_tdata,
  output logic [7:0]  m_tkeep,
  output logic        m_tvalid,
  output logic        m_tlast,
  input  logic        m_tready,

  // MAC receive AXI4-Stream
  input  logic [63:0] s_tdata,
  input  logic [7:0]  s_tkeep,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  input  logic        s_tuser,

  // standalone link test
  input  logic        test_mode,
  input  logic        chk_err_btn,
  output logic        chk_err_inserted,
  input  logic        chk_clear_btn,
  output logic        chk_err_led,
  output logic        chk_active,
  output logic [15:0] chk_err_count,

  // latency measurement
  input  logic        lat_btn,
  output logic        lat_trigger_out,
  input  logic        lat_trigger_in,
  output logic [15:0] latency,
  output logic        latency_valid,
  output logic        latency_busy,

  // status
  output logic        fn_error,
  output logic        crc_error,
  output logic        hdr_error,
  output logic        drop_full,
  output logic        frame_ok,
  output logic        frame_sent,
  output logic        tx_drop,
  output logic        rx_underflow,
  output logic        rx_streaming
);
  localparam int unsigned LW = $clog2(FIFO_DEPTH64) + 2;

  // ---------------- TX path ----------------
  logic        ctrl_tx_wr, gen_wr, txf_wr, txf_full, txf_pfull;
  logic [31:0] inj_iq, gen_data, txf_din;
  logic        txf_rd, txf_empty, txf_pempty;
  logic [63:0] txf_dout;
  logic [15:0] tx_fcnt;

  latency_injector u_inj (
    .clk(eutra_clk), .rst(eutra_rst), .btn(lat_btn), .iq_tx_enable(iq_tx_enable),
    .iq_in(iq_tx), .iq_out(inj_iq), .trigger(lat_trigger_out));

  iq_counter_gen u_gen (
    .clk(eutra_clk), .rst(eutra_rst), .en(test_mode && enable),
    .fifo_prog_full(txf_pfull), .err_btn(chk_err_btn),
    .wr_en(gen_wr), .data(gen_data), .err_inserted(chk_err_inserted));

  assign txf_wr  = test_mode ? gen_wr   : ctrl_tx_wr;
  assign txf_din = test_mode ? gen_data : inj_iq;

  tx_fifo #(.DEPTH64(FIFO_DEPTH64), .FRAME_WORDS64(PAYLOAD_WORDS)) u_txf (
    .wr_clk(eutra_clk), .wr_rst(eutra_rst), .wr_en(txf_wr), .din(txf_din),
    .full(txf_full), .prog_full(txf_pfull),
    .rd_clk(eth_clk), .rd_rst(eth_rst), .rd_en(txf_rd), .dout(txf_dout),
    .empty(txf_empty), .prog_empty(txf_pempty));

  framer #(.DEST_MAC(DEST_MAC), .SRC_MAC(SRC_MAC)) u_framer (
    .clk(eth_clk), .rst(eth_rst),
    .fifo_prog_empty(txf_pempty), .fifo_dout(txf_dout), .fifo_rd_en(txf_rd),
    .m_tdata(m_tdata), .m_tkeep(m_tkeep), .m_tvalid(m_tvalid), .m_tlast(m_tlast),
    .m_tready(m_tready), .frame_count(tx_fcnt), .frame_sent(frame_sent));

  // ---------------- RX path ----------------
  logic          rxf_wr, rxf_full, rxf_pfull, rxf_rd, rxf_empty, rxf_pempty;
  logic          ctrl_rx_rd, chk_rd;
  logic [63:0]   rxf_din;
  logic [31:0]   rxf_dout;
  logic [LW-1:0] rxf_level;
  logic [15:0]   rx_fcnt;

  deframer #(.DEST_MAC(DEST_MAC), .SRC_MAC(SRC_MAC)) u_deframer (
    .clk(eth_clk), .rst(eth_rst),
    .s_tdata(s_tdata), .s_tkeep(s_tkeep), .s_tvalid(s_tvalid), .s_tlast(s_tlast), .s_tuser(s_tuser),
    .fifo_prog_full(rxf_pfull), .fifo_wr_en(rxf_wr), .fifo_din(rxf_din),
    .fn_error(fn_error), .hdr_error(hdr_error), .crc_error(crc_error),
    .drop_full(drop_full), .frame_ok(frame_ok), .last_fcnt(rx_fcnt));

  rx_fifo #(.DEPTH64(FIFO_DEPTH64), .FRAME_WORDS64(PAYLOAD_WORDS)) u_rxf (
    .wr_clk(eth_clk), .wr_rst(eth_rst), .wr_en(rxf_wr), .din(rxf_din),
    .full(rxf_full), .prog_full(rxf_pfull),
    .rd_clk(eutra_clk), .rd_rst(eutra_rst), .rd_en(rxf_rd), .dout(rxf_dout),
    .empty(rxf_empty), .prog_empty(rxf_pempty), .rd_level(rxf_level));

  data_if_ctrl #(.BF_WORDS(BF_WORDS), .LW(LW)) u_ctrl (
    .clk(eutra_clk), .rst(eutra_rst), .enable(enable && !test_mode),
    .iq_tx_enable(iq_tx_enable), .tx_prog_full(txf_pfull), .tx_wr_en(ctrl_tx_wr), .tx_drop(tx_drop),
    .rx_prog_empty(rxf_pempty), .rx_level(rxf_level), .rx_dout(rxf_dout), .rx_rd_en(ctrl_rx_rd),
    .iq_rx(iq_rx), .basic_frame_first_word(basic_frame_first_word),
    .rx_underflow(rx_underflow), .rx_streaming(rx_streaming));

  iq_seq_checker u_chk (
    .clk(eutra_clk), .rst(eutra_rst), .en(test_mode && enable),
    .fifo_empty(rxf_empty), .fifo_dout(rxf_dout), .rd_en(chk_rd),
    .clear_btn(chk_clear_btn), .err_led(chk_err_led), .active(chk_active), .err_count(chk_err_count));

  assign rxf_rd = test_mode ? chk_rd : ctrl_rx_rd;

  latency_meter u_meter (
    .clk(eutra_clk), .rst(eutra_rst), .trigger_in(lat_trigger_in), .iq_rx(iq_rx),
    .latency(latency), .latency_valid(latency_valid), .busy(latency_busy));
endmodule
