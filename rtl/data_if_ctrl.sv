// data_if_ctrl: Data Interface Controller between the EUTRA module and the FIFOs.
//
// The EUTRA module was built for a CPRI core and expects CPRI-style timing:
// a basic frame is BF_WORDS (8) 32-bit words, one per 30.72 MHz cycle. That
// gives one basic frame every 260.4 ns, the CPRI 3.84 MHz basic-frame rate.
// This block keeps a free-running phase counter (0..BF_WORDS-1) and derives from it:
//
//  TX  `iq_tx_enable` is high in the last phase of each basic-frame period;
//      the EUTRA module puts the next basic frame on iq_tx in the following
//      BF_WORDS cycles, and `tx_wr_en` writes them into the TX FIFO. If the
//      TX FIFO has no room for a frame when iq_tx_enable is raised, that basic
//      frame is not written and `tx_drop` pulses.
//  RX  At the same phase it decides whether the next period carries a
//      received basic frame. Streaming starts when the RX FIFO holds a whole
//      Ethernet frame (`rx_prog_empty` low). It continues while at least one
//      basic frame is stored, else `rx_underflow` pulses and it waits again.
//      During a read period `rx_rd_en` pops one word per cycle. `iq_rx`
//      and `basic_frame_first_word` are registered, so the flag and the first
//      word of the basic frame appear in the same cycle. Outside read periods
//      iq_rx is zero.
// `enable` low stops both directions (no flags, no FIFO access).
// The two flags, their meaning and the 8-cycle basic frame follow the design;
// the one-frame start threshold, the drop/underflow policy and the register
// on the RX outputs are this implementation's choices.
module data_if_ctrl #(
  parameter int unsigned BF_WORDS = fh_pkg::BF_WORDS,
  parameter int unsigned LW       = 14              // width of rx_level
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,

  // TX direction
  output logic          iq_tx_enable,
  input  logic          tx_prog_full,
  output logic          tx_wr_en,
  output logic          tx_drop,

  // RX direction
  input  logic          rx_prog_empty,
  input  logic [LW-1:0] rx_level,
  input  logic [31:0]   rx_dout,
  output logic          rx_rd_en,
  output logic [31:0]   iq_rx,
  output logic          basic_frame_first_word,
  output logic          rx_underflow,
  output logic          rx_streaming
);
  localparam int unsigned PHW = $clog2(BF_WORDS);

  logic [PHW-1:0] ph_q;
  logic           last_ph;
  logic           tx_act_q, rx_act_q, stream_q;
  logic [LW-1:0]  rx_left;

  assign last_ph      = (ph_q == PHW'(BF_WORDS - 1));
  assign iq_tx_enable = enable && last_ph;
  assign tx_wr_en     = tx_act_q;
  assign rx_rd_en     = rx_act_q;
  assign rx_streaming = stream_q;
  assign rx_left      = rx_level - LW'(rx_act_q);   // words left after this cycle's read

  always_ff @(posedge clk) begin
    tx_drop      <= 1'b0;
    rx_underflow <= 1'b0;
    if (rst) begin
      ph_q     <= '0;
      tx_act_q <= 1'b0;
      rx_act_q <= 1'b0;
      stream_q <= 1'b0;
      iq_rx    <= '0;
      basic_frame_first_word <= 1'b0;
    end else begin
      ph_q <= enable ? ph_q + 1'b1 : '0;
      if (!enable) begin
        tx_act_q <= 1'b0;
        rx_act_q <= 1'b0;
        stream_q <= 1'b0;
      end else if (last_ph) begin
        tx_act_q <= !tx_prog_full;
        tx_drop  <= tx_prog_full;
        if (stream_q ? (rx_left >= LW'(BF_WORDS)) : !rx_prog_empty) begin
          rx_act_q <= 1'b1;
          stream_q <= 1'b1;
        end else begin
          rx_act_q     <= 1'b0;
          stream_q     <= 1'b0;
          rx_underflow <= stream_q;
        end
      end
      iq_rx                  <= rx_act_q ? rx_dout : '0;
      basic_frame_first_word <= rx_act_q && (ph_q == '0);
    end
  end
endmodule
