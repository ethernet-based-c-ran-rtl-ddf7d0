// framer: packs IQ payload from the TX FIFO into Ethernet frames for the MAC.
//
// A frame is ten 64-bit AXI4-Stream beats with all eight bytes valid (so
// `m_tkeep` is the constant 8'hFF):
//   beat 0  {SRC_MAC[15:0], DEST_MAC}
//   beat 1  {frame counter, Length/Type = 0x0040, SRC_MAC[47:16]}
//   beat 2..9  eight payload words read from the TX FIFO (64 bytes), tlast on beat 9
// The MAC adds preamble, SFD and FCS; no padding is needed (80 bytes > 64).
// The frame counter starts at 1 after reset and increments per frame, so the
// receiver can spot lost frames.
//
// Control: a frame starts only when the FIFO holds a whole frame
// (`fifo_prog_empty` low). tvalid then stays high for all ten beats, and each
// beat is held until `m_tready` accepts it. Payload words are taken straight
// from the first-word-fall-through FIFO output, with `fifo_rd_en` = beat accepted.
// Timing: with tready held high a frame takes 10 cycles plus one idle cycle in
// which the FIFO flag is re-examined, so one frame per 11 cycles at most.
// The state-machine framer, field order, payload size, counter and handshake
// follow the design; the FWFT read and the idle cycle are this design's choices.
module framer
  import fh_pkg::*;
#(
  parameter logic [47:0] DEST_MAC      = DEF_DEST_MAC,
  parameter logic [47:0] SRC_MAC       = DEF_SRC_MAC,
  parameter int unsigned NWORDS = fh_pkg::PAYLOAD_WORDS
) (
  input  logic        clk,
  input  logic        rst,

  input  logic        fifo_prog_empty,
  input  logic [63:0] fifo_dout,
  output logic        fifo_rd_en,

  output logic [63:0] m_tdata,
  output logic [7:0]  m_tkeep,
  output logic        m_tvalid,
  output logic        m_tlast,
  input  logic        m_tready,

  output logic [15:0] frame_count,   // counter value of the frame being sent
  output logic        frame_sent     // pulse: last beat accepted
);
  typedef enum logic [1:0] {S_IDLE, S_HDR0, S_HDR1, S_PAY} state_e;

  state_e       state_q;
  logic [15:0]  fcnt_q;
  logic [$clog2(NWORDS)-1:0] beat_q;
  logic         accept;

  assign accept      = m_tvalid && m_tready;
  assign frame_count = fcnt_q;

  always_comb begin
    m_tvalid   = 1'b0;
    m_tlast    = 1'b0;
    m_tkeep    = 8'hFF;
    m_tdata    = '0;
    fifo_rd_en = 1'b0;
    unique case (state_q)
      S_IDLE: ;
      S_HDR0: begin
        m_tvalid = 1'b1;
        m_tdata  = hdr_beat0(DEST_MAC, SRC_MAC[15:0]);
      end
      S_HDR1: begin
        m_tvalid = 1'b1;
        m_tdata  = hdr_beat1(SRC_MAC[47:16], fcnt_q);
      end
      S_PAY: begin
        m_tvalid   = 1'b1;
        m_tdata    = fifo_dout;
        m_tlast    = (beat_q == ($bits(beat_q))'(NWORDS - 1));
        fifo_rd_en = m_tready;
      end
      default: ;
    endcase
  end

  assign frame_sent = accept && m_tlast;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      fcnt_q  <= 16'd1;
      beat_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (!fifo_prog_empty) state_q <= S_HDR0;
        S_HDR0: if (accept) state_q <= S_HDR1;
        S_HDR1: if (accept) begin
          state_q <= S_PAY;
          beat_q  <= '0;
        end
        S_PAY: if (accept) begin
          if (m_tlast) begin
            state_q <= S_IDLE;
            fcnt_q  <= fcnt_q + 16'd1;
          end else begin
            beat_q <= beat_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // AXI4-Stream: once valid, a beat stays put until it is accepted.
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast))
    else $error("framer changed an unaccepted beat");
`endif
endmodule
