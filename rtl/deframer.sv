// deframer: checks frames received from the MAC and extracts their IQ payload.
//
// After reset it waits for a beat with tlast, so that it starts on a frame
// boundary. The next valid beat is taken as the first header beat. It checks
// the destination and source addresses and the Length/Type field against the
// frame layout of `framer`. It also checks that the 16-bit frame counter is
// the previous one plus 1. The eight payload beats are then written to the RX
// FIFO as they arrive. Output pulses, one clock wide:
//   fn_error   the frame counter skipped (a frame was lost or reordered)
//   hdr_error  wrong address or length field, or a frame of the wrong length;
//              the frame is not written (or is cut short where the length is
//              wrong) and reception resynchronises on tlast
//   crc_error  the MAC ended the frame with tuser low (bad FCS); the payload
//              has already been written and is kept
//   drop_full  the RX FIFO had no room for a whole frame, so the frame was dropped
//   frame_ok   a frame was written in full with a good FCS
// The RX FIFO room is checked once, at the second header beat. Only this block
// writes the FIFO, so the room cannot shrink during the frame.
// The RX AXI4-Stream of the MAC has no tready; gaps in tvalid are allowed.
// `fifo_din` is `s_tdata` itself and `fifo_wr_en` is decoded from the state and
// tvalid, so a payload beat reaches the RX FIFO in the cycle it arrives.
// The state machine, the tlast synchronisation, the header and counter checks
// and the CRC flag via tuser follow the design. Keeping payload with a bad FCS
// (rather than buffering whole frames) is this design's choice.
module deframer
  import fh_pkg::*;
#(
  parameter logic [47:0] DEST_MAC      = DEF_DEST_MAC,
  parameter logic [47:0] SRC_MAC       = DEF_SRC_MAC,
  parameter int unsigned NWORDS = fh_pkg::PAYLOAD_WORDS
) (
  input  logic        clk,
  input  logic        rst,

  input  logic [63:0] s_tdata,
  input  logic [7:0]  s_tkeep,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  input  logic        s_tuser,

  input  logic        fifo_prog_full,
  output logic        fifo_wr_en,
  output logic [63:0] fifo_din,

  output logic        fn_error,
  output logic        hdr_error,
  output logic        crc_error,
  output logic        drop_full,
  output logic        frame_ok,
  output logic [15:0] last_fcnt
);
  typedef enum logic [2:0] {S_SYNC, S_HDR0, S_HDR1, S_PAY, S_SKIP} state_e;

  state_e      state_q;
  logic [$clog2(NWORDS)-1:0] beat_q;
  logic [15:0] fcnt_q;
  logic        have_fcnt_q;
  logic        last_pay;

  assign last_pay   = (beat_q == ($bits(beat_q))'(NWORDS - 1));
  assign fifo_din   = s_tdata;
  assign fifo_wr_en = (state_q == S_PAY) && s_tvalid;
  assign last_fcnt  = fcnt_q;

  always_ff @(posedge clk) begin
    fn_error  <= 1'b0;
    hdr_error <= 1'b0;
    crc_error <= 1'b0;
    drop_full <= 1'b0;
    frame_ok  <= 1'b0;
    if (rst) begin
      state_q     <= S_SYNC;
      beat_q      <= '0;
      fcnt_q      <= '0;
      have_fcnt_q <= 1'b0;
    end else if (s_tvalid) begin
      unique case (state_q)
        S_SYNC: if (s_tlast) state_q <= S_HDR0;

        S_HDR0: begin
          if (s_tlast) begin
            hdr_error <= 1'b1;                     // one-beat frame
          end else if (s_tdata != hdr_beat0(DEST_MAC, SRC_MAC[15:0])) begin
            hdr_error <= 1'b1;
            state_q   <= S_SKIP;
          end else begin
            state_q   <= S_HDR1;
          end
        end

        S_HDR1: begin
          if (s_tdata[47:0] != {FRAME_LEN, SRC_MAC[47:16]} || s_tlast) begin
            hdr_error <= 1'b1;
            state_q   <= s_tlast ? S_HDR0 : S_SKIP;
          end else begin
            if (have_fcnt_q && s_tdata[63:48] != fcnt_q + 16'd1) fn_error <= 1'b1;
            fcnt_q      <= s_tdata[63:48];
            have_fcnt_q <= 1'b1;
            beat_q      <= '0;
            if (fifo_prog_full) begin
              drop_full <= 1'b1;
              state_q   <= S_SKIP;
            end else begin
              state_q   <= S_PAY;
            end
          end
        end

        S_PAY: begin
          beat_q <= beat_q + 1'b1;
          if (s_tlast) begin
            state_q <= S_HDR0;
            if (!last_pay || s_tkeep != 8'hFF) hdr_error <= 1'b1;
            else if (!s_tuser)                 crc_error <= 1'b1;
            else                               frame_ok  <= 1'b1;
          end else if (last_pay) begin
            hdr_error <= 1'b1;                     // frame longer than expected
            state_q   <= S_SKIP;
          end
        end

        S_SKIP: if (s_tlast) state_q <= S_HDR0;

        default: state_q <= S_SYNC;
      endcase
    end
  end
endmodule
