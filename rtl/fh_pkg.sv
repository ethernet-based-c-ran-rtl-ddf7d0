// fh_pkg: constants and types shared by the Ethernet fronthaul blocks.
//
// The fronthaul carries 32-bit EUTRA IQ words inside Ethernet frames on the
// 64-bit AXI4-Stream side of a 10G Ethernet MAC. A frame is ten 64-bit beats:
// two header beats (destination address, source address, Length/Type and a
// 16-bit frame counter) and eight payload beats (64 bytes). The MAC itself
// adds preamble, SFD and FCS. A CPRI-style basic frame on the EUTRA side is
// eight 32-bit words, one per 30.72 MHz cycle.
//
// The frame layout, the 64-byte payload, Length = 0x0040 and the example
// addresses follow the framer description; the byte packing of the header
// beats follows its simulation trace (least significant field in the low bits).
package fh_pkg;

  localparam int unsigned IQ_W          = 32;        // EUTRA IQ word width
  localparam int unsigned PAYLOAD_WORDS = 8;         // 64-bit payload beats per frame
  localparam int unsigned BF_WORDS      = 8;         // 32-bit words per basic frame
  localparam logic [15:0] FRAME_LEN     = 16'h0040;  // Length/Type field = 64 bytes

  localparam logic [47:0] DEF_DEST_MAC  = 48'hA1111111111B;
  localparam logic [47:0] DEF_SRC_MAC   = 48'hC2222222222D;

  // Known sequence injected for the RRH-to-BBU latency measurement.
  localparam logic [IQ_W-1:0] LAT_SEQ   = 32'h5555_5555;

  // First header beat: destination address and the low 16 bits of the source.
  function automatic logic [63:0] hdr_beat0(logic [47:0] da, logic [15:0] sa_lo);
    return {sa_lo, da};
  endfunction

  // Second header beat: rest of the source address, Length/Type, frame counter.
  function automatic logic [63:0] hdr_beat1(logic [31:0] sa_hi, logic [15:0] fcnt);
    return {fcnt, FRAME_LEN, sa_hi};
  endfunction

endpackage
