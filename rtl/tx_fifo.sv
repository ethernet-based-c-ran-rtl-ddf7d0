// tx_fifo: asynchronous, width-converting transmit FIFO (32-bit in, 64-bit out).
//
// The write side runs on the 30.72 MHz EUTRA clock and takes one 32-bit IQ
// word per `wr_en`. Pairs of words are packed into one 64-bit entry, the first
// word in bits [31:0], so the first word written is the first byte group the
// MAC transmits. The read side runs on the 156.25 MHz 10GE clock and is
// first-word-fall-through: `dout` is valid whenever `empty` is low and
// `rd_en` takes it. Pointers cross the clock domains in Gray code through
// two-flop synchronisers, so the flags seen by each side are conservative.
// The output register is one entry of storage of its own: once it is loaded
// the FIFO holds up to DEPTH64 + 1 entries. The read-side flags count it;
// the write side sees it as free room.
//
// prog_full  (write domain): fewer than FRAME_WORDS64 free 64-bit entries,
//            i.e. no room for one more Ethernet frame of payload.
// prog_empty (read domain):  fewer than FRAME_WORDS64 64-bit words stored,
//            i.e. not yet one whole frame for the framer.
// The depth (4096 x 64 = 8192 x 32), the widths, the independent clocks and
// the one-frame flags follow the design; the FWFT read port and the Gray-code
// crossing are this implementation's choices. Writes while full and reads while
// empty are ignored. Both resets are synchronous and must be held together,
// for a few cycles of the slower clock.
module tx_fifo #(
  parameter int unsigned DEPTH64       = 4096,
  parameter int unsigned FRAME_WORDS64 = 8
) (
  input  logic        wr_clk,
  input  logic        wr_rst,
  input  logic        wr_en,
  input  logic [31:0] din,
  output logic        full,
  output logic        prog_full,

  input  logic        rd_clk,
  input  logic        rd_rst,
  input  logic        rd_en,
  output logic [63:0] dout,
  output logic        empty,
  output logic        prog_empty
);
  localparam int unsigned AW = $clog2(DEPTH64);
  localparam int unsigned PW = AW + 1;

  logic [63:0] mem [DEPTH64];

  // ---------------- write domain ----------------
  logic [PW-1:0] rptr, rptr_gray, wptr_gray_r, wptr_r;
  logic [PW-1:0] wptr, wptr_gray, rptr_gray_w, rptr_w;
  logic [31:0]   lo_q;
  logic          half_q;      // a low half is waiting for its partner
  logic [PW-1:0] used_w;

  assign used_w    = wptr - rptr_w;
  assign full      = (used_w == PW'(DEPTH64));
  assign prog_full = (PW'(DEPTH64) - used_w) < PW'(FRAME_WORDS64);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wptr      <= '0;
      wptr_gray <= '0;
      half_q    <= 1'b0;
      lo_q      <= '0;
    end else if (wr_en && !full) begin
      if (!half_q) begin
        lo_q   <= din;
        half_q <= 1'b1;
      end else begin
        mem[wptr[AW-1:0]] <= {din, lo_q};
        wptr      <= wptr + 1'b1;
        wptr_gray <= (wptr + 1'b1) ^ ((wptr + 1'b1) >> 1);
        half_q    <= 1'b0;
      end
    end
  end

  cdc_sync #(.WIDTH(PW)) u_rsync (.clk(wr_clk), .rst(wr_rst), .d(rptr_gray), .q(rptr_gray_w));
  always_comb begin
    rptr_w[PW-1] = rptr_gray_w[PW-1];
    for (int i = PW - 2; i >= 0; i--) rptr_w[i] = rptr_w[i+1] ^ rptr_gray_w[i];
  end

  // ---------------- read domain ----------------
  logic          out_valid;
  logic          mem_has, fetch;
  logic [PW-1:0] level_r;

  cdc_sync #(.WIDTH(PW)) u_wsync (.clk(rd_clk), .rst(rd_rst), .d(wptr_gray), .q(wptr_gray_r));
  always_comb begin
    wptr_r[PW-1] = wptr_gray_r[PW-1];
    for (int i = PW - 2; i >= 0; i--) wptr_r[i] = wptr_r[i+1] ^ wptr_gray_r[i];
  end

  assign mem_has    = (rptr != wptr_r);
  assign fetch      = mem_has && (!out_valid || rd_en);
  assign empty      = !out_valid;
  assign level_r    = (wptr_r - rptr) + PW'(out_valid);
  assign prog_empty = level_r < PW'(FRAME_WORDS64);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr      <= '0;
      rptr_gray <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      if (fetch) begin
        dout      <= mem[rptr[AW-1:0]];
        rptr      <= rptr + 1'b1;
        rptr_gray <= (rptr + 1'b1) ^ ((rptr + 1'b1) >> 1);
        out_valid <= 1'b1;
      end else if (rd_en) begin
        out_valid <= 1'b0;
      end
    end
  end

`ifndef SYNTHESIS
  // The framer only reads what is there.
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (rd_rst) rd_en |-> out_valid)
    else $error("tx_fifo read while empty");
`endif
endmodule
