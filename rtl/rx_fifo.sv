// rx_fifo: asynchronous, width-converting receive FIFO (64-bit in, 32-bit out).
//
// The write side runs on the 156.25 MHz 10GE clock and stores one 64-bit
// payload beat per `wr_en`. The read side runs on the 30.72 MHz EUTRA clock
// and is first-word-fall-through at 32 bits: `dout` shows bits [31:0] of the
// oldest entry, then bits [63:32], matching the packing of tx_fifo. Pointers
// cross in Gray code through two-flop synchronisers.
// The output register is one entry of storage of its own: once it is loaded
// the FIFO holds up to DEPTH64 + 1 entries. The read-side flags count it;
// the write side sees it as free room.
//
// prog_full  (write domain): fewer than FRAME_WORDS64 free entries, so the
//            de-framer must drop the next frame rather than overflow.
// prog_empty (read domain):  fewer than 2*FRAME_WORDS64 32-bit words stored.
// rd_level   (read domain):  number of 32-bit words readable now.
// Depth, widths, independent clocks and one-frame flags follow the design; the
// FWFT port, the level output and the Gray-code crossing are this
// implementation's own. Writes while full and reads while empty are ignored.
// Both resets are synchronous and must be held together.
module rx_fifo #(
  parameter int unsigned DEPTH64       = 4096,
  parameter int unsigned FRAME_WORDS64 = 8,
  localparam int unsigned LW           = $clog2(DEPTH64) + 2
) (
  input  logic          wr_clk,
  input  logic          wr_rst,
  input  logic          wr_en,
  input  logic [63:0]   din,
  output logic          full,
  output logic          prog_full,

  input  logic          rd_clk,
  input  logic          rd_rst,
  input  logic          rd_en,
  output logic [31:0]   dout,
  output logic          empty,
  output logic          prog_empty,
  output logic [LW-1:0] rd_level
);
  localparam int unsigned AW = $clog2(DEPTH64);
  localparam int unsigned PW = AW + 1;

  logic [63:0] mem [DEPTH64];

  // ---------------- write domain ----------------
  logic [PW-1:0] rptr, rptr_gray, wptr_gray_r, wptr_r;
  logic [PW-1:0] wptr, wptr_gray, rptr_gray_w, rptr_w, used_w;

  assign used_w    = wptr - rptr_w;
  assign full      = (used_w == PW'(DEPTH64));
  assign prog_full = (PW'(DEPTH64) - used_w) < PW'(FRAME_WORDS64);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wptr      <= '0;
      wptr_gray <= '0;
    end else if (wr_en && !full) begin
      mem[wptr[AW-1:0]] <= din;
      wptr      <= wptr + 1'b1;
      wptr_gray <= (wptr + 1'b1) ^ ((wptr + 1'b1) >> 1);
    end
  end

  cdc_sync #(.WIDTH(PW)) u_rsync (.clk(wr_clk), .rst(wr_rst), .d(rptr_gray), .q(rptr_gray_w));
  always_comb begin
    rptr_w[PW-1] = rptr_gray_w[PW-1];
    for (int i = PW - 2; i >= 0; i--) rptr_w[i] = rptr_w[i+1] ^ rptr_gray_w[i];
  end

  // ---------------- read domain ----------------
  logic [63:0]   out_q;
  logic          out_valid, hi_q;   // hi_q: low half already read
  logic          mem_has, fetch;

  cdc_sync #(.WIDTH(PW)) u_wsync (.clk(rd_clk), .rst(rd_rst), .d(wptr_gray), .q(wptr_gray_r));
  always_comb begin
    wptr_r[PW-1] = wptr_gray_r[PW-1];
    for (int i = PW - 2; i >= 0; i--) wptr_r[i] = wptr_r[i+1] ^ wptr_gray_r[i];
  end

  assign mem_has    = (rptr != wptr_r);
  assign fetch      = mem_has && (!out_valid || (rd_en && hi_q));
  assign empty      = !out_valid;
  assign dout       = hi_q ? out_q[63:32] : out_q[31:0];
  assign rd_level   = (LW'(wptr_r - rptr) << 1) + (out_valid ? (hi_q ? LW'(1) : LW'(2)) : LW'(0));
  assign prog_empty = rd_level < LW'(2 * FRAME_WORDS64);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr      <= '0;
      rptr_gray <= '0;
      out_valid <= 1'b0;
      hi_q      <= 1'b0;
      out_q     <= '0;
    end else begin
      if (fetch) begin
        out_q     <= mem[rptr[AW-1:0]];
        rptr      <= rptr + 1'b1;
        rptr_gray <= (rptr + 1'b1) ^ ((rptr + 1'b1) >> 1);
        out_valid <= 1'b1;
        hi_q      <= 1'b0;
      end else if (rd_en && out_valid) begin
        if (!hi_q) hi_q <= 1'b1;
        else begin
          out_valid <= 1'b0;
          hi_q      <= 1'b0;
        end
      end
    end
  end
endmodule
