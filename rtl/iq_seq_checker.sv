// iq_seq_checker: checks that the words read from the RX FIFO are consecutive.
//
// While `en` is high it pops one word per clock whenever the FIFO is not empty
// (`rd_en` = en && !empty). The first word after reset or after `en` rises
// sets the expected value. Every later word must equal the previous one plus
// one. A mismatch sets the latched `err_led` and resynchronises on the
// received value, so a lost frame gives one error, not a stream of them.
// `clear_btn` is a push-button level; it passes a two-flop synchroniser and
// clears the LED while held (two cycles later). `active` is high in the cycles
// in which a word is checked. `err_count` counts mismatches and saturates.
// The incremental-word check, the LED and the push-button reset follow the
// standalone link test; the resynchronisation is this implementation's choice.
module iq_seq_checker (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        fifo_empty,
  input  logic [31:0] fifo_dout,
  output logic        rd_en,
  input  logic        clear_btn,
  output logic        err_led,
  output logic        active,
  output logic [15:0] err_count
);
  logic [31:0] exp_q;
  logic        have_q, clr_s;

  cdc_sync #(.WIDTH(1)) u_clr (.clk(clk), .rst(rst), .d(clear_btn), .q(clr_s));

  assign rd_en  = en && !fifo_empty;
  assign active = rd_en;

  always_ff @(posedge clk) begin
    if (rst) begin
      exp_q     <= '0;
      have_q    <= 1'b0;
      err_led   <= 1'b0;
      err_count <= '0;
    end else begin
      if (!en) have_q <= 1'b0;
      else if (rd_en) begin
        have_q <= 1'b1;
        exp_q  <= fifo_dout + 32'd1;
        if (have_q && fifo_dout != exp_q) begin
          err_led   <= 1'b1;
          if (err_count != '1) err_count <= err_count + 16'd1;
        end
      end
      if (clr_s) err_led <= 1'b0;
    end
  end
endmodule
