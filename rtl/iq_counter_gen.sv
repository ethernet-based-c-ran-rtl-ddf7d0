// iq_counter_gen: test source that stands in for the IQ samples.
//
// A 32-bit counter is written into the TX FIFO, one word per clock, whenever
// `en` is high and the FIFO reports room for a frame (`fifo_prog_full` low).
// It increments on each word written, so the receiver sees consecutive
// values. It starts at zero after reset. Latency: `wr_en`/`data` are combinational
// from the counter register and the FIFO flag.
// Error insertion: a rising edge on the push-button `err_btn` (synchronised
// with two flip-flops) arms a one-shot. At the next written word the counter
// advances by 2 instead of 1, so exactly one value is missing from the
// stream and the far-end checker flags one error. `err_inserted` pulses then.
// The counter, its purpose and a push-button for deliberate errors follow the
// standalone link test of the design; the throttling on the FIFO flag and the
// form of the error (one skipped value) are this implementation's choices.
module iq_counter_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        fifo_prog_full,
  input  logic        err_btn,
  output logic        wr_en,
  output logic [31:0] data,
  output logic        err_inserted
);
  logic [31:0] cnt_q;
  logic        btn_s, btn_q, pend_q;

  cdc_sync #(.WIDTH(1)) u_btn (.clk(clk), .rst(rst), .d(err_btn), .q(btn_s));

  assign wr_en = en && !fifo_prog_full;
  assign data  = cnt_q;

  always_ff @(posedge clk) begin
    err_inserted <= 1'b0;
    if (rst) begin
      cnt_q  <= '0;
      btn_q  <= 1'b0;
      pend_q <= 1'b0;
    end else begin
      btn_q <= btn_s;
      if (btn_s && !btn_q) pend_q <= 1'b1;
      if (wr_en) begin
        cnt_q <= cnt_q + (pend_q ? 32'd2 : 32'd1);
        if (pend_q) begin
          pend_q       <= 1'b0;
          err_inserted <= 1'b1;
        end
      end
    end
  end
endmodule
