// latency_injector: RRH side of the fronthaul latency measurement.
//
// Sits on the 32-bit IQ path into the TX FIFO. A rising edge on `btn` (a
// synchronous push-button level) arms it. At the next `iq_tx_enable` from
// the Data Interface Controller, it replaces the following NWORDS (8) words by
// the known sequence LAT_SEQ (0x55555555). For the same cycles it drives
// `trigger` high; that flag goes to the BBU on its own wire.
// Timing: `trigger` rises in the cycle that the first injected word is
// written into the TX FIFO. Otherwise `iq_out` = `iq_in` combinationally.
// The button, the 0x55 sequence and the trigger flag follow the design;
// aligning the injection to a basic frame is this implementation's choice.
module latency_injector
  import fh_pkg::*;
#(
  parameter int unsigned NWORDS = fh_pkg::BF_WORDS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        btn,
  input  logic        iq_tx_enable,
  input  logic [31:0] iq_in,
  output logic [31:0] iq_out,
  output logic        trigger
);
  logic btn_q, armed_q;
  logic [$clog2(NWORDS+1)-1:0] left_q;

  assign trigger = (left_q != '0);
  assign iq_out  = trigger ? LAT_SEQ : iq_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      btn_q   <= 1'b0;
      armed_q <= 1'b0;
      left_q  <= '0;
    end else begin
      btn_q <= btn;
      if (left_q != '0) left_q <= left_q - 1'b1;
      if (armed_q && iq_tx_enable) begin
        armed_q <= 1'b0;
        left_q  <= ($bits(left_q))'(NWORDS);
      end else if (btn && !btn_q) begin
        armed_q <= 1'b1;
      end
    end
  end
endmodule
