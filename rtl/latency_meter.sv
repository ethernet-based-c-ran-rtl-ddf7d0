// latency_meter: BBU side of the fronthaul latency measurement.
//
// `trigger_in` comes from the RRH on its own wire and is synchronised with
// SYNC_STAGES flip-flops. On its rising edge the meter starts counting
// EUTRA clock cycles. It stops when the received IQ word `iq_rx` equals the
// known sequence LAT_SEQ. `latency` then holds the number of clock edges from
// the edge that raised the trigger at the source (same clock assumed) to the
// edge that put the first LAT_SEQ word on iq_rx, and `latency_valid` is
// high. The synchroniser delay is included in the count. The counter saturates
// at its maximum. A new trigger starts a new measurement.
// Counting cycles from the trigger to the first 0x55 word follows the
// design, where a logic analyser did it; the on-chip counter is this
// implementation's own.
module latency_meter
  import fh_pkg::*;
#(
  parameter int unsigned CW          = 16,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          trigger_in,
  input  logic [31:0]   iq_rx,
  output logic [CW-1:0] latency,
  output logic          latency_valid,
  output logic          busy
);
  logic trig_s, trig_q, rise;
  logic [CW-1:0] cnt_q;

  cdc_sync #(.WIDTH(1), .STAGES(SYNC_STAGES)) u_sync (.clk(clk), .rst(rst), .d(trigger_in), .q(trig_s));

  assign rise = trig_s && !trig_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_q        <= 1'b0;
      cnt_q         <= '0;
      busy          <= 1'b0;
      latency       <= '0;
      latency_valid <= 1'b0;
    end else begin
      trig_q <= trig_s;
      if (rise) begin
        busy          <= 1'b1;
        latency_valid <= 1'b0;
        cnt_q         <= CW'(SYNC_STAGES + 1);
      end else if (busy) begin
        if (iq_rx == LAT_SEQ) begin
          busy          <= 1'b0;
          latency       <= cnt_q;
          latency_valid <= 1'b1;
        end else if (cnt_q != '1) begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end
endmodule
