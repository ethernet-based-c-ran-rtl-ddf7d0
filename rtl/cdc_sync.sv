// cdc_sync: multi-flop synchroniser for signals entering a clock domain.
//
// Each bit of `d` is sampled by STAGES flip-flops in series clocked by `clk`.
// It is used for single-bit flags (the latency trigger) and for Gray-coded
// FIFO pointers, where at most one bit changes per source-clock edge so the
// synchronised value is always either the old or the new pointer.
// Latency: STAGES cycles of `clk`. Reset is synchronous, active high, to RST_VAL.
// The synchroniser itself is this design's own choice; the FIFOs it serves
// only need independent read and write clocks.
module cdc_sync #(
  parameter int unsigned WIDTH   = 1,
  parameter int unsigned STAGES  = 2,
  parameter logic [WIDTH-1:0] RST_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] sync_q [STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) sync_q[i] <= RST_VAL;
    end else begin
      sync_q[0] <= d;
      for (int i = 1; i < STAGES; i++) sync_q[i] <= sync_q[i-1];
    end
  end

  assign q = sync_q[STAGES-1];
endmodule
