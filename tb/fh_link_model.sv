// fh_link_model: behavioural stand-in for two 10G Ethernet MACs and the fibre
// between them (one direction). Not synthesizable; testbench use only.
//
// It accepts beats from a transmit AXI4-Stream (tready driven here) and
// delivers them, DELAY clock cycles later, on a receive AXI4-Stream with no
// back-pressure, as a 10G MAC's receive interface does. tuser is high on the
// last beat of a good frame. The testbench can:
//   - throttle tready at random (`rand_bp`) or hold it low (`hold`),
//   - arm a fault on the next frame with `fault_arm`/`fault_sel`:
//       1 drop the frame, 2 deliver it with a bad FCS (tuser low),
//       3 corrupt one destination-address bit.
// `faults_done` counts faults applied, `stall_cycles` counts cycles with
// tvalid high and tready low. Both ends use the same clock here.
`timescale 1ns/1ps
module fh_link_model #(
  parameter int unsigned DELAY = 64
) (
  input  logic        clk,
  input  logic [63:0] m_tdata,
  input  logic [7:0]  m_tkeep,
  input  logic        m_tvalid,
  input  logic        m_tlast,
  output logic        m_tready,
  output logic [63:0] s_tdata,
  output logic [7:0]  s_tkeep,
  output logic        s_tvalid,
  output logic        s_tlast,
  output logic        s_tuser,
  input  logic        rand_bp,
  input  logic        hold,
  input  logic        fault_arm,
  input  logic [1:0]  fault_sel,
  output int          faults_done,
  output int          stall_cycles
);
  typedef struct {
    logic [63:0] data;
    logic [7:0]  keep;
    logic        last;
    logic        user;
    longint      due;
  } beat_t;

  beat_t  q[$];
  longint cyc = 0;
  logic [1:0] armed = 2'd0, cur = 2'd0;
  bit     in_frame = 0;
  initial begin faults_done = 0; stall_cycles = 0; end

  initial m_tready = 1'b0;
  initial begin s_tvalid = 0; s_tdata = 0; s_tkeep = 0; s_tlast = 0; s_tuser = 0; end

  always @(posedge clk) begin
    beat_t b;
    cyc++;
    if (fault_arm) armed = fault_sel;
    if (m_tvalid && !m_tready) stall_cycles++;
    if (m_tvalid && m_tready) begin
      bit first;
      first = !in_frame;
      if (first) begin
        cur = armed; armed = 2'd0; in_frame = 1;
        if (cur != 0) faults_done++;
      end
      b.data = m_tdata; b.keep = m_tkeep; b.last = m_tlast; b.user = m_tlast;
      b.due  = cyc + DELAY;
      if (cur == 2'd3 && first) b.data[0] = ~b.data[0];
      if (cur == 2'd2 && m_tlast) b.user = 1'b0;
      if (cur != 2'd1) q.push_back(b);
      if (m_tlast) in_frame = 0;
    end
    // drive outputs for the next cycle
    #0.1;
    if (q.size() > 0 && q[0].due <= cyc) begin
      b = q.pop_front();
      s_tvalid = 1; s_tdata = b.data; s_tkeep = b.keep; s_tlast = b.last; s_tuser = b.user;
    end else begin
      s_tvalid = 0; s_tlast = 0; s_tuser = 0;
    end
    m_tready = !hold && (!rand_bp || ($urandom_range(0, 3) != 0));
  end
endmodule
