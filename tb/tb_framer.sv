// tb_framer: self-checking test of the Ethernet framer.
//
// A first-word-fall-through FIFO is modelled with a queue of 64-bit words.
// The MAC side drives tready at random (and held high in a timing phase).
// Every accepted beat is compared with the frame layout worked out here:
// two header beats (addresses, Length 0x0040, frame counter from 1 upwards)
// then eight payload words in FIFO order, tlast on the tenth, tkeep all ones.
// With tready always high a frame must take 10 cycles and frames must follow
// each other every 11 cycles.
`timescale 1ns/1ps
module tb_framer;
  import fh_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #3.2 clk = ~clk;

  logic [63:0] fifo_q[$];
  logic        prog_empty, rd_en, tvalid, tlast, tready, sent;
  logic [63:0] dout, tdata;
  logic [7:0]  tkeep;
  logic [15:0] fcount;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  assign prog_empty = fifo_q.size() < 8;
  assign dout       = fifo_q.size() > 0 ? fifo_q[0] : 64'h0;

  framer dut (.clk(clk), .rst(rst), .fifo_prog_empty(prog_empty), .fifo_dout(dout), .fifo_rd_en(rd_en),
              .m_tdata(tdata), .m_tkeep(tkeep), .m_tvalid(tvalid), .m_tlast(tlast), .m_tready(tready),
              .frame_count(fcount), .frame_sent(sent));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // expected stream of beats
  logic [63:0] exp_q[$];
  logic        exp_last[$];
  logic [63:0] pushed = 64'h1000;
  int unsigned frames = 0;
  logic [15:0] efcnt = 16'd1;

  task automatic push_frame_data();
    for (int i = 0; i < 8; i++) begin
      fifo_q.push_back(pushed);
      pushed = pushed * 64'd6364136223846793005 + 64'd1442695040888963407;
    end
  endtask

  // the model FIFO pops on rd_en; expected beats are generated at frame start
  int unsigned first_cyc[$], last_cyc[$];
  int beat = 0;
  logic [63:0] pay_q[$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && tvalid && tready) begin
      logic [63:0] e;
      if (beat == 0)      e = {SRC_MAC_T[15:0], DEST_MAC_T};
      else if (beat == 1) e = {efcnt, 16'h0040, SRC_MAC_T[47:16]};
      else                e = fifo_q[0];
      check(tdata == e, $sformatf("beat %0d data %h exp %h", beat, tdata, e));
      check(tkeep == 8'hFF, "tkeep");
      check(tlast == (beat == 9), $sformatf("tlast on beat %0d", beat));
      check(rd_en == (beat >= 2), "rd_en only on payload beats");
      if (beat == 0) first_cyc.push_back(cyc);
      if (beat == 1) check(fcount == efcnt, "frame_count output");
      if (rd_en) void'(fifo_q.pop_front());
      if (beat == 9) begin
        check(sent, "frame_sent");
        last_cyc.push_back(cyc);
        beat = 0; efcnt++; frames++;
      end else beat++;
    end else if (!rst) begin
      check(!rd_en, "no read without accepted beat");
    end
  end
  localparam logic [47:0] DEST_MAC_T = 48'hA1111111111B;
  localparam logic [47:0] SRC_MAC_T  = 48'hC2222222222D;

  // hold rule: an unaccepted beat stays the same
  logic [63:0] prev_d; logic prev_stall = 0;
  always @(posedge clk) begin
    if (prev_stall) check(tvalid && tdata == prev_d, "beat held while tready low");
    prev_stall <= !rst && tvalid && !tready;
    prev_d     <= tdata;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tready = 1'b0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    // no data: framer must stay idle
    repeat (20) @(posedge clk);
    check(!tvalid, "idle with empty FIFO");
    // only 7 words: still idle
    for (int i = 0; i < 7; i++) fifo_q.push_back(64'hDEAD0000 + i);
    repeat (20) @(posedge clk);
    check(!tvalid, "idle with less than one frame");
    fifo_q.delete();
    // random backpressure, 40 frames
    for (int f = 0; f < 40; f++) push_frame_data();
    fork
      forever begin @(negedge clk); tready = ($urandom_range(0, 3) != 0); end
    join_none
    wait (frames == 40);
    disable fork;
    @(negedge clk); tready = 1'b1;
    // timing: tready always high, 5 back-to-back frames
    repeat (5) @(posedge clk);
    first_cyc.delete(); last_cyc.delete();
    for (int f = 0; f < 5; f++) push_frame_data();
    wait (frames == 45);
    @(posedge clk);
    check(first_cyc.size() == 5 && last_cyc.size() == 5, "5 frames timed");
    for (int i = 0; i < 5; i++) check(last_cyc[i] - first_cyc[i] == 9, $sformatf("frame %0d takes 10 cycles", i));
    for (int i = 1; i < 5; i++) check(first_cyc[i] - first_cyc[i-1] == 11, $sformatf("frame period %0d", first_cyc[i] - first_cyc[i-1]));
    check(fifo_q.size() == 0, "all payload consumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
