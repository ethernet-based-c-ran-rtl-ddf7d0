// tb_fronthaul_endpoint: end-to-end test of the Ethernet fronthaul.
//
// Two fronthaul_endpoint instances at their default parameters, "RRH" (a)
// and "BBU" (b), are joined by two fh_link_model instances (one per
// direction) standing in for the 10G MACs and a 20 km fibre (100 us delay,
// 15625 cycles at 156.25 MHz). Each side has a model of the EUTRA module:
// on every iq_tx_enable it sends one basic frame of eight tagged words
// {side tag, basic-frame number, word index}. The receiving side must deliver
// each basic frame whole, in order, with basic_frame_first_word on its first
// word, and only the frames a phase deliberately loses may be missing.
//
// Phases, each making one mechanism happen and counting it:
//  1 test mode: counter source and incremental checker over the link; one
//    frame dropped on the fibre must light the checker LED; push-button clears it;
//    the error-insertion button on the RRH must light it again
//  2 mode switch to the EUTRA interface (under reset), random MAC back-pressure
//  3 latency measurement in both directions: button, trigger wire, far-end
//    meter compared with the cycle count taken here
//  4 a bad FCS (crc_error, payload kept), a corrupted header (hdr_error and
//    fn_error, frame lost), a frame lost on the fibre (fn_error)
//  5 MAC holds tready low: RRH TX FIFO fills (tx_drop), BBU starves
//    (rx_underflow), then recovers
//  6 the two EUTRA clocks differ by 20 %, as when each board makes its own
//    30.72 MHz clock: the BBU RX FIFO overflows (drop_full)
`timescale 1ns/1ps
module tb_fronthaul_endpoint;
  import fh_pkg::*;

  localparam int unsigned LINK_DELAY = 15625;

  // ---------------- clocks and resets ----------------
  logic eth_clk = 0, clk_a = 0, clk_b_free = 0, clk_b;
  real  half_b = 16.276;
  bit   common_clk = 1;
  always #3.2    eth_clk = ~eth_clk;
  always #16.276 clk_a = ~clk_a;
  always #(half_b) clk_b_free = ~clk_b_free;
  assign clk_b = common_clk ? clk_a : clk_b_free;

  logic rst = 1, test_mode = 1, en = 1;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // ---------------- DUT signals ----------------
  typedef struct packed {
    logic [31:0] iq_rx;
    logic        txe, bffw;
    logic [63:0] m_tdata, s_tdata;
    logic [7:0]  m_tkeep, s_tkeep;
    logic        m_tvalid, m_tlast, m_tready, s_tvalid, s_tlast, s_tuser;
    logic        errb, ins, clr, led, act, lat_btn, trig_out, trig_in, lat_valid, lat_busy;
    logic [15:0] err_cnt, latency;
    logic        fn_e, crc_e, hdr_e, dropf, fok, fsent, txdrop, uflow, stream;
  } side_t;
  side_t a, b;
  logic [31:0] iq_tx_a, iq_tx_b;

  fronthaul_endpoint u_rrh (
    .eth_clk(eth_clk), .eth_rst(rst), .eutra_clk(clk_a), .eutra_rst(rst),
    .enable(en), .iq_tx(iq_tx_a), .iq_tx_enable(a.txe), .iq_rx(a.iq_rx), .basic_frame_first_word(a.bffw),
    .m_tdata(a.m_tdata), .m_tkeep(a.m_tkeep), .m_tvalid(a.m_tvalid), .m_tlast(a.m_tlast), .m_tready(a.m_tready),
    .s_tdata(a.s_tdata), .s_tkeep(a.s_tkeep), .s_tvalid(a.s_tvalid), .s_tlast(a.s_tlast), .s_tuser(a.s_tuser),
    .test_mode(test_mode), .chk_err_btn(a.errb), .chk_err_inserted(a.ins), .chk_clear_btn(a.clr), .chk_err_led(a.led), .chk_active(a.act), .chk_err_count(a.err_cnt),
    .lat_btn(a.lat_btn), .lat_trigger_out(a.trig_out), .lat_trigger_in(b.trig_out), .latency(a.latency),
    .latency_valid(a.lat_valid), .latency_busy(a.lat_busy),
    .fn_error(a.fn_e), .crc_error(a.crc_e), .hdr_error(a.hdr_e), .drop_full(a.dropf), .frame_ok(a.fok),
    .frame_sent(a.fsent), .tx_drop(a.txdrop), .rx_underflow(a.uflow), .rx_streaming(a.stream));

  fronthaul_endpoint u_bbu (
    .eth_clk(eth_clk), .eth_rst(rst), .eutra_clk(clk_b), .eutra_rst(rst),
    .enable(en), .iq_tx(iq_tx_b), .iq_tx_enable(b.txe), .iq_rx(b.iq_rx), .basic_frame_first_word(b.bffw),
    .m_tdata(b.m_tdata), .m_tkeep(b.m_tkeep), .m_tvalid(b.m_tvalid), .m_tlast(b.m_tlast), .m_tready(b.m_tready),
    .s_tdata(b.s_tdata), .s_tkeep(b.s_tkeep), .s_tvalid(b.s_tvalid), .s_tlast(b.s_tlast), .s_tuser(b.s_tuser),
    .test_mode(test_mode), .chk_err_btn(b.errb), .chk_err_inserted(b.ins), .chk_clear_btn(b.clr), .chk_err_led(b.led), .chk_active(b.act), .chk_err_count(b.err_cnt),
    .lat_btn(b.lat_btn), .lat_trigger_out(b.trig_out), .lat_trigger_in(a.trig_out), .latency(b.latency),
    .latency_valid(b.lat_valid), .latency_busy(b.lat_busy),
    .fn_error(b.fn_e), .crc_error(b.crc_e), .hdr_error(b.hdr_e), .drop_full(b.dropf), .frame_ok(b.fok),
    .frame_sent(b.fsent), .tx_drop(b.txdrop), .rx_underflow(b.uflow), .rx_streaming(b.stream));

  // ---------------- links ----------------
  logic bp = 0, hold_ab = 0, arm_ab = 0;
  logic [1:0] sel_ab = 0;
  int faults_ab, stalls_ab, faults_ba, stalls_ba;

  fh_link_model #(.DELAY(LINK_DELAY)) u_ab (
    .clk(eth_clk), .m_tdata(a.m_tdata), .m_tkeep(a.m_tkeep), .m_tvalid(a.m_tvalid), .m_tlast(a.m_tlast),
    .m_tready(a.m_tready), .s_tdata(b.s_tdata), .s_tkeep(b.s_tkeep), .s_tvalid(b.s_tvalid),
    .s_tlast(b.s_tlast), .s_tuser(b.s_tuser), .rand_bp(bp), .hold(hold_ab), .fault_arm(arm_ab),
    .fault_sel(sel_ab), .faults_done(faults_ab), .stall_cycles(stalls_ab));

  fh_link_model #(.DELAY(LINK_DELAY)) u_ba (
    .clk(eth_clk), .m_tdata(b.m_tdata), .m_tkeep(b.m_tkeep), .m_tvalid(b.m_tvalid), .m_tlast(b.m_tlast),
    .m_tready(b.m_tready), .s_tdata(a.s_tdata), .s_tkeep(a.s_tkeep), .s_tvalid(a.s_tvalid),
    .s_tlast(a.s_tlast), .s_tuser(a.s_tuser), .rand_bp(bp), .hold(1'b0), .fault_arm(1'b0),
    .fault_sel(2'd0), .faults_done(faults_ba), .stall_cycles(stalls_ba));

  // ---------------- event counters (eth domain) ----------------
  int n_fn_b = 0, n_crc_b = 0, n_hdr_b = 0, n_dropf_b = 0, n_fn_a = 0, n_hdr_a = 0, n_crc_a = 0;
  always @(posedge eth_clk) if (!rst) begin
    n_fn_b += b.fn_e; n_crc_b += b.crc_e; n_hdr_b += b.hdr_e; n_dropf_b += b.dropf;
    n_fn_a += a.fn_e; n_hdr_a += a.hdr_e; n_crc_a += a.crc_e;
  end

  // ---------------- EUTRA models ----------------
  // word = {tag, basic-frame number, word index}
  function automatic logic [31:0] word(input logic [3:0] tag, input int bf, input int w);
    return {tag, bf[24:0], w[2:0]};
  endfunction

  int tx_bf_a = 0, tx_left_a = 0, tx_bf_b = 0, tx_left_b = 0, ncyc_a = 0, last_txe_a = -1;
  int n_txdrop_a = 0, n_uflow_b = 0, n_uflow_a = 0, n_act_a = 0, n_act_b = 0;
  always @(posedge clk_a) begin
    ncyc_a++;
    if (rst) begin tx_left_a = 0; iq_tx_a <= '0; end
    else begin
      n_txdrop_a += a.txdrop; n_uflow_a += a.uflow; n_act_a += a.act;
      if (a.txe) begin
        if (last_txe_a >= 0) check(ncyc_a - last_txe_a == 8, "RRH iq_tx_enable period");
        last_txe_a = ncyc_a;
        tx_left_a = 8; tx_bf_a++;
      end
      if (tx_left_a > 0) begin iq_tx_a <= word(4'hA, tx_bf_a, 8 - tx_left_a); tx_left_a--; end
      else iq_tx_a <= 32'h0;
    end
  end
  always @(posedge clk_b) begin
    if (rst) begin tx_left_b = 0; iq_tx_b <= '0; end
    else begin
      n_uflow_b += b.uflow; n_act_b += b.act;
      if (b.txe) begin tx_left_b = 8; tx_bf_b++; end
      if (tx_left_b > 0) begin iq_tx_b <= word(4'hB, tx_bf_b, 8 - tx_left_b); tx_left_b--; end
      else iq_tx_b <= 32'h0;
    end
  end

  // ---------------- receive checkers ----------------
  typedef struct { int got; int last_bf; int gaps; int frames; int lat_frames; int bad; logic [31:0] w[8]; } rxchk_t;
  rxchk_t ra = '{got: -1, last_bf: -1, default: 0};
  rxchk_t rb = '{got: -1, last_bf: -1, default: 0};

  task automatic rx_step(inout rxchk_t r, input logic bffw, input logic [31:0] d, input logic [3:0] tag);
    if (bffw) begin
      if (r.got >= 0) begin r.bad++; $display("FAIL basic frame cut short at %t", $time); end
      r.got = 0;
    end
    if (r.got >= 0) begin
      r.w[r.got] = d; r.got++;
      if (r.got == 8) begin
        r.got = -1;
        if (r.w[0] == LAT_SEQ) begin
          r.lat_frames++;
          for (int i = 1; i < 8; i++) if (r.w[i] != LAT_SEQ) r.bad++;
        end else begin
          int bf = int'(r.w[0][27:3]);
          for (int i = 0; i < 8; i++) if (r.w[i] != word(tag, bf, i)) r.bad++;
          if (r.last_bf >= 0) begin
            if (bf <= r.last_bf) r.bad++;
            else r.gaps += bf - r.last_bf - 1;
          end
          r.last_bf = bf;
          r.frames++;
        end
      end
    end
  endtask
  always @(posedge clk_a) if (!rst && !test_mode) rx_step(ra, a.bffw, a.iq_rx, 4'hB);
  always @(posedge clk_b) if (!rst && !test_mode) rx_step(rb, b.bffw, b.iq_rx, 4'hA);

  // ---------------- latency, measured here ----------------
  int t_trig = -1, t_seq = -1;
  logic trig_q = 0;
  always @(posedge clk_a) begin
    if (a.trig_out && !trig_q) t_trig = ncyc_a;
    if (t_trig >= 0 && t_seq < 0 && b.iq_rx == LAT_SEQ) t_seq = ncyc_a;
    trig_q <= a.trig_out;
  end
  int t_trig_b = -1, t_seq_b = -1;
  logic trig_bq = 0;
  always @(posedge clk_a) begin
    if (b.trig_out && !trig_bq) t_trig_b = ncyc_a;
    if (t_trig_b >= 0 && t_seq_b < 0 && a.iq_rx == LAT_SEQ) t_seq_b = ncyc_a;
    trig_bq <= b.trig_out;
  end

  // ---------------- helpers ----------------
  task automatic wait_a(input int n); repeat (n) @(posedge clk_a); #1; endtask
  task automatic do_reset();
    rst = 1; wait_a(8); rst = 0;
  endtask
  task automatic arm(input logic [1:0] s);
    @(posedge eth_clk); #0.5 arm_ab = 1; sel_ab = s;
    @(posedge eth_clk); #0.5 arm_ab = 0;
  endtask
  // frames still on the fibre take LINK_DELAY eth cycles = about 3072 EUTRA cycles
  localparam int FLIGHT = 3300;

  int n_ins_a = 0, mech_inject = 0;
  always @(posedge clk_a) n_ins_a += int'(a.ins);

  int mech_test = 0, mech_chk_err = 0, mech_switch = 0, mech_stall = 0, mech_lat = 0;
  int gaps0, fn0, hdr0, crc0;

  initial begin
    #30ms;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a.clr = 0; b.clr = 0; a.lat_btn = 0; b.lat_btn = 0; a.errb = 0; b.errb = 0;
    // ---- phase 1: standalone link test ----
    test_mode = 1;
    do_reset();
    wait_a(FLIGHT + 2000);
    check(n_act_b > 1000 && n_act_a > 1000, "checkers saw counter words");
    check(!a.led && !b.led && a.err_cnt == 0 && b.err_cnt == 0, "clean counter stream");
    mech_test = (n_act_b > 0) ? 1 : 0;
    arm(2'd1);                                  // drop one frame on the fibre
    wait_a(FLIGHT + 500);
    check(b.led && b.err_cnt == 1, $sformatf("checker flags the lost frame (%0d)", b.err_cnt));
    check(n_fn_b == 1, "de-framer fn_error for the lost frame");
    mech_chk_err = b.led;
    b.clr = 1; wait_a(4); b.clr = 0; wait_a(2);
    check(!b.led, "push-button clears the LED");
    // deliberate error: the RRH counter skips one value, no frame is lost
    a.errb = 1; wait_a(4); a.errb = 0;
    wait_a(FLIGHT + 500);
    check(n_ins_a == 1, "one error inserted");
    check(b.led && b.err_cnt == 2, $sformatf("checker flags the inserted error (%0d)", b.err_cnt));
    check(n_fn_b == 1, "inserted error is in the payload, not a lost frame");
    mech_inject = n_ins_a;
    b.clr = 1; wait_a(4); b.clr = 0; wait_a(2);
    check(!b.led, "push-button clears the LED again");

    // ---- phase 2: switch to the EUTRA interface ----
    en = 0; wait_a(FLIGHT + 200);               // let the fibre drain first
    test_mode = 0; bp = 1; en = 1;
    do_reset();
    mech_switch++;
    n_fn_b = 0; n_fn_a = 0;
    wait_a(FLIGHT + 3000);
    check(rb.frames > 200 && ra.frames > 200, $sformatf("basic frames delivered %0d / %0d", rb.frames, ra.frames));
    check(rb.gaps == 0 && ra.gaps == 0 && rb.bad == 0 && ra.bad == 0, "clean IQ stream both ways");
    check(n_fn_b == 0 && n_fn_a == 0 && n_hdr_a == 0 && n_hdr_b == 0, "no frame errors");
    mech_stall = stalls_ab + stalls_ba;
    check(mech_stall > 0, "MAC back-pressure stalled the framer");

    // ---- phase 3: latency ----
    a.lat_btn = 1; wait_a(3); a.lat_btn = 0;
    wait_a(FLIGHT + 1000);
    check(b.lat_valid, "latency measured");
    check(t_trig >= 0 && t_seq > t_trig, "sequence seen at BBU");
    check(int'(b.latency) == t_seq - t_trig, $sformatf("latency %0d, counted %0d", b.latency, t_seq - t_trig));
    check(rb.lat_frames == 1, "one injected basic frame");
    check(rb.gaps == 1 && rb.bad == 0, "injected frame replaced exactly one basic frame");
    mech_lat = b.lat_valid;
    $display("RRH->BBU latency %0d EUTRA cycles (%0d ns)", b.latency, int'(b.latency * 32.552));
    // and the other way: BBU button, RRH meter
    check(!a.lat_valid, "no RRH measurement yet");
    b.lat_btn = 1; wait_a(3); b.lat_btn = 0;
    wait_a(FLIGHT + 1000);
    check(a.lat_valid, "BBU->RRH latency measured");
    check(t_trig_b >= 0 && t_seq_b > t_trig_b, "sequence seen at RRH");
    check(int'(a.latency) == t_seq_b - t_trig_b, $sformatf("latency %0d, counted %0d", a.latency, t_seq_b - t_trig_b));
    check(ra.lat_frames == 1 && ra.gaps == 1 && ra.bad == 0, "one basic frame replaced at the RRH");
    check(b.lat_valid && rb.lat_frames == 1, "RRH->BBU result kept");
    mech_lat += a.lat_valid;
    $display("BBU->RRH latency %0d EUTRA cycles (%0d ns)", a.latency, int'(a.latency * 32.552));

    // ---- phase 4: faults on the fibre ----
    gaps0 = rb.gaps; fn0 = n_fn_b; crc0 = n_crc_b; hdr0 = n_hdr_b;
    arm(2'd2); wait_a(FLIGHT + 300);
    check(n_crc_b == crc0 + 1 && rb.gaps == gaps0 && n_fn_b == fn0, "bad FCS flagged, payload kept");
    arm(2'd3); wait_a(FLIGHT + 300);
    check(n_hdr_b == hdr0 + 1, "corrupted header flagged");
    check(rb.gaps == gaps0 + 2 && n_fn_b == fn0 + 1, "header-error frame dropped: two basic frames, fn_error");
    arm(2'd1); wait_a(FLIGHT + 300);
    check(rb.gaps == gaps0 + 4 && n_fn_b == fn0 + 2, "lost frame: two basic frames, fn_error");
    check(rb.bad == 0 && faults_ab == 4, "fault phase delivered whole frames only");

    // ---- phase 5: MAC holds tready low ----
    gaps0 = rb.gaps;
    hold_ab = 1; wait_a(9500); hold_ab = 0;
    check(n_txdrop_a > 0, $sformatf("RRH TX FIFO full: %0d basic frames dropped", n_txdrop_a));
    check(n_uflow_b > 0, "BBU RX starved: rx_underflow");
    wait_a(FLIGHT + 12000);
    check(rb.bad == 0, "whole basic frames after recovery");
    check(rb.gaps - gaps0 >= n_txdrop_a, "dropped basic frames missing at BBU");
    check(rb.frames > 0 && b.stream, "BBU streaming again");
    gaps0 = rb.gaps;
    wait_a(2000);
    check(rb.gaps == gaps0, "clean after recovery");

    // ---- phase 6: separate EUTRA clocks (BBU 20 % slow) ----
    half_b = 16.276 * 1.2;
    @(posedge clk_a); #1 common_clk = 0;
    wait_a(60000);
    check(n_dropf_b > 0, $sformatf("BBU RX FIFO overflow: %0d frames dropped", n_dropf_b));
    check(n_uflow_a > 0, "RRH RX starved by the slower BBU");
    check(rb.bad == 0 && ra.bad == 0, "still whole basic frames only");

    // ---- mechanisms ----
    check(mech_test > 0,   "mechanism: test mode");
    check(mech_chk_err > 0, "mechanism: checker error LED");
    check(mech_inject > 0, "mechanism: error insertion");
    check(mech_switch > 0, "mechanism: mode switch");
    check(mech_stall > 0,  "mechanism: framer stall");
    check(mech_lat > 0,    "mechanism: latency measurement");
    $display("mechanisms: stalls=%0d crc=%0d hdr=%0d fn=%0d drop_full=%0d tx_drop=%0d underflow_b=%0d underflow_a=%0d lat=%0d inject=%0d",
             mech_stall, n_crc_b, n_hdr_b, n_fn_b, n_dropf_b, n_txdrop_a, n_uflow_b, n_uflow_a, mech_lat, mech_inject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
