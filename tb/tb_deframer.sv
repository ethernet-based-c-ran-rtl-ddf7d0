// tb_deframer: self-checking test of the Ethernet de-framer.
//
// Frames are driven on the receive AXI4-Stream with random tvalid gaps. The
// sequence covers: garbage before the first tlast (must be ignored), good
// frames, a lost frame (counter gap -> fn_error), a bad destination address
// and a bad Length field (hdr_error, not written), a bad FCS (tuser low ->
// crc_error, payload kept), a short and a long frame (hdr_error), and frames
// arriving while the RX FIFO reports no room (drop_full). The testbench keeps
// its own list of the payload words that must reach the FIFO and the number
// of each kind of error pulse, and compares both at the end.
`timescale 1ns/1ps
module tb_deframer;
  logic clk = 1'b0, rst = 1'b1;
  always #3.2 clk = ~clk;

  localparam logic [47:0] DA = 48'hA1111111111B;
  localparam logic [47:0] SA = 48'hC2222222222D;

  logic [63:0] tdata, fdin;
  logic [7:0]  tkeep;
  logic        tvalid, tlast, tuser, pfull, fwr;
  logic        fn_e, hdr_e, crc_e, dropf, fok;
  logic [15:0] lastf;
  int checks = 0, failures = 0;

  deframer dut (.clk(clk), .rst(rst), .s_tdata(tdata), .s_tkeep(tkeep), .s_tvalid(tvalid),
                .s_tlast(tlast), .s_tuser(tuser), .fifo_prog_full(pfull), .fifo_wr_en(fwr),
                .fifo_din(fdin), .fn_error(fn_e), .hdr_error(hdr_e), .crc_error(crc_e),
                .drop_full(dropf), .frame_ok(fok), .last_fcnt(lastf));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [63:0] exp_words[$], got_words[$];
  int n_fn = 0, n_hdr = 0, n_crc = 0, n_drop = 0, n_ok = 0;
  always @(posedge clk) begin
    if (fwr) got_words.push_back(fdin);
    if (!rst) begin
      n_fn  += fn_e;  n_hdr += hdr_e; n_crc += crc_e; n_drop += dropf; n_ok += fok;
    end
  end

  task automatic beat(input logic [63:0] d, input logic last, input logic user, input logic [7:0] keep = 8'hFF);
    while ($urandom_range(0, 3) == 0) begin
      @(negedge clk); tvalid = 1'b0; tdata = {$urandom, $urandom}; tlast = 1'($urandom);
    end
    @(negedge clk);
    tvalid = 1'b1; tdata = d; tlast = last; tuser = last ? user : 1'b0; tkeep = keep;
    @(posedge clk);
    #0.1 tvalid = 1'b0; tlast = 1'b0;
  endtask

  // kind: 0 good, 1 bad DA, 2 bad length, 3 bad FCS, 4 short, 5 long
  int e_fn = 0, e_hdr = 0, e_crc = 0, e_drop = 0, e_ok = 0;
  logic [15:0] e_last = 16'h0; bit e_have = 0;
  task automatic frame(input logic [15:0] fc, input int kind);
    logic [63:0] w;
    int npay = (kind == 4) ? 5 : (kind == 5) ? 9 : 8;
    bit hdr_ok = (kind != 1 && kind != 2);
    bit write  = hdr_ok && !pfull;
    if (!hdr_ok) e_hdr++;
    else begin
      if (e_have && fc != e_last + 16'd1) e_fn++;
      e_last = fc; e_have = 1;
      if (pfull) e_drop++;
      else if (kind == 4 || kind == 5) e_hdr++;
      else if (kind == 3) e_crc++;
      else e_ok++;
    end
    beat(kind == 1 ? {SA[15:0], DA ^ 48'h1} : {SA[15:0], DA}, 1'b0, 1'b0);
    beat({fc, (kind == 2 ? 16'h0041 : 16'h0040), SA[47:16]}, 1'b0, 1'b0);
    for (int i = 0; i < npay; i++) begin
      w = {$urandom, $urandom};
      if (write && i < 8) exp_words.push_back(w);
      beat(w, i == npay - 1, kind != 3);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tvalid = 0; tlast = 0; tuser = 0; tdata = 0; tkeep = 8'hFF; pfull = 0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // mid-frame garbage, ends with tlast: nothing may be written
    beat(64'h1234, 1'b0, 1'b0);
    beat({SA[15:0], DA}, 1'b0, 1'b0);
    beat(64'h5678, 1'b1, 1'b1);
    repeat (3) @(posedge clk);
    check(got_words.size() == 0 && n_hdr == 0, "ignored until first tlast");
    for (int f = 1; f <= 10; f++) frame(16'(f), 0);
    frame(16'd12, 0);            // frame 11 lost -> fn_error
    frame(16'd13, 1);            // bad DA
    frame(16'd13, 2);            // bad length
    frame(16'd13, 3);            // bad FCS, payload kept
    frame(16'd14, 4);            // short
    frame(16'd15, 5);            // long
    frame(16'd16, 0);
    pfull = 1'b1;
    frame(16'd17, 0);            // no room -> dropped
    frame(16'd18, 0);
    pfull = 1'b0;
    frame(16'd19, 0);
    frame(16'h0000, 0);          // counter gap
    for (int f = 1; f <= 20; f++) frame(16'(f), $urandom_range(0, 5));
    repeat (10) @(posedge clk);
    check(n_ok == e_ok,     $sformatf("frame_ok %0d exp %0d", n_ok, e_ok));
    check(n_fn == e_fn,     $sformatf("fn_error %0d exp %0d", n_fn, e_fn));
    check(n_hdr == e_hdr,   $sformatf("hdr_error %0d exp %0d", n_hdr, e_hdr));
    check(n_crc == e_crc,   $sformatf("crc_error %0d exp %0d", n_crc, e_crc));
    check(n_drop == e_drop, $sformatf("drop_full %0d exp %0d", n_drop, e_drop));
    check(e_fn >= 2 && e_crc >= 1 && e_drop == 2, "scenario covered");
    check(got_words.size() == exp_words.size(), $sformatf("words %0d exp %0d", got_words.size(), exp_words.size()));
    for (int i = 0; i < exp_words.size() && i < got_words.size(); i++)
      check(got_words[i] == exp_words[i], $sformatf("payload word %0d", i));
    check(lastf == e_last, "last frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
