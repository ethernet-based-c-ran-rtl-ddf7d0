// tb_iq_seq_checker: self-checking test of the incremental-word checker.
// A queue models the RX FIFO. A reference model, updated from the words the
// checker actually pops, counts the expected errors; the error count, rd_en
// and active are compared every cycle. Directed steps: a clean counter stream
// across the 32-bit wrap leaves the LED off; a gap raises it and counts one
// error; the synchronised push-button clears it (not before two cycles);
// disabling and re-enabling resynchronises without an error; a backward jump
// is an error. Then a long random phase (random FIFO occupancy, enable drops,
// gaps) and a run of 70000 bad words that must saturate the count at 65535.
`timescale 1ns/1ps
module tb_iq_seq_checker;
  logic clk = 0, rst = 1, en = 0, clr = 0, rd, led, act;
  logic [15:0] ecount;
  logic [31:0] q[$];
  logic [31:0] nextv = 32'hFFFF_FFF0;
  int checks = 0, failures = 0, reads = 0;
  // reference model
  int   m_err = 0;
  bit   m_have = 0;
  logic [31:0] m_exp = 0;
  always #16.276 clk = ~clk;

  iq_seq_checker dut (.clk(clk), .rst(rst), .en(en), .fifo_empty(q.size() == 0),
                      .fifo_dout(q.size() > 0 ? q[0] : 32'h0), .rd_en(rd), .clear_btn(clr),
                      .err_led(led), .active(act), .err_count(ecount));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // model: sees the same inputs the checker samples at the clock edge
  always @(posedge clk) if (!rst) begin
    if (!en) m_have = 0;
    else if (q.size() > 0) begin
      if (m_have && q[0] != m_exp) m_err++;
      m_exp  = q[0] + 32'd1;
      m_have = 1;
    end
  end

  always @(posedge clk) begin
    #0.5;
    if (rd) begin void'(q.pop_front()); reads++; end
  end

  always @(negedge clk) if (!rst) begin
    check(rd == (en && q.size() > 0), "rd_en = en and not empty");
    check(act == rd, "active while checking");
    check(int'(ecount) == (m_err > 65535 ? 65535 : m_err),
          $sformatf("err_count %0d, model %0d", ecount, m_err));
  end

  task automatic tick(); @(posedge clk); #1; endtask
  task automatic feed(input int n);
    for (int i = 0; i < n; i++) begin q.push_back(nextv); nextv++; end
  endtask

  initial begin
    #10ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) tick();
    rst = 0; en = 1;
    feed(100);                                    // crosses the 32-bit wrap
    repeat (120) tick();
    check(!led && ecount == 0 && reads == 100, "clean stream, no error");
    check(!act, "inactive when FIFO empty");
    nextv += 5; feed(50); repeat (60) tick();     // a gap
    check(led && ecount == 1, "gap raises LED once");
    clr = 1; tick();
    check(led, "LED still lit one cycle into the press (synchroniser)");
    tick(); tick(); clr = 0; tick();
    check(!led && ecount == 1, "push-button clears LED");
    en = 0; tick(); nextv += 100; feed(10); tick();
    check(reads == 150, "no read while disabled");
    en = 1; repeat (20) tick();
    check(!led && ecount == 1, "resynchronised after re-enable");
    nextv -= 3; feed(10); repeat (20) tick();
    check(led && ecount == 2, "backward jump is an error");

    // random phase
    repeat (20000) begin
      if ($urandom_range(0, 2) == 0) begin
        if ($urandom_range(0, 150) == 0) nextv += $urandom_range(2, 1000);
        feed($urandom_range(1, 4));
      end
      if ($urandom_range(0, 400) == 0) en = 0;
      else if (!en && $urandom_range(0, 5) == 0) en = 1;
      tick();
    end
    en = 1; repeat (200) tick();
    check(m_err > 10, $sformatf("random phase produced %0d errors", m_err));
    check(q.size() == 0, "all words read");

    // saturation
    for (int i = 0; i < 70000; i++) q.push_back(32'h0);
    repeat (70100) tick();
    check(ecount == 16'hFFFF, "error count saturates");
    check(led, "LED lit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
