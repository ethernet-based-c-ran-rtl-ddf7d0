// tb_tx_fifo: self-checking test of the 32-to-64-bit asynchronous TX FIFO.
//
// Write clock 30.72 MHz, read clock 156.25 MHz, default depth (4096 x 64).
// Checks: flags after reset; prog_empty falls only once 16 words (one frame)
// are in; the packing {second word, first word}; prog_full rises exactly when
// fewer than 8 entries are free (the FWFT output register, once loaded,
// is one entry of extra room); writes past full are dropped; and a long
// run of random writes and reads compared against a queue model.
`timescale 1ns/1ps
module tb_tx_fifo;
  logic wclk = 0, rclk = 0, rst = 1;
  always #16.276 wclk = ~wclk;
  always #3.2    rclk = ~rclk;

  logic        wr_en = 0, rd_en = 0, full, pfull, empty, pempty;
  logic [31:0] din = 0;
  logic [63:0] dout;
  int checks = 0, failures = 0;

  tx_fifo dut (.wr_clk(wclk), .wr_rst(rst), .wr_en(wr_en), .din(din), .full(full), .prog_full(pfull),
               .rd_clk(rclk), .rd_rst(rst), .rd_en(rd_en), .dout(dout), .empty(empty), .prog_empty(pempty));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] model[$];
  logic [31:0] seq = 32'h100;

  task automatic wr(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk); wr_en = 1; din = seq;
      if (!full) model.push_back(seq);
      seq++;
    end
    @(negedge wclk); wr_en = 0;
  endtask

  task automatic rd_check(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge rclk);
      while (empty) @(negedge rclk);
      check(model.size() >= 2, "model has data");
      check(dout == {model[1], model[0]}, $sformatf("dout %h exp %h%h", dout, model[1], model[0]));
      void'(model.pop_front()); void'(model.pop_front());
      rd_en = 1; @(negedge rclk); rd_en = 0;
    end
  endtask

  task automatic settle(); repeat (6) @(posedge wclk); endtask

  initial begin
    #20ms;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, nfull;
    repeat (4) @(posedge wclk);
    rst = 0;
    settle();
    check(empty && pempty && !pfull && !full, "flags after reset");
    wr(15); settle();
    check(pempty && !empty, "15 words: still less than one frame");
    wr(1); settle();
    check(!pempty, "16 words: one frame available");
    rd_check(8); settle();
    check(empty && pempty, "empty after reading one frame");
    // fill until prog_full
    acc = 0;
    while (!pfull) begin wr(1); acc++; end
    check(acc == 2 * (4096 - 7 + 1), $sformatf("prog_full after %0d words", acc));
    nfull = 0;
    while (!full) begin wr(1); nfull++; end
    check(nfull == 14, $sformatf("full after %0d more words", nfull));
    wr(10);                                  // dropped
    check(model.size() == 2 * 4097, "model holds depth + output register");
    rd_check(4097); settle();
    check(empty && model.size() == 0, "drained");
    // random traffic
    fork
      begin
        for (int i = 0; i < 6000; i++) begin
          @(negedge wclk);
          wr_en = ($urandom_range(0, 2) != 0) && !pfull;
          din = seq;
          if (wr_en) begin model.push_back(seq); seq++; end
        end
        @(negedge wclk); wr_en = 0;
      end
      begin
        for (int i = 0; i < 30000; i++) begin
          @(negedge rclk);
          rd_en = 0;
          if (!empty && $urandom_range(0, 4) == 0) begin
            check(dout == {model[1], model[0]}, "random traffic data");
            void'(model.pop_front()); void'(model.pop_front());
            rd_en = 1;
          end
        end
        @(negedge rclk); rd_en = 0;
      end
    join
    check(model.size() < 2 * 4096, "random traffic kept up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
