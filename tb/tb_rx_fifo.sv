// tb_rx_fifo: self-checking test of the 64-to-32-bit asynchronous RX FIFO.
//
// Write clock 156.25 MHz, read clock 30.72 MHz, default depth (4096 x 64).
// Checks: flags after reset; the read order (low half first); rd_level and
// prog_empty (fewer than 16 words); prog_full exactly when fewer than 8
// entries are free (plus the entry held in the FWFT output register);
// writes past full dropped; random traffic against a
// queue model.
`timescale 1ns/1ps
module tb_rx_fifo;
  logic wclk = 0, rclk = 0, rst = 1;
  always #3.2    wclk = ~wclk;
  always #16.276 rclk = ~rclk;

  logic        wr_en = 0, rd_en = 0, full, pfull, empty, pempty;
  logic [63:0] din = 0;
  logic [31:0] dout;
  logic [13:0] level;
  int checks = 0, failures = 0;

  rx_fifo dut (.wr_clk(wclk), .wr_rst(rst), .wr_en(wr_en), .din(din), .full(full), .prog_full(pfull),
               .rd_clk(rclk), .rd_rst(rst), .rd_en(rd_en), .dout(dout), .empty(empty),
               .prog_empty(pempty), .rd_level(level));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] model[$];
  logic [31:0] seq = 32'h5000;

  task automatic wr(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk); wr_en = 1; din = {seq + 32'd1, seq};
      if (!full) begin model.push_back(seq); model.push_back(seq + 1); end
      seq += 2;
    end
    @(negedge wclk); wr_en = 0;
  endtask

  task automatic rd_check(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge rclk);
      while (empty) @(negedge rclk);
      check(dout == model[0], $sformatf("dout %h exp %h", dout, model[0]));
      void'(model.pop_front());
      rd_en = 1; @(negedge rclk); rd_en = 0;
    end
  endtask

  task automatic settle(); repeat (4) @(posedge rclk); endtask

  initial begin
    #20ms;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, nfull;
    repeat (4) @(posedge rclk);
    rst = 0;
    settle();
    check(empty && pempty && !pfull && !full && level == 0, "flags after reset");
    wr(7); settle();
    check(pempty && !empty && level == 14, $sformatf("7 entries: level %0d", level));
    wr(1); settle();
    check(!pempty && level == 16, "8 entries: one frame");
    rd_check(3); settle();
    check(level == 13 && pempty, $sformatf("level after 3 reads %0d", level));
    rd_check(13); settle();
    check(empty && level == 0, "drained");
    acc = 0;
    while (!pfull) begin wr(1); acc++; end
    check(acc == 4096 - 7 + 1, $sformatf("prog_full after %0d entries", acc));
    nfull = 0;
    while (!full) begin wr(1); nfull++; end
    check(nfull == 7, $sformatf("full after %0d more", nfull));
    wr(5);
    settle();
    check(level == 8194 && model.size() == 8194, $sformatf("level at full %0d", level));
    rd_check(8194); settle();
    check(empty && model.size() == 0, "drained after full");
    fork
      begin
        for (int i = 0; i < 20000; i++) begin
          @(negedge wclk);
          wr_en = ($urandom_range(0, 15) == 0) && !pfull;
          din = {seq + 32'd1, seq};
          if (wr_en) begin model.push_back(seq); model.push_back(seq + 1); seq += 2; end
        end
        @(negedge wclk); wr_en = 0;
      end
      begin
        for (int i = 0; i < 6000; i++) begin
          @(negedge rclk);
          rd_en = 0;
          if (!empty && $urandom_range(0, 3) != 0) begin
            check(dout == model[0], "random traffic data");
            void'(model.pop_front());
            rd_en = 1;
          end
        end
        @(negedge rclk); rd_en = 0;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
