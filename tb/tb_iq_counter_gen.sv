// tb_iq_counter_gen: self-checking test of the counter test source.
// Checks that words are written only while enabled and the FIFO has room,
// that consecutive written words differ by one starting at zero, and that
// the counter holds while writes are withheld. The error-insertion button is
// pressed ten times: each press must skip exactly one value and give one
// err_inserted pulse.
`timescale 1ns/1ps
module tb_iq_counter_gen;
  logic clk = 0, rst = 1, en = 0, pfull = 0, wr, btn = 0, ins;
  logic [31:0] data;
  int checks = 0, failures = 0, n = 0, presses = 0, skips = 0, pulses = 0, allowed = 0;
  logic [31:0] expv = 0;
  always #16.276 clk = ~clk;

  iq_counter_gen dut (.clk(clk), .rst(rst), .en(en), .fifo_prog_full(pfull), .err_btn(btn),
                      .wr_en(wr), .data(data), .err_inserted(ins));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (!rst) begin
    check(wr == (en && !pfull), "wr_en = en and room");
    if (ins) pulses++;
    if (wr) begin
      if (data == expv + 1 && allowed > 0) begin
        allowed--; skips++; expv++;
      end
      check(data == expv, $sformatf("data %0d exp %0d", data, expv));
      expv++; n++;
    end
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(posedge clk);
    #1 en = 1;
    repeat (2000) begin @(posedge clk); #1 pfull = ($urandom_range(0, 3) == 0); en = ($urandom_range(0, 7) != 0); end
    // error insertion, with writes running
    pfull = 0; en = 1;
    repeat (10) begin
      btn = 1; presses++; allowed++;
      repeat (4) @(posedge clk);
      #1 btn = 0;
      repeat (20) @(posedge clk);
      #1 check(allowed == 0, "skip seen within 24 cycles of the press");
    end
    #1 en = 0;
    repeat (3) @(posedge clk);
    check(skips == presses && pulses == presses,
          $sformatf("presses %0d skips %0d pulses %0d", presses, skips, pulses));
    check(n > 1000, $sformatf("%0d words written", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
