// tb_latency_injector: self-checking test of the RRH-side injector.
// iq_tx_enable pulses every 8 cycles as from the Data Interface Controller.
// A button press must replace exactly the 8 words after the next
// iq_tx_enable by 0x55555555, with trigger high during those 8 cycles only;
// all other words must pass unchanged. Holding the button gives one injection.
`timescale 1ns/1ps
module tb_latency_injector;
  logic clk = 0, rst = 1, btn = 0, txe, trig;
  logic [31:0] iq_in, iq_out;
  int checks = 0, failures = 0, cyc = 0, inj_windows = 0, window = 0, armed = 0;
  always #16.276 clk = ~clk;
  assign txe = (cyc % 8) == 7;
  assign iq_in = 32'h1000 + cyc;

  latency_injector dut (.clk(clk), .rst(rst), .btn(btn), .iq_tx_enable(txe), .iq_in(iq_in),
                        .iq_out(iq_out), .trigger(trig));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic btn_q = 0;
  always @(negedge clk) if (!rst) begin
    check(trig == (window > 0), "trigger window");
    check(iq_out == (window > 0 ? 32'h55555555 : iq_in), "injected data");
  end
  always @(posedge clk) begin
    if (!rst) begin
      if (window > 0) window--;
      if (armed && txe) begin window = 8; armed = 0; inj_windows++; end
      else if (btn && !btn_q) armed = 1;
      btn_q <= btn;
    end
    cyc <= cyc + 1;
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (21) @(posedge clk);
    #1 btn = 1;
    repeat (40) @(posedge clk);                   // held: one injection only
    #1 btn = 0;
    repeat (13) @(posedge clk);
    #1 btn = 1; @(posedge clk); #1 btn = 0;
    repeat (30) @(posedge clk);
    check(inj_windows == 2, $sformatf("%0d injections", inj_windows));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
