// tb_latency_meter: self-checking test of the BBU-side latency meter.
// The testbench raises the trigger at a known clock edge and puts 0x55555555
// on iq_rx a chosen number of edges later (other words random, never equal
// to it). The measured latency must equal that number, for several delays
// including a long one near the 3032 cycles of the 20 km link, 30 random
// ones, and one beyond the 16-bit range that must saturate at 65535. While a
// measurement runs, busy must be high and latency_valid low in every cycle.
`timescale 1ns/1ps
module tb_latency_meter;
  logic clk = 0, rst = 1, trig = 0, valid, busy;
  logic [31:0] iq;
  logic [15:0] lat;
  int checks = 0, failures = 0;
  always #16.276 clk = ~clk;

  latency_meter dut (.clk(clk), .rst(rst), .trigger_in(trig), .iq_rx(iq), .latency(lat),
                     .latency_valid(valid), .busy(busy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] rnd();
    logic [31:0] v = $urandom;
    return (v == 32'h55555555) ? 32'h0 : v;
  endfunction

  task automatic measure(input int d);
    // edge 0: trigger rises; edge d: sequence appears on iq_rx
    @(posedge clk); #0.1 trig = 1; iq = rnd();
    for (int i = 1; i < d; i++) begin
      @(posedge clk); #0.1 iq = rnd();
      if (i >= 4) check(busy && !valid, $sformatf("busy, no result, cycle %0d of %0d", i, d));
    end
    @(posedge clk); #0.1 iq = 32'h55555555;
    for (int i = 0; i < 8; i++) begin @(posedge clk); #0.1; end
    trig = 0; iq = rnd();
    @(posedge clk); #0.1;
    check(valid && !busy, $sformatf("measurement %0d done", d));
    check(int'(lat) == (d > 65535 ? 65535 : d), $sformatf("latency %0d exp %0d", lat, d));
    repeat (5) @(posedge clk);
  endtask

  initial begin
    #20ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    iq = 0;
    repeat (3) @(posedge clk);
    #0.1 rst = 0;
    repeat (3) @(posedge clk);
    check(!valid && !busy, "idle after reset");
    measure(4); measure(17); measure(100); measure(3032);
    repeat (30) measure($urandom_range(5, 6000));
    measure(70000);
    check(valid && !busy, "result held after the last measurement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
