// tb_data_if_ctrl: self-checking test of the Data Interface Controller.
//
// The RX FIFO is modelled by a queue (level = size, dout = head, pop on
// rx_rd_en); TX FIFO room is driven by the testbench. Checks, cycle by cycle:
// iq_tx_enable pulses once every 8 cycles; tx_wr_en covers exactly the
// 8 cycles after it and is withheld (tx_drop) when the TX FIFO is full;
// received words come out in order with basic_frame_first_word on the first
// word of every 8-word basic frame; reading starts only once 16 words are
// stored, continues while 8 are, and stops with rx_underflow otherwise;
// disable stops everything. The model samples on the falling edge and the
// stimulus changes just after the rising edge, so neither races the DUT.
`timescale 1ns/1ps
module tb_data_if_ctrl;
  logic clk = 0, rst = 1;
  always #16.276 clk = ~clk;

  logic        en = 0, txe, tx_pfull = 0, tx_wr, tx_drop, rx_rd, bffw, rx_uf, rx_str;
  logic [31:0] iq_rx, rx_dout;
  logic [13:0] rx_level;
  logic        rx_pempty;
  int checks = 0, failures = 0;

  logic [31:0] rxq[$];
  assign rx_level  = 14'(rxq.size());
  assign rx_pempty = rxq.size() < 16;
  assign rx_dout   = rxq.size() > 0 ? rxq[0] : 32'hBAD0BAD0;

  data_if_ctrl dut (.clk(clk), .rst(rst), .enable(en), .iq_tx_enable(txe), .tx_prog_full(tx_pfull),
                    .tx_wr_en(tx_wr), .tx_drop(tx_drop), .rx_prog_empty(rx_pempty), .rx_level(rx_level),
                    .rx_dout(rx_dout), .rx_rd_en(rx_rd), .iq_rx(iq_rx), .basic_frame_first_word(bffw),
                    .rx_underflow(rx_uf), .rx_streaming(rx_str));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // reference model of the expected behaviour
  int cyc = 0, last_txe = -100, tx_left = 0, n_txe = 0, n_wr = 0, n_drop = 0, n_uf = 0, n_bf = 0;
  int exp_rx_left = 0; bit exp_stream = 0;
  logic [31:0] exp_word_q[$];
  logic        exp_first_q[$];
  logic [31:0] pushed = 32'h7000;
  always @(negedge clk) if (!rst) begin
    cyc++;
    // TX
    if (txe) begin
      if (last_txe >= 0) check(cyc - last_txe == 8, "iq_tx_enable every 8 cycles");
      last_txe = cyc; n_txe++;
    end
    check(tx_wr == (tx_left > 0), "tx_wr_en window");
    n_wr += tx_wr;
    n_drop += tx_drop;
    n_uf += rx_uf;
    if (tx_left > 0) tx_left--;
    // RX: output is registered, so compare with what was popped a cycle earlier
    if (exp_word_q.size() > 0) begin
      check(iq_rx == exp_word_q[0], $sformatf("iq_rx %h exp %h", iq_rx, exp_word_q[0]));
      check(bffw == exp_first_q[0], "basic_frame_first_word position");
      n_bf += bffw;
      void'(exp_word_q.pop_front()); void'(exp_first_q.pop_front());
    end
    check(rx_rd == (exp_rx_left > 0), "rx_rd_en window");
    if (rx_rd) begin
      exp_word_q.push_back(rxq[0]);
      exp_first_q.push_back(exp_rx_left == 8);
      pop_pend = 1'b1;              // the DUT takes the word at the next rising edge
    end else begin
      exp_word_q.push_back(32'h0); exp_first_q.push_back(1'b0);
    end
    if (exp_rx_left > 0) exp_rx_left--;
    if (txe) begin
      tx_left = tx_pfull ? 0 : 8;
      if (exp_stream ? (rxq.size() - int'(rx_rd) >= 8) : (rxq.size() - int'(rx_rd) >= 16)) begin
        exp_rx_left = 8; exp_stream = 1;
      end else exp_stream = 0;
    end
    if (!en) begin exp_stream = 0; exp_rx_left = 0; tx_left = 0; end
  end

  bit pop_pend = 0;
  always @(posedge clk) begin
    #0.5;
    if (pop_pend) begin void'(rxq.pop_front()); pop_pend = 0; end
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin rxq.push_back(pushed); pushed++; end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) tick();
    rst = 0; en = 1;
    repeat (40) tick();
    check(n_txe == 5 && n_wr == 32, $sformatf("tx periods %0d words %0d", n_txe, n_wr));
    push(12); repeat (24) tick();
    check(!rx_str && rxq.size() == 12, "no read below one frame");
    push(4); repeat (24) tick();          // 16 -> reads two basic frames
    check(rxq.size() == 0, "two basic frames read");
    push(4); repeat (24) tick();          // only 4 left -> underflow
    check(n_uf == 1, "rx underflow pulse");
    rxq.delete();
    // steady stream: push 8 words every 8 cycles
    fork
      repeat (400) begin
        tick();
        if (txe) push(8);
      end
    join
    tx_pfull = 1; repeat (24) tick(); tx_pfull = 0;
    check(n_drop >= 2, "tx_drop while TX FIFO full");
    repeat (10) tick();
    en = 0; repeat (20) tick();
    check(!txe && !tx_wr && !rx_rd, "disabled");
    check(n_bf >= 45, $sformatf("basic frames received %0d", n_bf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
