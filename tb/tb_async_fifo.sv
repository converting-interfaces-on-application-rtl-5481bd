// tb_async_fifo: self-checking testbench of the dual-clock FIFO. A writer at
// 100 MHz and a reader on an unrelated clock pass 3000 random words with
// random stalls on both sides; every word must come out once and in order.
// It also checks that the FIFO accepts exactly DEPTH words while the reader
// is stopped, and that a written word reaches the reader within a bounded
// number of read clocks (synchronizer latency).
//
// The document only says the NIs cross clocks in asynchronous FIFOs; the
// clock ratios and checks are this testbench's own.
module tb_async_fifo;
  localparam int unsigned W = 16, D = 4;
  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic wv = 1'b0, wr, rv, rr = 1'b0;
  logic [W-1:0] wd = '0, rd;
  int checks = 0, failures = 0;
  logic [W-1:0] exp_q [$];
  logic stop_reader = 1'b1;

  always #5 wclk = ~wclk;
  always #8 rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) u_dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_valid(wv), .wr_ready(wr), .wr_data(wd),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_valid(rv), .rd_ready(rr), .rd_data(rd));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: checks order at the falling edge, before the rising edge pops
  int got = 0;
  always @(negedge rclk) begin
    rr = !stop_reader && (($urandom % 3) != 0);
    #1;
    if (rv && rr) begin
      logic [W-1:0] e;
      e = exp_q.pop_front();
      check(rd == e, $sformatf("word %0d: got %h expected %h", got, rd, e));
      got++;
    end
  end

  initial begin
    int n, lat;
    repeat (3) @(posedge wclk);
    wrst_n = 1'b1; rrst_n = 1'b1;
    repeat (3) @(posedge wclk);
    // fill with the reader stopped: exactly D words fit
    n = 0;
    for (int i = 0; i < 10; i++) begin
      @(negedge wclk);
      wv = 1'b1; wd = W'($urandom); #1;
      if (wr) begin exp_q.push_back(wd); n++; end
    end
    @(negedge wclk); wv = 1'b0;
    check(n == D, $sformatf("%0d words accepted while full, expected %0d", n, D));
    stop_reader = 1'b0;
    // latency of one word into an empty FIFO
    wait (exp_q.size() == 0);
    repeat (10) @(posedge rclk);
    @(negedge wclk); wv = 1'b1; wd = 16'hBEEF; exp_q.push_back(wd);
    @(posedge wclk); #1; wv = 1'b0;
    lat = 0;
    while (!rv) begin @(posedge rclk); #1; lat++; end
    check(lat <= 4, $sformatf("word visible after %0d read clocks", lat));
    wait (exp_q.size() == 0);
    // random streaming
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      wv = ($urandom % 4) != 0; wd = W'($urandom); #1;
      if (wv && wr) exp_q.push_back(wd);
    end
    @(negedge wclk); wv = 1'b0;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge rclk);
    check(!rv, "empty after draining");
    check(got > 1000, $sformatf("%0d words streamed", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
