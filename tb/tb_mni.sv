// tb_mni: self-checking testbench of the master NI for a 32-bit AXI master
// (node 5). The testbench drives the AXI port and plays the network on the
// other side: it checks every request packet (destination from the address
// map, source node, ID, length, size, burst, master width, the W data and
// strobes, the tail flag) and answers each one after a chosen delay with a
// response packet whose read data is a known function of the address. On the
// AXI side B and R beats are checked for ID, data and RLAST. It also checks
// the ordering rule: a read to a second slave is held back while a read to
// another slave is outstanding, while two reads to one slave may both be
// outstanding.
//
// The widths tested (32 and 128 bits) are those of the document's masters;
// the ordering checks test this design's own ordering rule.
module tb_mni;
  import noc_pkg::*;
  localparam int unsigned DW = 32;
  localparam logic [3:0]  MID = 4'd5;

  logic clk = 1'b0, noc_clk = 1'b0, rst_n = 1'b0;
  always #6 clk = ~clk;
  always #5 noc_clk = ~noc_clk;

  axi_ax_t aw = '0, ar = '0;
  logic awvalid = 1'b0, awready, wvalid = 1'b0, wready, wlast = 1'b0;
  logic [DW-1:0] wdata = '0; logic [DW/8-1:0] wstrb = '0;
  logic [3:0] bid, rid; logic [1:0] bresp, rresp;
  logic bvalid, bready = 1'b1, arvalid = 1'b0, arready, rvalid, rready = 1'b1, rlast;
  logic [DW-1:0] rdata;
  flit_t req_flit, rsp_flit = '0;
  logic req_valid, req_ready = 1'b0, rsp_valid = 1'b0, rsp_ready;

  mni #(.DW(DW), .MID(MID)) u_dut (
    .clk, .rst_n, .aw, .awvalid, .awready, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bid, .bresp, .bvalid, .bready, .ar, .arvalid, .arready, .rid, .rdata, .rresp,
    .rlast, .rvalid, .rready,
    .noc_clk, .noc_rst_n(rst_n), .req_flit, .req_valid, .req_ready,
    .rsp_flit, .rsp_valid, .rsp_ready);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge noc_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rd_word(logic [31:0] a, int m);
    return (a + 32'(4 * m)) ^ 32'h5A5A_0000;
  endfunction

  // ---- network side: check requests, answer them in order ----
  hdr_t  exp_hdr [$];          // headers the AXI side expects to see
  logic [DW-1:0] exp_w [$];    // W data expected in data flits
  logic [DW/8-1:0] exp_s [$];
  logic exp_l [$];
  hdr_t  pend [$];             // requests waiting for their response
  int    resp_delay = 5;
  int    last_r_time = 0;

  always @(negedge noc_clk) begin
    req_ready = ($urandom % 4) != 0;
    #1;
    if (req_valid && req_ready) begin
      flit_t f;
      f = req_flit;
      if (f.head) begin
        hdr_t h, e;
        h = get_hdr(f);
        e = exp_hdr.pop_front();
        check(h.dest == e.dest && h.src == MID && h.tid == e.tid && h.write == e.write &&
              h.addr == e.addr && h.len == e.len && h.size == e.size && h.burst == e.burst &&
              h.mw == 3'd2, $sformatf("request header for %h", e.addr));
        check(f.tail == !h.write, "read request is a single flit");
        pend.push_back(h);
      end else begin
        logic [DW-1:0] d;
        d = exp_w.pop_front();
        check(f.data[DW-1:0] == d && f.strb[DW/8-1:0] == exp_s.pop_front(), "write data flit");
        check(f.tail == exp_l.pop_front(), "tail flag on the last write beat only");
      end
    end
  end

  // responder: one packet at a time, after resp_delay NoC cycles
  initial begin
    wait (rst_n);
    forever begin
      hdr_t h, r;
      while (pend.size() == 0) @(negedge noc_clk);
      h = pend.pop_front();
      repeat (resp_delay) @(negedge noc_clk);
      r = h; r.dest = h.src; r.src = h.dest; r.resp = RESP_OKAY;
      for (int k = 0; k <= (h.write ? 0 : int'(h.len) + 1); k++) begin
        flit_t f;
        if (k == 0) f = make_head(r, h.write);
        else begin
          f = '0;
          f.data = NOC_DW'(rd_word(h.addr, k - 1));
          f.tail = (k == int'(h.len) + 1);
        end
        @(negedge noc_clk);
        rsp_flit = f; rsp_valid = 1'b1; #1;
        while (!rsp_ready) begin @(negedge noc_clk); #1; end
        @(posedge noc_clk); #1;
        rsp_valid = 1'b0;
      end
    end
  end

  // ---- AXI side ----
  int b_cnt = 0, r_cnt = 0;
  logic [3:0] exp_bid [$];
  hdr_t exp_r [$];
  int rbeat = 0;
  always @(negedge clk) begin
    rready = ($urandom % 3) != 0;
    #1;
    if (bvalid && bready) begin
      check(bid == exp_bid.pop_front() && bresp == RESP_OKAY, "B id");
      b_cnt++;
    end
    if (rvalid && rready) begin
      hdr_t e;
      e = exp_r[0];
      check(rid == e.tid && rdata == rd_word(e.addr, rbeat) && rlast == (rbeat == int'(e.len)),
            $sformatf("R beat %0d of %h", rbeat, e.addr));
      rbeat++;
      if (rlast) begin
        void'(exp_r.pop_front());
        rbeat = 0;
        r_cnt++;
        last_r_time = $time;
      end
    end
  end

  function automatic hdr_t eh(logic w, logic [31:0] a, int len, int id);
    hdr_t h;
    h = '0; h.write = w; h.addr = a; h.len = 4'(len); h.size = 3'd2;
    h.burst = BURST_INCR; h.tid = 4'(id); h.dest = addr_decode(a);
    return h;
  endfunction

  task automatic axi_write(input logic [31:0] a, input int len, input int id);
    hdr_t h;
    h = eh(1'b1, a, len, id);
    exp_hdr.push_back(h);
    exp_bid.push_back(4'(id));
    @(negedge clk);
    aw = '{id: 4'(id), addr: a, len: 4'(len), size: 3'd2, burst: BURST_INCR};
    awvalid = 1'b1; #1;
    while (!awready) begin @(negedge clk); #1; end
    @(posedge clk); #1; awvalid = 1'b0;
    for (int m = 0; m <= len; m++) begin
      @(negedge clk);
      wdata = $urandom; wstrb = 4'($urandom); wlast = (m == len); wvalid = 1'b1;
      exp_w.push_back(wdata); exp_s.push_back(wstrb); exp_l.push_back(wlast);
      #1;
      while (!wready) begin @(negedge clk); #1; end
      @(posedge clk); #1; wvalid = 1'b0;
    end
  endtask

  // returns the time the AR was accepted
  task automatic axi_read(input logic [31:0] a, input int len, input int id, output int t);
    hdr_t h;
    h = eh(1'b0, a, len, id);
    @(negedge clk);
    ar = '{id: 4'(id), addr: a, len: 4'(len), size: 3'd2, burst: BURST_INCR};
    arvalid = 1'b1; #1;
    while (!arready) begin @(negedge clk); #1; end
    exp_hdr.push_back(h);
    exp_r.push_back(h);
    @(posedge clk); #1; arvalid = 1'b0;
    t = $time;
  endtask

  initial begin
    int t1, t2, nw, nr;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // 1. basic write and read
    axi_write(32'h8000_0100, 3, 2);
    axi_read(32'h4000_0010, 3, 7, t1);
    wait (b_cnt == 1 && r_cnt == 1);

    // 2. ordering: reads to DDR then FLASH, slow responses
    resp_delay = 200;
    axi_read(32'h8000_0200, 1, 1, t1);
    axi_read(32'h8000_0300, 1, 1, t2);
    check(t2 - t1 < 100 * 12, "second read to the same slave is accepted at once");
    axi_read(32'h0000_0040, 0, 1, t2);
    check(t2 > last_r_time && r_cnt == 3, "read to another slave waits for the outstanding reads");
    wait (r_cnt == 4);
    resp_delay = 3;

    // 3. random mix
    nw = 1; nr = 4;
    for (int i = 0; i < 200; i++) begin
      logic [31:0] a;
      a = {4'($urandom), 20'($urandom), 8'h00};
      if ($urandom % 2) begin
        axi_write(a, $urandom % 16, $urandom % 16);
        nw++;
      end else begin
        axi_read(a, $urandom % 16, $urandom % 16, t1);
        nr++;
      end
    end
    wait (b_cnt == nw && r_cnt == nr);
    check(exp_hdr.size() == 0 && exp_w.size() == 0, "every request reached the network");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
