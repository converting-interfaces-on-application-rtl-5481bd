// sni_tb_common.svh: shared testbench code for the slave-NI testbenches,
// included inside the testbench module. The including module declares
// MEMB and the function dut_byte(addr), which reads the slave model's memory.
//
// It provides the NoC-side clock and flit ports of the NI under test, a
// response monitor with random backpressure, a byte-level reference memory
// and the tasks do_write / do_read that send one request packet, wait for the
// response and check it against the reference. Everything is sampled and
// driven at the falling NoC clock edge.
//
// Shared by the slave-NI testbenches; it builds packets in this design's own
// flit format.

  logic  noc_clk = 1'b0, clk = 1'b0, rst_n = 1'b0;
  flit_t req_flit = '0;
  logic  req_valid = 1'b0, req_ready;
  flit_t rsp_flit;
  logic  rsp_valid, rsp_ready = 1'b0;
  int    checks = 0, failures = 0;
  logic [7:0] ref_mem [MEMB];
  flit_t rq [$];
  int    ncyc = 0;

  always #5 noc_clk = ~noc_clk;   // 100 MHz NoC clock
  always #7 clk     = ~clk;       // IP clock, unrelated to the NoC clock

  always @(negedge noc_clk) begin
    ncyc++;
    rsp_ready = ($urandom % 4) != 0;
    #1;
    if (rsp_valid && rsp_ready) rq.push_back(rsp_flit);
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic put(input flit_t f);
    @(negedge noc_clk);
    req_flit  = f;
    req_valid = 1'b1;
    #1;
    while (!req_ready) begin
      @(negedge noc_clk);
      #1;
    end
    @(posedge noc_clk);
    #1;
    req_valid = 1'b0;
  endtask

  task automatic get(output flit_t f);
    while (rq.size() == 0) @(negedge noc_clk);
    f = rq.pop_front();
  endtask

  // Address of master beat m (AXI burst rules, written independently of
  // the design's own function).
  function automatic logic [31:0] m_addr(hdr_t h, int m);
    int unsigned nb, region, base, off;
    nb = 1 << h.size;
    if (h.burst == BURST_FIXED) return h.addr;
    if (h.burst == BURST_INCR)  return h.addr + m * nb;
    region = (h.len + 1) * nb;
    base   = (h.addr / region) * region;
    off    = (h.addr - base + m * nb) % region;
    return base + off;
  endfunction

  function automatic hdr_t mk(logic write, logic [31:0] addr, int len, int size,
                              burst_e burst, int mw, int tid);
    hdr_t h;
    h       = '0;
    h.dest  = 4'd7;
    h.src   = 4'(3 + tid % 5);
    h.tid   = 4'(tid);
    h.write = write;
    h.addr  = addr;
    h.len   = 4'(len);
    h.size  = 3'(size);
    h.burst = burst;
    h.mw    = 3'(mw);
    return h;
  endfunction

  // Send a write; data[m]/strb[m] are master-bus beats. ignore_strb makes the
  // reference write every byte (the AHB speculative mode).
  task automatic do_write(input hdr_t h, input logic [127:0] data [16],
                          input logic [15:0] strb [16], input logic ignore_strb,
                          input logic [1:0] exp_resp = 2'b00);
    flit_t f, r;
    hdr_t  rh;
    put(make_head(h, 1'b0));
    for (int m = 0; m <= int'(h.len); m++) begin
      f      = '0;
      f.data = data[m];
      f.strb = strb[m];
      f.tail = (m == int'(h.len));
      put(f);
      for (int b = 0; b < (1 << h.size); b++) begin
        logic [31:0] a;
        int lane;
        a    = (m_addr(h, m) & ~((32'd1 << h.size) - 1)) + 32'(b);
        lane = int'(a % (1 << h.mw));
        if (ignore_strb || strb[m][lane]) ref_mem[a % MEMB] = data[m][8*lane +: 8];
      end
    end
    get(r);
    rh = get_hdr(r);
    check(r.head && r.tail && rh.write, "write response is a single head/tail flit");
    check(rh.dest == h.src && rh.tid == h.tid, "write response routed to the master with its TID");
    check(rh.resp == exp_resp, $sformatf("write response code %0d", rh.resp));
  endtask

  task automatic do_read(input hdr_t h, input logic [1:0] exp_resp = 2'b00);
    flit_t r;
    hdr_t  rh;
    h.write = 1'b0;
    put(make_head(h, 1'b1));
    get(r);
    rh = get_hdr(r);
    check(r.head && !r.tail && !rh.write, "read response header");
    check(rh.dest == h.src && rh.tid == h.tid, "read response routed to the master with its TID");
    for (int m = 0; m <= int'(h.len); m++) begin
      logic ok;
      get(r);
      ok = !r.head && (r.tail == (m == int'(h.len))) && r.resp == exp_resp;
      for (int b = 0; b < (1 << h.size); b++) begin
        logic [31:0] a;
        int lane;
        a    = (m_addr(h, m) & ~((32'd1 << h.size) - 1)) + 32'(b);
        lane = int'(a % (1 << h.mw));
        if (exp_resp == 2'b00 && r.data[8*lane +: 8] !== ref_mem[a % MEMB]) ok = 1'b0;
      end
      check(ok, $sformatf("read beat %0d of addr %h len %0d size %0d burst %0d mw %0d",
                          m, h.addr, h.len, h.size, h.burst, h.mw));
    end
  endtask

  task automatic check_mem(input string what);
    int bad;
    bad = 0;
    for (int a = 0; a < MEMB; a++)
      if (dut_byte(32'(a)) !== ref_mem[a]) bad++;
    check(bad == 0, $sformatf("%s: %0d memory bytes differ", what, bad));
  endtask

  task automatic rand_data(output logic [127:0] d [16], output logic [15:0] s [16],
                           input int mw, input logic full);
    for (int m = 0; m < 16; m++) begin
      d[m] = {$urandom, $urandom, $urandom, $urandom};
      s[m] = full ? 16'hFFFF : 16'($urandom);
      if (mw < 4) begin
        d[m] = d[m] & ((128'd1 << (8 << mw)) - 1);
        s[m] = s[m] & 16'((1 << (1 << mw)) - 1);
      end
    end
  endtask

  // A random legal request: aligned start, size no larger than the master bus.
  function automatic hdr_t rand_hdr(logic write, int mw, int tid, int region);
    int size, len;
    burst_e bt;
    size = $urandom % (mw + 1);
    case ($urandom % 3)
      0: bt = BURST_FIXED;
      1: bt = BURST_INCR;
      default: bt = BURST_WRAP;
    endcase
    if (bt == BURST_WRAP) begin
      case ($urandom % 4)
        0: len = 1; 1: len = 3; 2: len = 7; default: len = 15;
      endcase
    end else len = $urandom % 16;
    return mk(write, 32'(region + (($urandom % 64) << size)), len, size, bt, mw, tid);
  endfunction

  initial begin
    for (int a = 0; a < MEMB; a++) ref_mem[a] = 8'h00;
  end
