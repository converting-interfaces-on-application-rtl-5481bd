// axi_master_bfm: behavioural AXI master for the end-to-end testbench. While
// `run` is high it performs NOPS random operations on its own 256-byte window
// (at 0x100 * MID) inside each of the slaves set in SLV: a write burst (waiting for
// its B), or one to three read bursts issued back to back to random slaves
// without waiting, whose data is checked against a byte-level reference of
// what this master wrote. Burst type, length, size (up to the bus width) and
// strobes are random within what each slave accepts: APB gets full-width
// INCR bursts with all strobes set, and the AHB slave gets all strobes set
// unless cons_mode says its NI runs in conservative mode.
// checks, failures, n_ops and done are read by the testbench.
//
// The master IPs (processors, DMA, video modules, codec, SD card, JTAG) are
// outside the design; this model only produces AXI traffic of the widths the
// example SoC gives them. The traffic mix is this testbench's own.
module axi_master_bfm
  import noc_pkg::*;
#(
  parameter int unsigned DW   = 32,
  parameter int unsigned MID  = 0,
  parameter int unsigned NOPS = 20,
  parameter logic [4:0]  SLV  = 5'b11111   // slaves it may address (bit = slave node)
) (
  input  logic              clk,
  input  logic              run,
  input  logic              cons_mode,
  output axi_ax_t           aw,
  output logic              awvalid,
  input  logic              awready,
  output logic [DW-1:0]     wdata,
  output logic [DW/8-1:0]   wstrb,
  output logic              wlast,
  output logic              wvalid,
  input  logic              wready,
  input  logic [TID_W-1:0]  bid,
  input  logic [1:0]        bresp,
  input  logic              bvalid,
  output logic              bready,
  output axi_ax_t           ar,
  output logic              arvalid,
  input  logic              arready,
  input  logic [TID_W-1:0]  rid,
  input  logic [DW-1:0]     rdata,
  input  logic [1:0]        rresp,
  input  logic              rlast,
  input  logic              rvalid,
  output logic              rready
);
  localparam int MWL = $clog2(DW / 8);
  localparam logic [31:0] BASE [5] = '{32'h4000_0000, 32'h8000_0000, 32'hC000_0000,
                                       32'h0000_0000, 32'h5000_0000};

  int checks = 0, failures = 0, n_ops = 0, n_b = 0, n_r = 0;
  logic done = 1'b0;
  logic [7:0] ref_mem [5][256];
  initial for (int s = 0; s < 5; s++) for (int b = 0; b < 256; b++) ref_mem[s][b] = 8'h00;

  initial begin
    aw = '0; ar = '0; awvalid = 1'b0; arvalid = 1'b0; wvalid = 1'b0;
    wdata = '0; wstrb = '0; wlast = 1'b0; bready = 1'b1; rready = 1'b1;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: master %0d: %s", MID, what); end
  endtask

  function automatic int beat_off(axi_ax_t x, int m);   // offset in window
    int nb, region, base, off;
    nb = 1 << x.size;
    off = int'(x.addr[7:0]);
    if (x.burst == BURST_FIXED) return off;
    if (x.burst == BURST_INCR)  return off + m * nb;
    region = (int'(x.len) + 1) * nb;
    base   = (off / region) * region;
    return base + (off - base + m * nb) % region;
  endfunction

  // Expected read data: one entry per R beat.
  logic [DW-1:0] exp_d [$];
  logic [DW/8-1:0] exp_m [$];
  logic exp_last [$];
  logic [3:0] exp_id [$];

  always @(negedge clk) begin
    rready = ($urandom % 4) != 0;
    #1;
    if (rvalid && rready) begin
      logic [DW-1:0] e, msk;
      e = exp_d.pop_front();
      msk = '0;
      for (int l = 0; l < DW / 8; l++) if (exp_m[0][l]) msk[8*l +: 8] = 8'hFF;
      void'(exp_m.pop_front());
      check((rdata & msk) == e && rlast == exp_last.pop_front() && rid == exp_id.pop_front()
            && rresp == RESP_OKAY, "read data");
      if (rlast) n_r++;
    end
    if (bvalid && bready) begin
      check(bresp == RESP_OKAY, "write response");
      n_b++;
    end
  end

  function automatic int pick();
    int s;
    s = $urandom % 5;
    while (!SLV[s]) s = $urandom % 5;
    return s;
  endfunction

  function automatic axi_ax_t rand_ax(int s, logic for_write);
    axi_ax_t x;
    int size, len, nb, maxstart;
    x = '0;
    x.id = 4'($urandom);
    if (s == 0) begin                       // APB: full width, INCR
      size = MWL; x.burst = BURST_INCR;
    end else begin
      size = $urandom % (MWL + 1);
      x.burst = burst_e'($urandom % 3);
    end
    nb = 1 << size;
    if (x.burst == BURST_WRAP) begin
      case ($urandom % 4) 0: len = 1; 1: len = 3; 2: len = 7; default: len = 15; endcase
      if ((len + 1) * nb > 256) len = 256 / nb - 1;
      maxstart = 256 / nb;
    end else begin
      len = $urandom % 16;
      maxstart = (x.burst == BURST_INCR) ? 256 / nb - len : 256 / nb;
    end
    x.len  = 4'(len);
    x.size = 3'(size);
    x.addr = BASE[s] + 32'(MID * 256) + 32'(($urandom % maxstart) * nb);
    return x;
  endfunction

  task automatic do_write(int s);
    axi_ax_t x;
    logic full;
    int nb0;
    x = rand_ax(s, 1'b1);
    full = (s == 0) || (s == 2 && !cons_mode) || ($urandom % 2);
    n_ops++;
    nb0 = n_b;
    @(negedge clk);
    aw = x; awvalid = 1'b1; #1;
    while (!awready) begin @(negedge clk); #1; end
    @(posedge clk); #1; awvalid = 1'b0;
    for (int m = 0; m <= int'(x.len); m++) begin
      logic [DW-1:0] d;
      logic [DW/8-1:0] st;
      d = '0;
      for (int k = 0; k < DW / 32; k++) d[32*k +: 32] = $urandom;
      st = full ? '1 : (DW/8)'($urandom);
      for (int b = 0; b < (1 << x.size); b++) begin
        int off, lane;
        off  = (beat_off(x, m) & ~((1 << x.size) - 1)) + b;
        lane = (int'(x.addr & ~32'hFF) + off) % (DW / 8);
        if (st[lane]) ref_mem[s][off] = d[8*lane +: 8];
      end
      @(negedge clk);
      wdata = d; wstrb = st; wlast = (m == int'(x.len)); wvalid = 1'b1; #1;
      while (!wready) begin @(negedge clk); #1; end
      @(posedge clk); #1; wvalid = 1'b0;
    end
    while (n_b == nb0) @(negedge clk);
  endtask

  task automatic issue_read(int s);
    axi_ax_t x;
    x = rand_ax(s, 1'b0);
    n_ops++;
    for (int m = 0; m <= int'(x.len); m++) begin
      logic [DW-1:0] d;
      logic [DW/8-1:0] msk;
      d = '0; msk = '0;
      for (int b = 0; b < (1 << x.size); b++) begin
        int off, lane;
        off  = (beat_off(x, m) & ~((1 << x.size) - 1)) + b;
        lane = (int'(x.addr & ~32'hFF) + off) % (DW / 8);
        d[8*lane +: 8] = ref_mem[s][off];
        msk[lane] = 1'b1;
      end
      exp_d.push_back(d); exp_m.push_back(msk);
      exp_last.push_back(m == int'(x.len)); exp_id.push_back(x.id);
    end
    @(negedge clk);
    ar = x; arvalid = 1'b1; #1;
    while (!arready) begin @(negedge clk); #1; end
    @(posedge clk); #1; arvalid = 1'b0;
  endtask

  initial begin
    forever begin
      while (!run) @(negedge clk);
      done = 1'b0;
      for (int i = 0; i < NOPS; i++) begin
        if ($urandom % 2) do_write(pick());
        else begin
          int n;
          n = 1 + $urandom % 3;
          for (int k = 0; k < n; k++) issue_read(pick());
          while (exp_d.size() != 0) @(negedge clk);
        end
      end
      done = 1'b1;
      while (run) @(negedge clk);
    end
  end
endmodule
