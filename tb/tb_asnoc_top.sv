// tb_asnoc_top: end-to-end testbench of the whole NoC at its default sizes.
// Ten behavioural AXI masters (32- and 128-bit, each on its own clock) run
// random write and read traffic to the five slaves: DDR (AXI 128), FLASH and
// USB (AXI 32), SDRAM (AHB 32) and the APB bridge (APB 32), each a
// behavioural memory on its own clock. DMA, VOM, VIM and CODEC address only
// DDR and SDRAM, the slaves their switch has request paths to. Every master checks its read data
// against what it wrote. The run has two phases: the SDRAM NI in speculative
// byte-enable mode, then in conservative mode.
// The testbench counts how often each mechanism of the design was exercised
// and fails if one never was: burst splitting for a narrower slave, splitting
// at a wrap point, wide-slave narrow transfers, AHB INCR bursts, AHB BUSY
// cycles, AHB byte-level writes, conservative-mode merging of fully strobed
// words into bursts, APB transfers, switch contention, traffic
// over inter-switch links, and the master NI holding back a read to a second
// slave. Besides the overall watchdog, a progress watchdog stops the run
// with a failure once no master has received a response for 20000 cycles.
//
// The platform (which masters, slaves and widths) follows the document's
// example SoC; the traffic, clock periods and mechanism counters are this
// testbench's own.
module tb_asnoc_top;
  import noc_pkg::*;
  localparam int NOPS = 25;

  logic noc_clk = 1'b0, rst_n = 1'b0;
  logic m_clk [NUM_MASTERS];
  logic s_clk [3];
  logic sdram_clk = 1'b0, apb_clk = 1'b0;
  logic run = 1'b0, cons = 1'b0;

  always #5 noc_clk = ~noc_clk;
  always #7 sdram_clk = ~sdram_clk;
  always #10 apb_clk = ~apb_clk;
  for (genvar i = 0; i < NUM_MASTERS; i++) begin : g_mclk
    initial m_clk[i] = 1'b0;
    always #(5 + i % 6) m_clk[i] = ~m_clk[i];
  end
  for (genvar k = 0; k < 3; k++) begin : g_sclk
    initial s_clk[k] = 1'b0;
    always #(6 + 2 * k) s_clk[k] = ~s_clk[k];
  end

  axi_ax_t      m_aw [NUM_MASTERS], m_ar [NUM_MASTERS];
  logic         m_awvalid [NUM_MASTERS], m_awready [NUM_MASTERS];
  logic [127:0] m_wdata [NUM_MASTERS], m_rdata [NUM_MASTERS];
  logic [15:0]  m_wstrb [NUM_MASTERS];
  logic         m_wlast [NUM_MASTERS], m_wvalid [NUM_MASTERS], m_wready [NUM_MASTERS];
  logic [3:0]   m_bid [NUM_MASTERS], m_rid [NUM_MASTERS];
  logic [1:0]   m_bresp [NUM_MASTERS], m_rresp [NUM_MASTERS];
  logic         m_bvalid [NUM_MASTERS], m_bready [NUM_MASTERS];
  logic         m_arvalid [NUM_MASTERS], m_arready [NUM_MASTERS];
  logic         m_rlast [NUM_MASTERS], m_rvalid [NUM_MASTERS], m_rready [NUM_MASTERS];

  axi_ax_t      s_aw [3], s_ar [3];
  logic         s_awvalid [3], s_awready [3];
  logic [127:0] s_wdata [3], s_rdata [3];
  logic [15:0]  s_wstrb [3];
  logic         s_wlast [3], s_wvalid [3], s_wready [3];
  logic [3:0]   s_bid [3], s_rid [3];
  logic [1:0]   s_bresp [3], s_rresp [3];
  logic         s_bvalid [3], s_bready [3], s_arvalid [3], s_arready [3];
  logic         s_rlast [3], s_rvalid [3], s_rready [3];

  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize, hburst;
  logic        psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;

  asnoc_top u_dut (
    .noc_clk, .rst_n,
    .m_clk, .m_aw, .m_awvalid, .m_awready, .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bid, .m_bresp, .m_bvalid, .m_bready, .m_ar, .m_arvalid, .m_arready,
    .m_rid, .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .s_clk, .s_aw, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wlast, .s_wvalid, .s_wready,
    .s_bid, .s_bresp, .s_bvalid, .s_bready, .s_ar, .s_arvalid, .s_arready,
    .s_rid, .s_rdata, .s_rresp, .s_rlast, .s_rvalid, .s_rready,
    .sdram_clk, .sdram_be_conservative(cons),
    .sdram_haddr(haddr), .sdram_htrans(htrans), .sdram_hwrite(hwrite), .sdram_hsize(hsize),
    .sdram_hburst(hburst), .sdram_hwdata(hwdata), .sdram_hrdata(hrdata),
    .sdram_hready(hready), .sdram_hresp(hresp),
    .apb_clk, .apb_psel(psel), .apb_penable(penable), .apb_pwrite(pwrite), .apb_paddr(paddr),
    .apb_pwdata(pwdata), .apb_prdata(prdata), .apb_pready(pready), .apb_pslverr(pslverr));

  // ---- masters ----
  for (genvar i = 0; i < NUM_MASTERS; i++) begin : g_m
    localparam int DW = MASTER_DW[i];
    // DMA, VOM, VIM and CODEC (Switch 2) can reach only DDR and SDRAM
    localparam logic [4:0] SLV = (i >= 4 && i <= 7) ? 5'b00110 : 5'b11111;
    axi_master_bfm #(.DW(DW), .MID(i), .NOPS(NOPS), .SLV(SLV)) u_bfm (
      .clk(m_clk[i]), .run, .cons_mode(cons),
      .aw(m_aw[i]), .awvalid(m_awvalid[i]), .awready(m_awready[i]),
      .wdata(m_wdata[i][DW-1:0]), .wstrb(m_wstrb[i][DW/8-1:0]), .wlast(m_wlast[i]),
      .wvalid(m_wvalid[i]), .wready(m_wready[i]),
      .bid(m_bid[i]), .bresp(m_bresp[i]), .bvalid(m_bvalid[i]), .bready(m_bready[i]),
      .ar(m_ar[i]), .arvalid(m_arvalid[i]), .arready(m_arready[i]),
      .rid(m_rid[i]), .rdata(m_rdata[i][DW-1:0]), .rresp(m_rresp[i]), .rlast(m_rlast[i]),
      .rvalid(m_rvalid[i]), .rready(m_rready[i]));
    if (DW < 128) begin : g_pad
      assign m_wdata[i][127:DW] = '0;
      assign m_wstrb[i][15:DW/8] = '0;
    end
  end

  // ---- slaves ----
  for (genvar k = 0; k < 3; k++) begin : g_s
    localparam int SW = (k == 0) ? 128 : 32;
    axi_mem #(.DW(SW), .MEMB(4096)) u_mem (
      .clk(s_clk[k]), .rst_n,
      .aw(s_aw[k]), .awvalid(s_awvalid[k]), .awready(s_awready[k]),
      .wdata(s_wdata[k][SW-1:0]), .wstrb(s_wstrb[k][SW/8-1:0]), .wlast(s_wlast[k]),
      .wvalid(s_wvalid[k]), .wready(s_wready[k]),
      .bid(s_bid[k]), .bresp(s_bresp[k]), .bvalid(s_bvalid[k]), .bready(s_bready[k]),
      .ar(s_ar[k]), .arvalid(s_arvalid[k]), .arready(s_arready[k]),
      .rid(s_rid[k]), .rdata(s_rdata[k][SW-1:0]), .rresp(s_rresp[k]), .rlast(s_rlast[k]),
      .rvalid(s_rvalid[k]), .rready(s_rready[k]));
    if (SW < 128) begin : g_pad
      assign s_rdata[k][127:SW] = '0;
    end
  end

  ahb_mem #(.MEMB(4096)) u_ahb (
    .clk(sdram_clk), .rst_n, .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hrdata,
    .hready, .hresp);
  apb_mem #(.MEMB(4096), .ERR_BIT(31)) u_apb (
    .clk(apb_clk), .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr);

  // ---- mechanism counters ----
  int split_bursts = 0, wrap_splits = 0, wide_xfers = 0, contention = 0, link_flits = 0;
  int read_holds = 0, merged_bursts = 0;
  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar k = 0; k < 3; k++) begin : g_cnt
    always @(posedge s_clk[k]) begin
      if (u_dut.g_sni_axi[k].u_sni.u_req.beat_valid && u_dut.g_sni_axi[k].u_sni.u_req.beat_ready &&
          u_dut.g_sni_axi[k].u_sni.u_req.beat.first && u_dut.g_sni_axi[k].u_sni.u_req.j != 0) begin
        if (u_dut.g_sni_axi[k].u_sni.u_req.hdr.burst == BURST_WRAP) wrap_splits++;
        else split_bursts++;
      end
      if (u_dut.g_sni_axi[k].u_sni.u_req.start &&
          int'(get_hdr(u_dut.g_sni_axi[k].u_sni.u_req.req_flit).mw) < $clog2(k == 0 ? 16 : 4))
        wide_xfers++;
    end
  end
  // conservative AHB write with a zero strobe: a run of full words sent as
  // a burst of more than one beat
  always @(posedge sdram_clk)
    if (u_dut.u_sni_sdram.u_req.mixed && u_dut.u_sni_sdram.u_req.beat_valid &&
        u_dut.u_sni_sdram.u_req.beat_ready && u_dut.u_sni_sdram.u_req.beat.first &&
        u_dut.u_sni_sdram.u_req.beat.clen > 10'd1)
      merged_bursts++;
  // width conversion and wrap-point splits at the AHB SDRAM NI, the narrow
  // slave that 128-bit masters reach
  always @(posedge sdram_clk) begin
    if (u_dut.u_sni_sdram.u_req.start && get_hdr(u_dut.u_sni_sdram.u_req.req_flit).size > 3'd2)
      split_bursts++;
    if (u_dut.u_sni_sdram.u_req.beat_valid && u_dut.u_sni_sdram.u_req.beat_ready &&
        u_dut.u_sni_sdram.u_req.beat.first && u_dut.u_sni_sdram.u_req.j != 0 &&
        u_dut.u_sni_sdram.u_req.hdr.burst == BURST_WRAP)
      wrap_splits++;
  end
  for (genvar i = 0; i < NUM_MASTERS; i++) begin : g_hold
    always @(posedge m_clk[i])
      if (u_dut.g_mni[i].u_mni.arvalid && !u_dut.g_mni[i].u_mni.r_ok &&
          u_dut.g_mni[i].u_mni.rout != 0 &&
          u_dut.g_mni[i].u_mni.rdest != addr_decode(m_ar[i].addr))
        read_holds++;
  end
  always @(posedge noc_clk) begin
    for (int i = 0; i < 6; i++)
      if (u_dut.u_req_s2.q_valid[i] && u_dut.u_req_s2.q_flit[i].head &&
          u_dut.u_req_s2.busy[u_dut.u_req_s2.q_port[i]]) contention++;
    if (u_dut.q12_v && u_dut.q12_r) link_flits++;
    if (u_dut.q32_v && u_dut.q32_r) link_flits++;
    if (u_dut.q31_v && u_dut.q31_r) link_flits++;
    if (u_dut.p21_v && u_dut.p21_r) link_flits++;
  end

  // ---- watchdog ----
  initial begin
    repeat (2000000) @(posedge noc_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Progress watchdog: while traffic runs, some master must receive a
  // response (B or last R beat) at least every 20000 NoC cycles; a packet
  // lost or sent to the wrong node stops that at once.
  int resp_sum = 0, last_sum = 0, idle_cyc = 0;
  always @(posedge noc_clk) begin
    resp_sum = 0;
    resp_sum += g_m[0].u_bfm.n_b + g_m[0].u_bfm.n_r + g_m[1].u_bfm.n_b + g_m[1].u_bfm.n_r;
    resp_sum += g_m[2].u_bfm.n_b + g_m[2].u_bfm.n_r + g_m[3].u_bfm.n_b + g_m[3].u_bfm.n_r;
    resp_sum += g_m[4].u_bfm.n_b + g_m[4].u_bfm.n_r + g_m[5].u_bfm.n_b + g_m[5].u_bfm.n_r;
    resp_sum += g_m[6].u_bfm.n_b + g_m[6].u_bfm.n_r + g_m[7].u_bfm.n_b + g_m[7].u_bfm.n_r;
    resp_sum += g_m[8].u_bfm.n_b + g_m[8].u_bfm.n_r + g_m[9].u_bfm.n_b + g_m[9].u_bfm.n_r;
    if (!run || all_done() || resp_sum != last_sum) idle_cyc = 0;
    else idle_cyc++;
    last_sum = resp_sum;
    if (idle_cyc == 20000) begin
      failures++;
      checks   += g_m[0].u_bfm.checks + g_m[1].u_bfm.checks + g_m[2].u_bfm.checks +
                  g_m[3].u_bfm.checks + g_m[4].u_bfm.checks + g_m[5].u_bfm.checks +
                  g_m[6].u_bfm.checks + g_m[7].u_bfm.checks + g_m[8].u_bfm.checks +
                  g_m[9].u_bfm.checks;
      failures += g_m[0].u_bfm.failures + g_m[1].u_bfm.failures + g_m[2].u_bfm.failures +
                  g_m[3].u_bfm.failures + g_m[4].u_bfm.failures + g_m[5].u_bfm.failures +
                  g_m[6].u_bfm.failures + g_m[7].u_bfm.failures + g_m[8].u_bfm.failures +
                  g_m[9].u_bfm.failures;
      $display("FAIL: no response for 20000 cycles (a master is stuck)");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic all_done();
    logic d;
    d = 1'b1;
    if (!g_m[0].u_bfm.done) d = 1'b0;
    if (!g_m[1].u_bfm.done) d = 1'b0;
    if (!g_m[2].u_bfm.done) d = 1'b0;
    if (!g_m[3].u_bfm.done) d = 1'b0;
    if (!g_m[4].u_bfm.done) d = 1'b0;
    if (!g_m[5].u_bfm.done) d = 1'b0;
    if (!g_m[6].u_bfm.done) d = 1'b0;
    if (!g_m[7].u_bfm.done) d = 1'b0;
    if (!g_m[8].u_bfm.done) d = 1'b0;
    if (!g_m[9].u_bfm.done) d = 1'b0;
    return d;
  endfunction

  int nbyte0;
  initial begin
    repeat (5) @(posedge noc_clk);
    rst_n = 1'b1;
    repeat (5) @(posedge noc_clk);
    for (int phase = 0; phase < 2; phase++) begin
      cons = phase[0];
      nbyte0 = u_ahb.n_byte;
      run = 1'b1;
      repeat (50) @(posedge noc_clk);
      while (!all_done()) @(posedge noc_clk);
      run = 1'b0;
      repeat (50) @(posedge noc_clk);
      if (phase == 1) check(u_ahb.n_byte > nbyte0, "conservative mode issued byte-level AHB writes");
    end
    checks   += g_m[0].u_bfm.checks + g_m[1].u_bfm.checks + g_m[2].u_bfm.checks +
                g_m[3].u_bfm.checks + g_m[4].u_bfm.checks + g_m[5].u_bfm.checks +
                g_m[6].u_bfm.checks + g_m[7].u_bfm.checks + g_m[8].u_bfm.checks +
                g_m[9].u_bfm.checks;
    failures += g_m[0].u_bfm.failures + g_m[1].u_bfm.failures + g_m[2].u_bfm.failures +
                g_m[3].u_bfm.failures + g_m[4].u_bfm.failures + g_m[5].u_bfm.failures +
                g_m[6].u_bfm.failures + g_m[7].u_bfm.failures + g_m[8].u_bfm.failures +
                g_m[9].u_bfm.failures;
    $display("mechanisms: split_bursts=%0d wrap_splits=%0d wide_xfers=%0d ahb_incr=%0d ahb_busy=%0d ahb_byte=%0d apb=%0d contention=%0d link_flits=%0d read_holds=%0d merged_bursts=%0d",
             split_bursts, wrap_splits, wide_xfers, u_ahb.n_incr, u_ahb.n_busy, u_ahb.n_byte,
             u_apb.n_xfer, contention, link_flits, read_holds, merged_bursts);
    check(split_bursts > 0, "wide master burst converted for a narrower slave");
    check(wrap_splits > 0, "wrapping burst split at the wrap point");
    check(wide_xfers > 0, "narrow master to wide slave");
    check(u_ahb.n_incr > 0, "AHB INCR bursts");
    check(u_ahb.n_busy > 0, "AHB BUSY cycles");
    check(u_apb.n_xfer > 0, "APB transfers");
    check(contention > 0, "switch contention");
    check(link_flits > 0, "inter-switch traffic");
    check(merged_bursts > 0, "conservative mode merging full words into a burst");
    check(read_holds > 0, "master NI holding a read to a second slave");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
