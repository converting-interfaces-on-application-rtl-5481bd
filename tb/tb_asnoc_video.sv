// tb_asnoc_video: the video-playback traffic of the example SoC, run
// end to end through the whole network at its default sizes. The video input
// module (VIM, 128-bit) writes a 4 KB frame into DDR in bursts of 16 beats;
// then, at the same time, the video output module (VOM, 128-bit) reads the
// frame back for display, the codec (CODEC, 128-bit) reads it and stores a
// copy in the AHB SDRAM, and processor 1 (32-bit) programs and reads back
// eight APB registers. Each reader checks every byte against the frame
// pattern, the codec finally reads its SDRAM copy back, and the testbench
// reports the bytes per NoC cycle reached by the frame write and read.
// The other masters stay idle.
//
// The masters, their widths and their roles (camera to memory, memory to
// display, codec working with both) follow the document's description of
// its platform; the frame size, burst length, data pattern and the codec
// copying the frame unchanged are this testbench's own, since the document
// gives no traffic figures. A watchdog ends the run with a failure.
module tb_asnoc_video;
  import noc_pkg::*;

  logic noc_clk = 1'b0, rst_n = 1'b0;
  logic m_clk [NUM_MASTERS];
  logic s_clk [3];
  logic sdram_clk = 1'b0, apb_clk = 1'b0;
  logic cons = 1'b0;

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

  // ---- masters ----
  int   checks = 0, failures = 0;
  logic frame_in = 1'b0;             // VIM has written the whole frame
  int   done_n = 0;                  // VOM, CODEC and Proc 1 finished
  longint t_w0, t_w1, t_r0, t_r1;    // NoC-cycle time stamps
  longint ncyc = 0;
  always @(posedge noc_clk) ncyc++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // frame pattern: byte at address a
  function automatic logic [7:0] pix(logic [31:0] a);
    return 8'(a[11:0] * 12'd37 + 12'd11) ^ 8'(a[11:8]);
  endfunction
  function automatic logic [127:0] beat16(logic [31:0] a);
    logic [127:0] d;
    for (int b = 0; b < 16; b++) d[8*b +: 8] = pix(a + 32'(b));
    return d;
  endfunction

  for (genvar i = 0; i < NUM_MASTERS; i++) begin : g_d
    int           nb = 0;
    logic [127:0] rq [$];

    initial begin
      m_awvalid[i] = 1'b0; m_wvalid[i] = 1'b0; m_arvalid[i] = 1'b0;
      m_bready[i] = 1'b1; m_rready[i] = 1'b1;
      m_aw[i] = '0; m_ar[i] = '0; m_wdata[i] = '0; m_wstrb[i] = '0; m_wlast[i] = 1'b0;
    end
    always @(posedge m_clk[i]) begin
      if (rst_n && m_bvalid[i] && m_bready[i]) nb++;
      if (rst_n && m_rvalid[i] && m_rready[i]) rq.push_back(m_rdata[i]);
    end

    // INCR write of len+1 beats of 2**sz bytes; data from beat16 or d
    task automatic wr(input logic [31:0] a, input int len, input int sz,
                      input logic [127:0] d [16]);
      axi_ax_t x;
      int nb0;
      x = '0; x.id = 4'(i); x.addr = a; x.len = 4'(len); x.size = 3'(sz); x.burst = BURST_INCR;
      nb0 = nb;
      @(negedge m_clk[i]);
      m_aw[i] = x; m_awvalid[i] = 1'b1; #1;
      while (!m_awready[i]) begin @(negedge m_clk[i]); #1; end
      @(posedge m_clk[i]); #1; m_awvalid[i] = 1'b0;
      for (int m = 0; m <= len; m++) begin
        @(negedge m_clk[i]);
        m_wdata[i] = d[m]; m_wstrb[i] = 16'((1 << (1 << sz)) - 1) << (a[3:0] & 4'(~((1 << sz) - 1)));
        m_wlast[i] = (m == len); m_wvalid[i] = 1'b1; #1;
        while (!m_wready[i]) begin @(negedge m_clk[i]); #1; end
        @(posedge m_clk[i]); #1; m_wvalid[i] = 1'b0;
      end
      while (nb == nb0) @(negedge m_clk[i]);
    endtask

    task automatic rd(input logic [31:0] a, input int len, input int sz,
                      output logic [127:0] d [16]);
      axi_ax_t x;
      x = '0; x.id = 4'(i); x.addr = a; x.len = 4'(len); x.size = 3'(sz); x.burst = BURST_INCR;
      @(negedge m_clk[i]);
      m_ar[i] = x; m_arvalid[i] = 1'b1; #1;
      while (!m_arready[i]) begin @(negedge m_clk[i]); #1; end
      @(posedge m_clk[i]); #1; m_arvalid[i] = 1'b0;
      for (int m = 0; m <= len; m++) begin
        while (rq.size() == 0) @(negedge m_clk[i]);
        d[m] = rq.pop_front();
      end
    endtask
  end

  localparam logic [31:0] FRAME = 32'h8000_0000;   // in DDR
  localparam logic [31:0] COPY  = 32'hC000_0000;   // in SDRAM
  localparam logic [31:0] REGS  = 32'h4000_0100;   // APB registers

  // VIM: camera frame into DDR, 16 bursts of 16 x 128 bits
  initial begin
    logic [127:0] d [16];
    wait (rst_n);
    t_w0 = ncyc;
    for (int k = 0; k < 16; k++) begin
      for (int m = 0; m < 16; m++) d[m] = beat16(FRAME + 32'(256 * k + 16 * m));
      g_d[6].wr(FRAME + 32'(256 * k), 15, 4, d);
    end
    t_w1 = ncyc;
    frame_in = 1'b1;
  end

  // VOM: frame from DDR to the display
  initial begin
    logic [127:0] d [16];
    int bad;
    wait (frame_in);
    t_r0 = ncyc;
    bad = 0;
    for (int k = 0; k < 16; k++) begin
      g_d[5].rd(FRAME + 32'(256 * k), 15, 4, d);
      for (int m = 0; m < 16; m++)
        if (d[m] != beat16(FRAME + 32'(256 * k + 16 * m))) bad++;
    end
    t_r1 = ncyc;
    check(bad == 0, "VOM reads the frame VIM wrote");
    done_n++;
  end

  // CODEC: frame from DDR, copy into SDRAM (AHB, 32-bit), read copy back
  initial begin
    logic [127:0] d [16];
    int bad;
    wait (frame_in);
    bad = 0;
    for (int k = 0; k < 16; k++) begin
      g_d[7].rd(FRAME + 32'(256 * k), 15, 4, d);
      for (int m = 0; m < 16; m++)
        if (d[m] != beat16(FRAME + 32'(256 * k + 16 * m))) begin
          if (bad < 3) $display("codec k=%0d m=%0d got %h exp %h t=%0t", k, m, d[m], beat16(FRAME + 32'(256 * k + 16 * m)), $time);
          bad++;
        end
      g_d[7].wr(COPY + 32'(256 * k), 15, 4, d);
    end
    check(bad == 0, "CODEC reads the frame from DDR");
    bad = 0;
    for (int k = 0; k < 16; k++) begin
      g_d[7].rd(COPY + 32'(256 * k), 15, 4, d);
      for (int m = 0; m < 16; m++)
        if (d[m] != beat16(FRAME + 32'(256 * k + 16 * m))) bad++;
    end
    check(bad == 0, "CODEC's SDRAM copy matches the frame");
    for (int a = 0; a < 4096; a++)
      if (u_ahb.mem[a] != pix(COPY + 32'(a))) bad++;
    check(bad == 0, "SDRAM holds the frame byte for byte");
    done_n++;
  end

  // Proc 1: program eight APB registers, read them back
  initial begin
    logic [127:0] d [16], q [16];
    int bad;
    wait (frame_in);
    for (int m = 0; m < 16; m++) d[m] = 128'({$urandom});
    g_d[0].wr(REGS, 7, 2, d);
    g_d[0].rd(REGS, 7, 2, q);
    bad = 0;
    for (int m = 0; m < 8; m++) if (q[m][31:0] != d[m][31:0]) bad++;
    check(bad == 0, "APB registers read back");
    done_n++;
  end

  initial begin
    repeat (400000) @(posedge noc_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge noc_clk);
    rst_n = 1'b1;
    wait (done_n == 3);
    $display("frame write: 4096 bytes in %0d NoC cycles; frame read (VOM, sharing DDR with CODEC): %0d NoC cycles",
             t_w1 - t_w0, t_r1 - t_r0);
    check(t_w1 > t_w0 && t_r1 > t_r0, "frame transfers took time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
