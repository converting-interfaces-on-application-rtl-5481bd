// tb_sni_axi: self-checking testbench of the AXI slave NI. Two NIs are
// tested in turn: one in front of a 32-bit AXI memory (narrow slave for
// 64- and 128-bit masters) and one in front of a 128-bit memory (wide slave
// for 32-bit masters). Request packets are injected on the NoC side; write
// results are compared byte by byte with a reference memory and read
// responses with the reference data. Directed cases check the burst splitting
// the slave sees: a 128-bit INCR burst of 8 becomes two 32-bit bursts of 16,
// and a 64-bit WRAP burst of 16 at 0x08 becomes bursts at 0x08 (16 beats),
// 0x48 (14) and 0x00 (2).
//
// The two directed splits are the document's examples (128-bit burst of 8 to
// a 32-bit slave; its wrapping-burst figure); the random traffic is this
// testbench's own.
module tb_sni_axi;
  import noc_pkg::*;
  localparam int unsigned MEMB = 4096;
  int sel = 0;   // 0: 32-bit slave, 1: 128-bit slave

  function automatic logic [7:0] dut_byte(logic [31:0] a);
    return (sel == 0) ? u_m32.mem[a] : u_m128.mem[a];
  endfunction

  `include "sni_tb_common.svh"

  // ---- the two NIs and memories ----
  logic   n_rq_r, w_rq_r, n_rs_v, w_rs_v;
  flit_t  n_rs_f, w_rs_f;
  assign req_ready = (sel == 0) ? n_rq_r : w_rq_r;
  assign rsp_valid = (sel == 0) ? n_rs_v : w_rs_v;
  assign rsp_flit  = (sel == 0) ? n_rs_f : w_rs_f;

  axi_ax_t n_aw, n_ar, w_aw, w_ar;
  logic n_awv, n_awr, n_wv, n_wr, n_wl, n_bv, n_br, n_arv, n_arr, n_rv, n_rr, n_rl;
  logic w_awv, w_awr, w_wv, w_wr, w_wl, w_bv, w_br, w_arv, w_arr, w_rv, w_rr, w_rl;
  logic [31:0] n_wd, n_rd;  logic [3:0]  n_ws;
  logic [127:0] w_wd, w_rd; logic [15:0] w_ws;
  logic [3:0] n_bid, n_rid, w_bid, w_rid;
  logic [1:0] n_bresp, n_rresp, w_bresp, w_rresp;

  sni_axi #(.SW(32)) u_n (
    .noc_clk, .noc_rst_n(rst_n),
    .req_flit, .req_valid(req_valid && sel == 0), .req_ready(n_rq_r),
    .rsp_flit(n_rs_f), .rsp_valid(n_rs_v), .rsp_ready(rsp_ready && sel == 0),
    .clk, .rst_n,
    .aw(n_aw), .awvalid(n_awv), .awready(n_awr), .wdata(n_wd), .wstrb(n_ws), .wlast(n_wl),
    .wvalid(n_wv), .wready(n_wr), .bid(n_bid), .bresp(n_bresp), .bvalid(n_bv), .bready(n_br),
    .ar(n_ar), .arvalid(n_arv), .arready(n_arr), .rid(n_rid), .rdata(n_rd), .rresp(n_rresp),
    .rlast(n_rl), .rvalid(n_rv), .rready(n_rr));
  axi_mem #(.DW(32), .MEMB(MEMB)) u_m32 (
    .clk, .rst_n,
    .aw(n_aw), .awvalid(n_awv), .awready(n_awr), .wdata(n_wd), .wstrb(n_ws), .wlast(n_wl),
    .wvalid(n_wv), .wready(n_wr), .bid(n_bid), .bresp(n_bresp), .bvalid(n_bv), .bready(n_br),
    .ar(n_ar), .arvalid(n_arv), .arready(n_arr), .rid(n_rid), .rdata(n_rd), .rresp(n_rresp),
    .rlast(n_rl), .rvalid(n_rv), .rready(n_rr));

  sni_axi #(.SW(128)) u_w (
    .noc_clk, .noc_rst_n(rst_n),
    .req_flit, .req_valid(req_valid && sel == 1), .req_ready(w_rq_r),
    .rsp_flit(w_rs_f), .rsp_valid(w_rs_v), .rsp_ready(rsp_ready && sel == 1),
    .clk, .rst_n,
    .aw(w_aw), .awvalid(w_awv), .awready(w_awr), .wdata(w_wd), .wstrb(w_ws), .wlast(w_wl),
    .wvalid(w_wv), .wready(w_wr), .bid(w_bid), .bresp(w_bresp), .bvalid(w_bv), .bready(w_br),
    .ar(w_ar), .arvalid(w_arv), .arready(w_arr), .rid(w_rid), .rdata(w_rd), .rresp(w_rresp),
    .rlast(w_rl), .rvalid(w_rv), .rready(w_rr));
  axi_mem #(.DW(128), .MEMB(MEMB)) u_m128 (
    .clk, .rst_n,
    .aw(w_aw), .awvalid(w_awv), .awready(w_awr), .wdata(w_wd), .wstrb(w_ws), .wlast(w_wl),
    .wvalid(w_wv), .wready(w_wr), .bid(w_bid), .bresp(w_bresp), .bvalid(w_bv), .bready(w_br),
    .ar(w_ar), .arvalid(w_arv), .arready(w_arr), .rid(w_rid), .rdata(w_rd), .rresp(w_rresp),
    .rlast(w_rl), .rvalid(w_rv), .rready(w_rr));

  // ---- watchdog ----
  initial begin
    repeat (400000) @(posedge noc_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] d [16];
  logic [15:0]  s [16];
  hdr_t h;
  int   n0;

  initial begin
    repeat (4) @(posedge noc_clk);
    rst_n = 1'b1;
    repeat (4) @(posedge noc_clk);

    // 1. 128-bit master, INCR 8 beats, to the 32-bit slave: 32 slave beats
    //    in two bursts of 16.
    rand_data(d, s, 4, 1'b1);
    h  = mk(1'b1, 32'h100, 7, 4, BURST_INCR, 4, 1);
    n0 = u_m32.log_n;
    do_write(h, d, s, 1'b0);
    check(u_m32.log_n - n0 == 2, "128->32 INCR8 write split into two bursts");
    check(u_m32.log_ax[n0].len == 15 && u_m32.log_ax[n0+1].len == 15 &&
          u_m32.log_ax[n0].addr == 32'h100 && u_m32.log_ax[n0+1].addr == 32'h140 &&
          u_m32.log_ax[n0].size == 2, "128->32 bursts of 16 words at 0x100 and 0x140");
    check(u_m32.log_ax[n0].id == 0 && u_m32.log_ax[n0+1].id == 0, "split bursts share the NI's own ID");
    do_read(h);
    check_mem("128->32 INCR");

    // 2. The wrapping example: 64-bit master, WRAP 16 from 0x08, read from
    //    the 32-bit slave after filling the 128-byte block.
    rand_data(d, s, 3, 1'b1);
    do_write(mk(1'b1, 32'h000, 15, 3, BURST_INCR, 3, 2), d, s, 1'b0);
    h  = mk(1'b0, 32'h008, 15, 3, BURST_WRAP, 3, 3);
    n0 = u_m32.log_n;
    do_read(h);
    check(u_m32.log_n - n0 == 3, "64->32 WRAP16 read issued as three bursts");
    check(u_m32.log_ax[n0].addr == 32'h08 && u_m32.log_ax[n0].len == 15 &&
          u_m32.log_ax[n0+1].addr == 32'h48 && u_m32.log_ax[n0+1].len == 13 &&
          u_m32.log_ax[n0+2].addr == 32'h00 && u_m32.log_ax[n0+2].len == 1 &&
          u_m32.log_ax[n0+2].burst == BURST_INCR,
          "WRAP split at 0x08/16, 0x48/14 and 0x00/2");

    // 3. Random traffic from 32-, 64- and 128-bit masters to the 32-bit slave.
    for (int t = 0; t < 60; t++) begin
      int mw;
      mw = 2 + $urandom % 3;
      rand_data(d, s, mw, ($urandom % 2) == 0);
      h = rand_hdr(1'b1, mw, t % 16, 1024);
      do_write(h, d, s, 1'b0);
      h.write = 1'b0;
      do_read(h);
    end
    check_mem("random traffic to the 32-bit slave");
    check(u_m32.wlast_err == 0, "WLAST on the last beat of every 32-bit burst");

    // 4. Wide slave: 32-bit master to the 128-bit slave, narrow transfers.
    sel = 1;
    for (int a = 0; a < MEMB; a++) ref_mem[a] = 8'h00;
    rand_data(d, s, 2, 1'b1);
    h  = mk(1'b1, 32'h204, 3, 2, BURST_INCR, 2, 4);
    n0 = u_m128.log_n;
    do_write(h, d, s, 1'b0);
    check(u_m128.log_n - n0 == 1 && u_m128.log_ax[n0].len == 3 && u_m128.log_ax[n0].size == 2,
          "32->128 burst passed through as 4 narrow transfers");
    do_read(h);
    h  = mk(1'b0, 32'h204, 3, 2, BURST_WRAP, 2, 4);
    n0 = u_m128.log_n;
    do_read(h);
    check(u_m128.log_ax[n0].burst == BURST_WRAP && u_m128.log_ax[n0].len == 3,
          "unsplit WRAP burst kept as WRAP");
    for (int t = 0; t < 60; t++) begin
      int mw;
      mw = 2 + $urandom % 3;
      rand_data(d, s, mw, ($urandom % 2) == 0);
      h = rand_hdr(1'b1, mw, t % 16, 1024);
      do_write(h, d, s, 1'b0);
      h.write = 1'b0;
      do_read(h);
    end
    check_mem("random traffic to the 128-bit slave");
    check(u_m128.wlast_err == 0, "WLAST on the last beat of every 128-bit burst");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
