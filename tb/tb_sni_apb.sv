// tb_sni_apb: self-checking testbench of the APB slave NI in front of a
// 32-bit APB3 memory with random wait states. It checks that each 32-bit
// word becomes one APB transfer (four per beat of a 128-bit master), that
// write and read data match a reference memory, that PSLVERR turns the
// packet's response into SLVERR, and that a 16-bit write becomes one
// full-word APB write (APB has no narrow transfers).
//
// Full-word access regardless of transfer width follows the document; zeros
// in unused bytes are this design's choice.
module tb_sni_apb;
  import noc_pkg::*;
  localparam int unsigned MEMB = 4096;

  function automatic logic [7:0] dut_byte(logic [31:0] a);
    return u_mem.mem[a];
  endfunction

  `include "sni_tb_common.svh"

  logic        psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;

  sni_apb u_dut (
    .noc_clk, .noc_rst_n(rst_n),
    .req_flit, .req_valid, .req_ready, .rsp_flit, .rsp_valid, .rsp_ready,
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr);

  apb_mem #(.MEMB(MEMB), .ERR_BIT(11)) u_mem (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr);

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
  int   nx;

  initial begin
    repeat (4) @(posedge noc_clk);
    rst_n = 1'b1;
    repeat (4) @(posedge noc_clk);

    // 1. 32-bit master, burst of 4 words: 4 APB transfers.
    rand_data(d, s, 2, 1'b1);
    h  = mk(1'b1, 32'h040, 3, 2, BURST_INCR, 2, 1);
    nx = u_mem.n_xfer;
    do_write(h, d, s, 1'b0);
    check(u_mem.n_xfer - nx == 4, "4 words -> 4 APB transfers");
    do_read(h);
    check_mem("32-bit write");

    // 2. 128-bit master, 2 beats: 8 APB transfers each way.
    rand_data(d, s, 4, 1'b1);
    h  = mk(1'b1, 32'h100, 1, 4, BURST_INCR, 4, 2);
    nx = u_mem.n_xfer;
    do_write(h, d, s, 1'b0);
    check(u_mem.n_xfer - nx == 8, "2 x 128 bits -> 8 APB transfers");
    nx = u_mem.n_xfer;
    do_read(h);
    check(u_mem.n_xfer - nx == 8, "2 x 128-bit read -> 8 APB transfers");
    check_mem("128-bit write");

    // 3. Error response from the slave.
    rand_data(d, s, 2, 1'b1);
    h = mk(1'b1, 32'h800, 0, 2, BURST_INCR, 2, 3);
    put(make_head(h, 1'b0));
    begin
      flit_t f, r;
      f = '0; f.data = d[0]; f.strb = 16'hF; f.tail = 1'b1;
      put(f);
      get(r);
      check(r.head && r.tail && get_hdr(r).resp == RESP_SLVERR, "PSLVERR gives SLVERR on write");
    end
    do_read(mk(1'b0, 32'h800, 1, 2, BURST_INCR, 2, 4), RESP_SLVERR);

    // 4. Random full-word traffic from 32- and 128-bit masters.
    for (int t = 0; t < 60; t++) begin
      int mw;
      mw = ($urandom % 2) ? 4 : 2;
      rand_data(d, s, mw, 1'b1);
      h = mk(1'b1, 32'(($urandom % 64) << mw), $urandom % 8, mw, BURST_INCR, mw, t % 16);
      do_write(h, d, s, 1'b0);
      do_read(h);
    end
    check_mem("random traffic");

    // 5. A 16-bit write from a 32-bit master (upper half, strobes 1100) is
    //    one full-word APB write: APB has no narrow transfers, so the whole
    //    word is written, with zeros in the bytes outside the transfer.
    d[0] = 32'hA1B2_C3D4;
    s[0] = 16'h000C;
    h  = mk(1'b1, 32'h202, 0, 1, BURST_INCR, 2, 5);
    nx = u_mem.n_xfer;
    do_write(h, d, s, 1'b0);
    check(u_mem.n_xfer - nx == 1, "16-bit write -> one APB transfer");
    check({u_mem.mem[32'h203], u_mem.mem[32'h202], u_mem.mem[32'h201], u_mem.mem[32'h200]} ==
          32'hA1B2_0000, "16-bit write performed as a full 32-bit word write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
