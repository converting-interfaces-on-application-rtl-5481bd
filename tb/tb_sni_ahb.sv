// tb_sni_ahb: self-checking testbench of the AHB slave NI in front of a
// 32-bit AHB-Lite memory with random wait states. Checked:
//  * a burst of any length goes out as one undefined-length INCR burst;
//  * a wrapping burst is broken at its wrap point;
//  * speculative mode (be_conservative = 0) writes every byte, ignoring
//    strobes, and streams the data (BUSY cycles appear when data is late);
//  * conservative mode writes only strobed bytes: a word with a missing
//    strobe becomes single-byte transfers, runs of fully strobed words are
//    merged into INCR bursts, and a write with all strobes set is one burst
//    (including the example of a burst of 8 whose 4th transfer has two zero
//    strobes: a burst of 3, two byte transfers, a burst of 4);
//  * read data from 32-, 64- and 128-bit masters against the reference.
//
// The INCR conversion, both byte-enable modes and the 8-beat re-merging
// example follow the document; BUSY insertion and the expected transfer
// counts follow this design's choices.
module tb_sni_ahb;
  import noc_pkg::*;
  localparam int unsigned MEMB = 4096;

  function automatic logic [7:0] dut_byte(logic [31:0] a);
    return u_mem.mem[a];
  endfunction

  `include "sni_tb_common.svh"

  logic        cons = 1'b0;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize, hburst;

  sni_ahb u_dut (
    .noc_clk, .noc_rst_n(rst_n),
    .req_flit, .req_valid, .req_ready, .rsp_flit, .rsp_valid, .rsp_ready,
    .clk, .rst_n, .be_conservative(cons),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hrdata, .hready, .hresp);

  ahb_mem #(.MEMB(MEMB)) u_mem (
    .clk, .rst_n, .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hrdata, .hready, .hresp);

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
  int   nn, ns, nb, ni;

  initial begin
    repeat (4) @(posedge noc_clk);
    rst_n = 1'b1;
    repeat (4) @(posedge noc_clk);

    // 1. 128-bit master, INCR of 6 beats (a length AHB bursts do not have):
    //    one INCR burst of 24 words.
    rand_data(d, s, 4, 1'b1);
    h  = mk(1'b1, 32'h100, 5, 4, BURST_INCR, 4, 1);
    nn = u_mem.n_nonseq; ns = u_mem.n_seq; ni = u_mem.n_incr;
    do_write(h, d, s, 1'b0);
    check(u_mem.n_nonseq - nn == 1 && u_mem.n_seq - ns == 23 && u_mem.n_incr - ni == 1,
          "AXI burst of 6x128 bits sent as one INCR burst of 24 words");
    do_read(h);
    check_mem("INCR write");

    // 2. 64-bit WRAP of 16 from 0x08 over 32 bits: two INCR bursts
    //    (0x08..0x7C, then 0x00..0x04).
    nn = u_mem.n_nonseq;
    do_read(mk(1'b0, 32'h008, 15, 3, BURST_WRAP, 3, 2));
    check(u_mem.n_nonseq - nn == 2, "WRAP burst broken once at the wrap point");

    // 3. Speculative mode with holes in the strobes: all bytes written.
    rand_data(d, s, 2, 1'b0);
    s[1] = 4'b0101;
    h  = mk(1'b1, 32'h300, 3, 2, BURST_INCR, 2, 3);
    nb = u_mem.n_byte;
    do_write(h, d, s, 1'b1);
    check(u_mem.n_byte == nb, "speculative mode issues no byte transfers");
    check_mem("speculative write ignores strobes");

    // 4. Conservative mode with holes, 128-bit master, 4 beats; beat 2 has
    //    strobes F0F3: words 0..7 full (one burst of 8), word 8 has two
    //    strobed bytes (two byte transfers), word 9 full (a SINGLE), word 10
    //    none, words 11..15 full (one burst of 5).
    cons = 1'b1;
    rand_data(d, s, 4, 1'b1);
    s[2] = 16'hF0F3;
    h  = mk(1'b1, 32'h400, 3, 4, BURST_INCR, 4, 4);
    nb = u_mem.n_byte; ns = u_mem.n_seq; nn = u_mem.n_nonseq; ni = u_mem.n_incr;
    do_write(h, d, s, 1'b0);
    check(u_mem.n_byte - nb == 2, "conservative mode: one byte transfer per strobed byte of a partial word");
    check(u_mem.n_nonseq - nn == 5 && u_mem.n_seq - ns == 11 && u_mem.n_incr - ni == 2,
          "conservative mode: full words merged into bursts of 8, 1 and 5");
    check_mem("conservative write keeps unstrobed bytes");
    do_read(h);

    // 4b. 32-bit master, INCR of 8, only the 4th transfer has two zero
    //     strobes: burst of 3, two byte transfers, burst of 4.
    rand_data(d, s, 2, 1'b1);
    s[3] = 16'h0006;
    h  = mk(1'b1, 32'h600, 7, 2, BURST_INCR, 2, 6);
    nb = u_mem.n_byte; ns = u_mem.n_seq; nn = u_mem.n_nonseq; ni = u_mem.n_incr;
    do_write(h, d, s, 1'b0);
    check(u_mem.n_byte - nb == 2 && u_mem.n_nonseq - nn == 4 && u_mem.n_seq - ns == 5 &&
          u_mem.n_incr - ni == 2, "burst of 8 with a partial 4th word: bursts of 3 and 4 around 2 byte writes");
    check_mem("conservative re-merged write");
    do_read(h);

    // 5. Conservative mode, all strobes set: still one burst.
    rand_data(d, s, 4, 1'b1);
    h  = mk(1'b1, 32'h500, 3, 4, BURST_INCR, 4, 5);
    nb = u_mem.n_byte; nn = u_mem.n_nonseq;
    do_write(h, d, s, 1'b0);
    check(u_mem.n_byte == nb && u_mem.n_nonseq - nn == 1, "conservative full-strobe write is one burst");
    check_mem("conservative full write");

    // 6. Random traffic in both modes.
    for (int t = 0; t < 80; t++) begin
      int mw;
      logic full;
      mw   = 2 + $urandom % 3;
      cons = t[0];
      full = ($urandom % 3) != 0;
      rand_data(d, s, mw, full);
      h = rand_hdr(1'b1, mw, t % 16, 1024);
      do_write(h, d, s, !cons);
      do_read(h);
    end
    check_mem("random traffic");
    check(u_mem.n_busy > 0, "BUSY cycles seen while write data streamed in");
    $display("AHB transfers: nonseq=%0d seq=%0d busy=%0d byte=%0d",
             u_mem.n_nonseq, u_mem.n_seq, u_mem.n_busy, u_mem.n_byte);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
