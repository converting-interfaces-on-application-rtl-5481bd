// sni_ahb: slave network interface for an AHB slave (the 32-bit SDRAM
// controller of the example SoC). It converts AXI-style requests to AHB-Lite.
//
// Burst length: AHB only has bursts of 4, 8 and 16 besides its undefined-
// length INCR, while AXI allows any length. Following the document's choice,
// each request becomes one undefined-length INCR burst (HBURST = INCR), or a
// SINGLE transfer when it is one beat. The burst is only broken where the
// address sequence is not contiguous: at the wrap point of a wrapping burst
// and between the beats of a fixed burst.
//
// Byte enables: AHB has none. The be_conservative input selects between the
// document's two options:
//  * 0, speculative: strobes are ignored and beats leave cut-through as their
//    data flits arrive; if the next beat's data is not there yet in the middle
//    of a burst, a BUSY transfer is inserted.
//  * 1, conservative: the whole write is stored first (store-and-forward); if
//    every strobe is set it goes out as a burst. Otherwise each word with a
//    zero strobe is written as SINGLE byte transfers of its strobed bytes
//    (unstrobed bytes are left untouched), and each run of consecutive fully
//    strobed words is merged into one INCR burst (SINGLE if the run is one
//    word), as the document suggests for speed.
//
// AHB pipelining: the address phase of a beat overlaps the data phase of the
// previous one; write data is held in a data-phase register. Read data can
// not be stalled on AHB, so a read address phase is issued only while the
// two-entry read buffer has room for it. An ERROR response on any transfer
// makes the packet's response SLVERR; the burst continues.
//
// Interface: flit ports (valid/ready) in the NoC clock domain; AHB-Lite
// master port in the slave clock domain.
//
// Lint note: rst_n is the asynchronous reset of every flip-flop here and is
// also read, as a plain condition, by the clocked block that holds the
// handshake assertions (they are off during reset); that second use is what
// a linter reports as a reset used both synchronously and asynchronously.
module sni_ahb
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_D = 4
) (
  input  logic        noc_clk,
  input  logic        noc_rst_n,
  input  flit_t       req_flit,
  input  logic        req_valid,
  output logic        req_ready,
  output flit_t       rsp_flit,
  output logic        rsp_valid,
  input  logic        rsp_ready,

  input  logic        clk,
  input  logic        rst_n,
  input  logic        be_conservative,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic        hresp
);
  localparam logic [1:0] T_IDLE = 2'b00, T_BUSY = 2'b01, T_NONSEQ = 2'b10, T_SEQ = 2'b11;
  localparam logic [2:0] B_SINGLE = 3'b000, B_INCR = 3'b001;

  flit_t  rq_f, rs_f;
  logic   rq_v, rq_r, rs_v, rs_r;
  sbeat_t beat;
  logic   beat_valid, beat_ready;
  hdr_t   hdr;
  logic [2:0] ss;
  logic [9:0] total;
  logic   start, issued, done;

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_D)) u_req_cdc (
    .wr_clk(noc_clk), .wr_rst_n(noc_rst_n),
    .wr_valid(req_valid), .wr_ready(req_ready), .wr_data(req_flit),
    .rd_clk(clk), .rd_rst_n(rst_n),
    .rd_valid(rq_v), .rd_ready(rq_r), .rd_data(rq_f));

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_D)) u_rsp_cdc (
    .wr_clk(clk), .wr_rst_n(rst_n),
    .wr_valid(rs_v), .wr_ready(rs_r), .wr_data(rs_f),
    .rd_clk(noc_clk), .rd_rst_n(noc_rst_n),
    .rd_valid(rsp_valid), .rd_ready(rsp_ready), .rd_data(rsp_flit));

  sni_req_engine #(.SW(32), .MAXB(1023), .PASS_BURST(1'b0), .RD_CHUNK_ONLY(1'b0)) u_req (
    .clk, .rst_n, .conservative(be_conservative),
    .req_flit(rq_f), .req_valid(rq_v), .req_ready(rq_r),
    .beat, .beat_valid, .beat_ready,
    .hdr, .ss, .total, .start, .issued, .done);

  logic        in_burst;     // a burst has started and its last beat is not out
  logic [2:0]  burst_q;
  logic [31:0] next_addr;
  logic        dp_v, dp_w;   // data phase pending, and its direction
  logic [31:0] dp_wdata;
  logic [1:0]  credit;       // free read buffer entries not yet claimed
  logic        rb_in_v, rb_in_r, rb_v, rb_r;
  logic [32:0] rb_d;
  logic [1:0]  wr_resp;
  logic        can_issue;

  assign can_issue  = beat_valid && (beat.write || credit != 2'd0);
  assign beat_ready = can_issue && hready;

  always_comb begin
    haddr  = next_addr;
    htrans = in_burst ? T_BUSY : T_IDLE;
    hwrite = beat.write;
    hsize  = beat.size;
    hburst = in_burst ? burst_q : B_INCR;
    if (can_issue) begin
      haddr  = beat.addr;
      htrans = beat.first ? T_NONSEQ : T_SEQ;
      hburst = beat.first ? ((beat.clen == 10'd1) ? B_SINGLE : B_INCR) : burst_q;
    end
  end
  assign hwdata = dp_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_burst  <= 1'b0;
      burst_q   <= B_SINGLE;
      next_addr <= '0;
      dp_v      <= 1'b0;
      dp_w      <= 1'b0;
      dp_wdata  <= '0;
      credit    <= 2'd2;
      wr_resp   <= RESP_OKAY;
    end else begin
      if (start) wr_resp <= RESP_OKAY;
      if (hready) begin
        // data phase of the previous address phase completes
        if (dp_v && hresp) wr_resp <= RESP_SLVERR;
        dp_v <= 1'b0;
        if (beat_ready) begin
          dp_v      <= 1'b1;
          dp_w      <= beat.write;
          dp_wdata  <= beat.wdata[31:0];
          next_addr <= beat.addr + (32'd1 << beat.size);
          in_burst  <= !beat.lastc;
          if (beat.first) burst_q <= (beat.clen == 10'd1) ? B_SINGLE : B_INCR;
        end
      end
      credit <= credit - 2'(beat_ready && !beat.write) + 2'(rb_v && rb_r);
    end
  end

  // Read data captured at the end of each read data phase.
  assign rb_in_v = hready && dp_v && !dp_w;
  sync_fifo #(.WIDTH(33), .DEPTH(2)) u_rbuf (
    .clk, .rst_n,
    .in_valid(rb_in_v), .in_ready(rb_in_r), .in_data({hresp, hrdata}),
    .out_valid(rb_v), .out_ready(rb_r), .out_data(rb_d));

  sni_resp_engine #(.SW(32)) u_rsp (
    .clk, .rst_n, .hdr, .ss, .total, .start,
    .rbeat_data(NOC_DW'(rb_d[31:0])), .rbeat_resp(rb_d[32] ? RESP_SLVERR : RESP_OKAY),
    .rbeat_valid(rb_v), .rbeat_ready(rb_r),
    .wr_done(issued && hdr.write && !dp_v),
    .wr_resp(wr_resp),
    .rsp_flit(rs_f), .rsp_valid(rs_v), .rsp_ready(rs_r), .done);

  // The read buffer never overflows: reads are issued against credits.
  // A sequential transfer only follows within a burst.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!rb_in_v || rb_in_r);
      assert (htrans != T_SEQ || in_burst);
    end
  end
endmodule
