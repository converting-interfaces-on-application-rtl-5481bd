// sni_axi: slave network interface for an AXI slave IP (DDR 128-bit, FLASH
// and USB 32-bit in the example SoC).
//
// How it works: request flits cross from the NoC clock to the slave clock in
// an asynchronous FIFO. sni_req_engine converts each request to the slave's
// data width and cuts it into AXI bursts of at most 16 beats; this module
// issues one AW (then its W beats) or one AR per burst. Every burst carries
// the same ID, NEW_TID, so the slave completes them in order and the merged
// result needs no reordering: the document's "a slave NI gives a (same) new
// TID to all transactions" choice. B responses are counted against the bursts
// issued and merged (worst response) into one write response; R beats go
// through sni_resp_engine, which packs them back into master-width beats.
// The response packet crosses back to the NoC clock in a second asynchronous
// FIFO. One transaction is in progress at a time (this design's choice).
//
// A write without splitting passes cut-through: a W beat leaves as soon as
// its data flit has arrived. A burst is passed on unchanged (type and length)
// when no width splitting is needed.
//
// Interface: noc_* side carries flits (valid/ready) in the NoC clock domain;
// the AXI master port (AW/W/B/AR/R, valid/ready) is in the slave clock domain.
//
// Lint note: rst_n is the asynchronous reset of every flip-flop here and is
// also read, as a plain condition, by the clocked block that holds the
// handshake assertions (they are off during reset); that second use is what
// a linter reports as a reset used both synchronously and asynchronously.
module sni_axi
  import noc_pkg::*;
#(
  parameter int unsigned      SW        = 128,   // slave data width, bits
  parameter int unsigned      FIFO_D    = 4,
  parameter logic [TID_W-1:0] NEW_TID   = '0
) (
  input  logic              noc_clk,
  input  logic              noc_rst_n,
  input  flit_t             req_flit,
  input  logic              req_valid,
  output logic              req_ready,
  output flit_t             rsp_flit,
  output logic              rsp_valid,
  input  logic              rsp_ready,

  input  logic              clk,
  input  logic              rst_n,
  output axi_ax_t           aw,
  output logic              awvalid,
  input  logic              awready,
  output logic [SW-1:0]     wdata,
  output logic [SW/8-1:0]   wstrb,
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
  input  logic [SW-1:0]     rdata,
  input  logic [1:0]        rresp,
  input  logic              rlast,
  input  logic              rvalid,
  output logic              rready
);
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

  sni_req_engine #(.SW(SW), .MAXB(AXI_MAX_LEN), .PASS_BURST(1'b1), .RD_CHUNK_ONLY(1'b1)) u_req (
    .clk, .rst_n, .conservative(1'b0),
    .req_flit(rq_f), .req_valid(rq_v), .req_ready(rq_r),
    .beat, .beat_valid, .beat_ready,
    .hdr, .ss, .total, .start, .issued, .done);

  // ---- address and write data channels ----
  logic       aw_sent;            // AW of the current write burst accepted
  logic [5:0] bursts, bresps;     // write bursts issued / responses received
  logic [1:0] wr_resp;

  always_comb begin
    aw       = '0;
    aw.id    = NEW_TID;
    aw.addr  = beat.addr;
    aw.len   = 4'(beat.clen - 10'd1);
    aw.size  = beat.size;
    aw.burst = beat.burst;
  end
  assign ar      = aw;
  assign awvalid = beat_valid && beat.write && beat.first && !aw_sent;
  assign wvalid  = beat_valid && beat.write && (aw_sent || !beat.first);
  assign wdata   = beat.wdata[SW-1:0];
  assign wstrb   = beat.wstrb[SW/8-1:0];
  assign wlast   = beat.lastc;
  assign arvalid = beat_valid && !beat.write;
  assign beat_ready = beat.write ? (wvalid && wready) : arready;
  assign bready  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_sent <= 1'b0;
      bursts  <= '0;
      bresps  <= '0;
      wr_resp <= RESP_OKAY;
    end else begin
      if (start) begin
        bursts  <= '0;
        bresps  <= '0;
        wr_resp <= RESP_OKAY;
      end else begin
        if (awvalid && awready) begin
          aw_sent <= 1'b1;
          bursts  <= bursts + 6'd1;
        end
        if (wvalid && wready && wlast) aw_sent <= 1'b0;
        if (bvalid) begin
          bresps  <= bresps + 6'd1;
          wr_resp <= wr_resp | bresp;
        end
      end
    end
  end

  // ---- responses ----
  sni_resp_engine #(.SW(SW)) u_rsp (
    .clk, .rst_n, .hdr, .ss, .total, .start,
    .rbeat_data(NOC_DW'(rdata)), .rbeat_resp(rresp),
    .rbeat_valid(rvalid), .rbeat_ready(rready),
    .wr_done(issued && hdr.write && bresps == bursts),
    .wr_resp(wr_resp),
    .rsp_flit(rs_f), .rsp_valid(rs_v), .rsp_ready(rs_r), .done);

  // All slave-side bursts use one ID, so responses must carry it.
  // AXI: a valid address stays until accepted.
  logic aw_wait;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) aw_wait <= 1'b0;
    else        aw_wait <= awvalid && !awready;
  end
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!bvalid || bid == NEW_TID);
      assert (!rvalid || rid == NEW_TID);
      assert (!aw_wait || awvalid);
    end
  end
endmodule
