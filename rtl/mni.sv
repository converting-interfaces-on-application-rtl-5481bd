// mni: master network interface for an AXI master IP (32-bit processors,
// DMA, SD card and JTAG; 128-bit VOM, VIM and CODEC in the example SoC).
//
// How it works: the NI is an AXI slave towards its master IP. An accepted AW
// or AR becomes the head flit of a request packet: the address map gives the
// destination slave node, and the header records this master's node number
// (MID), the AXI ID, address, length, size, burst type and the master's bus
// width. A write then sends each W beat as one data flit, the last one being
// the packet tail, as soon as the master provides it (cut-through). Width
// conversion is left to the slave NI, so the network carries full master
// beats. AW and AR take turns when both wait.
//
// Responses arrive as packets: a one-flit write response becomes a B beat,
// and a read response header is followed by data flits that become R beats,
// the tail flit setting RLAST. IDs come back in the header.
//
// Ordering: AXI lets responses with the same ID finish in issue order only.
// The network delivers the packets between two nodes in order and every
// slave NI serves its requests in order, so the NI keeps order by letting
// a read (write) go to a new destination only when no read (write) is
// outstanding; up to MAX_OUT may be outstanding to one destination. This rule
// and MAX_OUT are this design's choice.
//
// Interface: AXI slave port (valid/ready, AXI3 lengths of at most 16 beats)
// in the master's clock domain; request and response flit ports (valid/ready)
// in the NoC clock domain, crossing in asynchronous FIFOs.
//
// Lint note: rst_n is the asynchronous reset of every flip-flop here and is
// also read, as a plain condition, by the clocked block that holds the
// handshake assertions (they are off during reset); that second use is what
// a linter reports as a reset used both synchronously and asynchronously.
module mni
  import noc_pkg::*;
#(
  parameter int unsigned       DW      = 32,       // master data width, bits
  parameter logic [NODE_W-1:0] MID     = '0,       // this master's node number
  parameter int unsigned       MAX_OUT = 4,
  parameter int unsigned       FIFO_D  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axi_ax_t           aw,
  input  logic              awvalid,
  output logic              awready,
  input  logic [DW-1:0]     wdata,
  input  logic [DW/8-1:0]   wstrb,
  input  logic              wlast,
  input  logic              wvalid,
  output logic              wready,
  output logic [TID_W-1:0]  bid,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  axi_ax_t           ar,
  input  logic              arvalid,
  output logic              arready,
  output logic [TID_W-1:0]  rid,
  output logic [DW-1:0]     rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready,

  input  logic              noc_clk,
  input  logic              noc_rst_n,
  output flit_t             req_flit,
  output logic              req_valid,
  input  logic              req_ready,
  input  flit_t             rsp_flit,
  input  logic              rsp_valid,
  output logic              rsp_ready
);
  localparam logic [2:0] MW = 3'($clog2(DW/8));
  localparam int unsigned CW = $clog2(MAX_OUT + 1);

  flit_t rq_f, rs_f;
  logic  rq_v, rq_r, rs_v, rs_r;

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_D)) u_req_cdc (
    .wr_clk(clk), .wr_rst_n(rst_n),
    .wr_valid(rq_v), .wr_ready(rq_r), .wr_data(rq_f),
    .rd_clk(noc_clk), .rd_rst_n(noc_rst_n),
    .rd_valid(req_valid), .rd_ready(req_ready), .rd_data(req_flit));

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_D)) u_rsp_cdc (
    .wr_clk(noc_clk), .wr_rst_n(noc_rst_n),
    .wr_valid(rsp_valid), .wr_ready(rsp_ready), .wr_data(rsp_flit),
    .rd_clk(clk), .rd_rst_n(rst_n),
    .rd_valid(rs_v), .rd_ready(rs_r), .rd_data(rs_f));

  // ---- request side ----
  logic              wdata_phase;     // sending the W beats of a write
  logic              prefer_r;        // AR wins the next tie
  logic [CW-1:0]     wout, rout;      // outstanding writes / reads
  logic [NODE_W-1:0] wdest, rdest;    // their destination
  logic              w_ok, r_ok, take_w, take_r;
  hdr_t              h;

  assign w_ok   = awvalid && ((wout == '0) || (wout < CW'(MAX_OUT) && wdest == addr_decode(aw.addr)));
  assign r_ok   = arvalid && ((rout == '0) || (rout < CW'(MAX_OUT) && rdest == addr_decode(ar.addr)));
  assign take_w = !wdata_phase && w_ok && (!r_ok || !prefer_r);
  assign take_r = !wdata_phase && r_ok && !take_w;

  always_comb begin
    axi_ax_t x;
    x       = take_w ? aw : ar;
    h       = '0;
    h.dest  = addr_decode(x.addr);
    h.src   = MID;
    h.tid   = x.id;
    h.write = take_w;
    h.addr  = x.addr;
    h.len   = x.len;
    h.size  = x.size;
    h.burst = x.burst;
    h.mw    = MW;
    rq_f    = make_head(h, take_r);
    rq_v    = take_w || take_r;
    if (wdata_phase) begin
      rq_f      = '0;
      rq_f.tail = wlast;
      rq_f.data = NOC_DW'(wdata);
      rq_f.strb = NOC_BYTES'(wstrb);
      rq_v      = wvalid;
    end
  end

  assign awready = take_w && rq_r;
  assign arready = take_r && rq_r;
  assign wready  = wdata_phase && rq_r;

  // ---- response side ----
  logic rdata_phase;
  hdr_t rh;
  assign rh = get_hdr(rs_f);

  assign bvalid = rs_v && !rdata_phase && rs_f.head && rh.write;
  assign bid    = rh.tid;
  assign bresp  = rh.resp;
  assign rvalid = rs_v && rdata_phase;
  assign rdata  = rs_f.data[DW-1:0];
  assign rresp  = rs_f.resp;
  assign rlast  = rs_f.tail;
  assign rs_r   = rdata_phase ? rready
                : (rs_f.head && rh.write) ? bready
                : 1'b1;                       // read header: just consumed

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wdata_phase <= 1'b0;
      prefer_r    <= 1'b0;
      wout        <= '0;
      rout        <= '0;
      wdest       <= '0;
      rdest       <= '0;
      rdata_phase <= 1'b0;
      rid         <= '0;
    end else begin
      if (awready) begin
        wdata_phase <= 1'b1;
        wdest       <= h.dest;
        prefer_r    <= 1'b1;
      end
      if (arready) begin
        rdest    <= h.dest;
        prefer_r <= 1'b0;
      end
      if (wvalid && wready && wlast) wdata_phase <= 1'b0;
      wout <= wout + CW'(awready) - CW'(bvalid && bready);
      rout <= rout + CW'(arready) - CW'(rvalid && rready && rlast);
      if (rs_v && !rdata_phase && rs_f.head && !rh.write) begin
        rdata_phase <= 1'b1;
        rid         <= rh.tid;
      end
      if (rvalid && rready && rlast) rdata_phase <= 1'b0;
    end
  end

  // AXI handshake rules on the master's side of the port.
  logic aw_wait, ar_wait, r_wait;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_wait <= 1'b0;
      ar_wait <= 1'b0;
      r_wait  <= 1'b0;
    end else begin
      aw_wait <= awvalid && !awready;
      ar_wait <= arvalid && !arready;
      r_wait  <= rvalid && !rready;
    end
  end
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!aw_wait || awvalid);
      assert (!ar_wait || arvalid);
      assert (!r_wait || rvalid);
    end
  end
endmodule
