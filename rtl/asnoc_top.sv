// asnoc_top: the application-specific NoC of the example SoC, connecting ten
// AXI master IPs to five slave IPs of three protocols and two data widths.
//
// Structure (as in the document's example platform):
//   Switch 1: Proc 1..4 (AXI 32) and the APB bridge (APB 32)
//   Switch 2: DMA (AXI 32), VOM, VIM, CODEC (AXI 128), DDR (AXI 128) and
//             SDRAM (AHB 32)
//   Switch 3: SD card and JTAG (AXI 32 masters), FLASH and USB (AXI 32 slaves)
//   Request links between switches as the document draws them: Switch 1 to
//   Switch 2, Switch 3 to Switch 2, and Switch 1 to and from Switch 3. The
//   response network uses the same links in the opposite direction.
// So the processors, SD card and JTAG reach every slave, while DMA, VOM,
// VIM and CODEC on Switch 2 reach only DDR and SDRAM (the memories their
// work needs); an assertion checks that they address nothing else.
// Each master IP has a master NI (mni), each slave IP a slave NI (sni_axi,
// sni_ahb or sni_apb). Every IP has its own clock; the NIs cross to the NoC
// clock in asynchronous FIFOs, and all switches share the NoC clock, so no
// FIFO is needed between switches.
//
// This design's choices: requests and responses travel on two separate
// copies of the switch network (same topology, opposite directions), which
// keeps a response from ever waiting behind a request; routing tables that
// send every packet over one direct link; the address map of noc_pkg.
//
// Ports: one AXI slave port per master, indexed by master node number
// (0..3 Proc 1..4, 4 DMA, 5 VOM, 6 VIM, 7 CODEC, 8 SD card, 9 JTAG), with
// 128-bit data fields of which a 32-bit master uses bits 31:0; one AXI master
// port per AXI slave, indexed 0 DDR (128-bit), 1 FLASH, 2 USB (32-bit, bits
// 31:0 used); an AHB-Lite master port to the SDRAM and an APB3 master port to
// the APB bridge. sdram_be_conservative selects the AHB NI's byte-enable
// handling (0 speculative, 1 conservative).
//
// Lint note: rst_n is the asynchronous reset of every flip-flop here and is
// also read, as a plain condition, by the clocked block that holds the
// handshake assertions (they are off during reset); that second use is what
// a linter reports as a reset used both synchronously and asynchronously.
module asnoc_top
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_D = 4,     // depth of each clock-crossing FIFO
  parameter int unsigned BUF_D  = 2      // depth of each switch input buffer
) (
  input  logic              noc_clk,
  input  logic              rst_n,

  // master IPs
  input  logic              m_clk     [NUM_MASTERS],
  input  axi_ax_t           m_aw      [NUM_MASTERS],
  input  logic              m_awvalid [NUM_MASTERS],
  output logic              m_awready [NUM_MASTERS],
  input  logic [127:0]      m_wdata   [NUM_MASTERS],
  input  logic [15:0]       m_wstrb   [NUM_MASTERS],
  input  logic              m_wlast   [NUM_MASTERS],
  input  logic              m_wvalid  [NUM_MASTERS],
  output logic              m_wready  [NUM_MASTERS],
  output logic [TID_W-1:0]  m_bid     [NUM_MASTERS],
  output logic [1:0]        m_bresp   [NUM_MASTERS],
  output logic              m_bvalid  [NUM_MASTERS],
  input  logic              m_bready  [NUM_MASTERS],
  input  axi_ax_t           m_ar      [NUM_MASTERS],
  input  logic              m_arvalid [NUM_MASTERS],
  output logic              m_arready [NUM_MASTERS],
  output logic [TID_W-1:0]  m_rid     [NUM_MASTERS],
  output logic [127:0]      m_rdata   [NUM_MASTERS],
  output logic [1:0]        m_rresp   [NUM_MASTERS],
  output logic              m_rlast   [NUM_MASTERS],
  output logic              m_rvalid  [NUM_MASTERS],
  input  logic              m_rready  [NUM_MASTERS],

  // AXI slave IPs: 0 DDR, 1 FLASH, 2 USB
  input  logic              s_clk     [3],
  output axi_ax_t           s_aw      [3],
  output logic              s_awvalid [3],
  input  logic              s_awready [3],
  output logic [127:0]      s_wdata   [3],
  output logic [15:0]       s_wstrb   [3],
  output logic              s_wlast   [3],
  output logic              s_wvalid  [3],
  input  logic              s_wready  [3],
  input  logic [TID_W-1:0]  s_bid     [3],
  input  logic [1:0]        s_bresp   [3],
  input  logic              s_bvalid  [3],
  output logic              s_bready  [3],
  output axi_ax_t           s_ar      [3],
  output logic              s_arvalid [3],
  input  logic              s_arready [3],
  input  logic [TID_W-1:0]  s_rid     [3],
  input  logic [127:0]      s_rdata   [3],
  input  logic [1:0]        s_rresp   [3],
  input  logic              s_rlast   [3],
  input  logic              s_rvalid  [3],
  output logic              s_rready  [3],

  // SDRAM controller (AHB-Lite, 32-bit)
  input  logic              sdram_clk,
  input  logic              sdram_be_conservative,
  output logic [31:0]       sdram_haddr,
  output logic [1:0]        sdram_htrans,
  output logic              sdram_hwrite,
  output logic [2:0]        sdram_hsize,
  output logic [2:0]        sdram_hburst,
  output logic [31:0]       sdram_hwdata,
  input  logic [31:0]       sdram_hrdata,
  input  logic              sdram_hready,
  input  logic              sdram_hresp,

  // APB bridge (APB3, 32-bit)
  input  logic              apb_clk,
  output logic              apb_psel,
  output logic              apb_penable,
  output logic              apb_pwrite,
  output logic [31:0]       apb_paddr,
  output logic [31:0]       apb_pwdata,
  input  logic [31:0]       apb_prdata,
  input  logic              apb_pready,
  input  logic              apb_pslverr
);
  // Slave node of each AXI slave port.
  localparam logic [NODE_W-1:0] AXI_SID [3] = '{SID_DDR, SID_FLASH, SID_USB};
  localparam int unsigned       AXI_SW  [3] = '{128, 32, 32};

  // ---- NI-side flit links ----
  flit_t m_req_f [NUM_MASTERS];  logic m_req_v [NUM_MASTERS];  logic m_req_r [NUM_MASTERS];
  flit_t m_rsp_f [NUM_MASTERS];  logic m_rsp_v [NUM_MASTERS];  logic m_rsp_r [NUM_MASTERS];
  flit_t s_req_f [NUM_SLAVES];   logic s_req_v [NUM_SLAVES];   logic s_req_r [NUM_SLAVES];
  flit_t s_rsp_f [NUM_SLAVES];   logic s_rsp_v [NUM_SLAVES];   logic s_rsp_r [NUM_SLAVES];

  // ---- master NIs ----
  for (genvar i = 0; i < NUM_MASTERS; i++) begin : g_mni
    localparam int unsigned DW = MASTER_DW[i];
    mni #(.DW(DW), .MID(NODE_W'(i)), .FIFO_D(FIFO_D)) u_mni (
      .clk(m_clk[i]), .rst_n,
      .aw(m_aw[i]), .awvalid(m_awvalid[i]), .awready(m_awready[i]),
      .wdata(m_wdata[i][DW-1:0]), .wstrb(m_wstrb[i][DW/8-1:0]), .wlast(m_wlast[i]),
      .wvalid(m_wvalid[i]), .wready(m_wready[i]),
      .bid(m_bid[i]), .bresp(m_bresp[i]), .bvalid(m_bvalid[i]), .bready(m_bready[i]),
      .ar(m_ar[i]), .arvalid(m_arvalid[i]), .arready(m_arready[i]),
      .rid(m_rid[i]), .rdata(m_rdata[i][DW-1:0]), .rresp(m_rresp[i]), .rlast(m_rlast[i]),
      .rvalid(m_rvalid[i]), .rready(m_rready[i]),
      .noc_clk, .noc_rst_n(rst_n),
      .req_flit(m_req_f[i]), .req_valid(m_req_v[i]), .req_ready(m_req_r[i]),
      .rsp_flit(m_rsp_f[i]), .rsp_valid(m_rsp_v[i]), .rsp_ready(m_rsp_r[i]));
    if (DW < 128) begin : g_pad
      assign m_rdata[i][127:DW] = '0;
    end
  end

  // ---- AXI slave NIs ----
  for (genvar k = 0; k < 3; k++) begin : g_sni_axi
    localparam int unsigned SW = AXI_SW[k];
    localparam int unsigned S  = int'(AXI_SID[k]);
    sni_axi #(.SW(SW), .FIFO_D(FIFO_D)) u_sni (
      .noc_clk, .noc_rst_n(rst_n),
      .req_flit(s_req_f[S]), .req_valid(s_req_v[S]), .req_ready(s_req_r[S]),
      .rsp_flit(s_rsp_f[S]), .rsp_valid(s_rsp_v[S]), .rsp_ready(s_rsp_r[S]),
      .clk(s_clk[k]), .rst_n,
      .aw(s_aw[k]), .awvalid(s_awvalid[k]), .awready(s_awready[k]),
      .wdata(s_wdata[k][SW-1:0]), .wstrb(s_wstrb[k][SW/8-1:0]), .wlast(s_wlast[k]),
      .wvalid(s_wvalid[k]), .wready(s_wready[k]),
      .bid(s_bid[k]), .bresp(s_bresp[k]), .bvalid(s_bvalid[k]), .bready(s_bready[k]),
      .ar(s_ar[k]), .arvalid(s_arvalid[k]), .arready(s_arready[k]),
      .rid(s_rid[k]), .rdata(s_rdata[k][SW-1:0]), .rresp(s_rresp[k]), .rlast(s_rlast[k]),
      .rvalid(s_rvalid[k]), .rready(s_rready[k]));
    if (SW < 128) begin : g_pad
      assign s_wdata[k][127:SW] = '0;
      assign s_wstrb[k][15:SW/8] = '0;
    end
  end

  sni_ahb #(.FIFO_D(FIFO_D)) u_sni_sdram (
    .noc_clk, .noc_rst_n(rst_n),
    .req_flit(s_req_f[int'(SID_SDRAM)]), .req_valid(s_req_v[int'(SID_SDRAM)]), .req_ready(s_req_r[int'(SID_SDRAM)]),
    .rsp_flit(s_rsp_f[int'(SID_SDRAM)]), .rsp_valid(s_rsp_v[int'(SID_SDRAM)]), .rsp_ready(s_rsp_r[int'(SID_SDRAM)]),
    .clk(sdram_clk), .rst_n, .be_conservative(sdram_be_conservative),
    .haddr(sdram_haddr), .htrans(sdram_htrans), .hwrite(sdram_hwrite), .hsize(sdram_hsize),
    .hburst(sdram_hburst), .hwdata(sdram_hwdata), .hrdata(sdram_hrdata),
    .hready(sdram_hready), .hresp(sdram_hresp));

  sni_apb #(.FIFO_D(FIFO_D)) u_sni_apb (
    .noc_clk, .noc_rst_n(rst_n),
    .req_flit(s_req_f[int'(SID_APB)]), .req_valid(s_req_v[int'(SID_APB)]), .req_ready(s_req_r[int'(SID_APB)]),
    .rsp_flit(s_rsp_f[int'(SID_APB)]), .rsp_valid(s_rsp_v[int'(SID_APB)]), .rsp_ready(s_rsp_r[int'(SID_APB)]),
    .clk(apb_clk), .rst_n,
    .psel(apb_psel), .penable(apb_penable), .pwrite(apb_pwrite), .paddr(apb_paddr),
    .pwdata(apb_pwdata), .prdata(apb_prdata), .pready(apb_pready), .pslverr(apb_pslverr));

  // Masters on Switch 2 have request paths to DDR and SDRAM only.
  always_ff @(posedge noc_clk) begin
    for (int i = 4; i < 8; i++)
      if (rst_n && m_req_v[i] && m_req_f[i].head)
        assert (get_hdr(m_req_f[i]).dest == SID_DDR || get_hdr(m_req_f[i]).dest == SID_SDRAM);
  end

  // ---- switch networks ----
  // Inter-switch links: q<from><to> in the request network, p<from><to> in
  // the response network. Requests flow Switch 1 -> 2, Switch 3 -> 2 and
  // both ways between Switch 1 and 3; responses take the reverse links.
  flit_t q12_f, q13_f, q31_f, q32_f;
  logic  q12_v, q13_v, q31_v, q32_v;
  logic  q12_r, q13_r, q31_r, q32_r;
  flit_t p13_f, p21_f, p23_f, p31_f;
  logic  p13_v, p21_v, p23_v, p31_v;
  logic  p13_r, p21_r, p23_r, p31_r;

  // ROUTE nibble n = output port for destination node n (slave nodes in the
  // request network, master nodes in the response network).
  // Switch 1 outputs: 0 APB, 1 to S2, 2 to S3.
  flit_t req_s1_if [5];  logic req_s1_iv [5];  logic req_s1_ir [5];
  flit_t req_s1_of [3];  logic req_s1_ov [3];  logic req_s1_or [3];
  assign req_s1_if[0] = m_req_f[0];  assign req_s1_iv[0] = m_req_v[0];  assign m_req_r[0] = req_s1_ir[0];
  assign req_s1_if[1] = m_req_f[1];  assign req_s1_iv[1] = m_req_v[1];  assign m_req_r[1] = req_s1_ir[1];
  assign req_s1_if[2] = m_req_f[2];  assign req_s1_iv[2] = m_req_v[2];  assign m_req_r[2] = req_s1_ir[2];
  assign req_s1_if[3] = m_req_f[3];  assign req_s1_iv[3] = m_req_v[3];  assign m_req_r[3] = req_s1_ir[3];
  assign req_s1_if[4] = q31_f;  assign req_s1_iv[4] = q31_v;  assign q31_r = req_s1_ir[4];
  assign s_req_f[int'(SID_APB)] = req_s1_of[0];  assign s_req_v[int'(SID_APB)] = req_s1_ov[0];  assign req_s1_or[0] = s_req_r[int'(SID_APB)];
  assign q12_f = req_s1_of[1];  assign q12_v = req_s1_ov[1];  assign req_s1_or[1] = q12_r;
  assign q13_f = req_s1_of[2];  assign q13_v = req_s1_ov[2];  assign req_s1_or[2] = q13_r;
  noc_switch #(.NIN(5), .NOUT(3), .DEPTH(BUF_D), .ROUTE(64'h0000_0000_0002_2110)) u_req_s1 (
    .clk(noc_clk), .rst_n,
    .in_flit(req_s1_if), .in_valid(req_s1_iv), .in_ready(req_s1_ir),
    .out_flit(req_s1_of), .out_valid(req_s1_ov), .out_ready(req_s1_or));

  // Switch 2 outputs: 0 DDR, 1 SDRAM. Switch 2 has no request link to the
  // other switches, so its masters reach only DDR and SDRAM.
  flit_t req_s2_if [6];  logic req_s2_iv [6];  logic req_s2_ir [6];
  flit_t req_s2_of [2];  logic req_s2_ov [2];  logic req_s2_or [2];
  assign req_s2_if[0] = m_req_f[4];  assign req_s2_iv[0] = m_req_v[4];  assign m_req_r[4] = req_s2_ir[0];
  assign req_s2_if[1] = m_req_f[5];  assign req_s2_iv[1] = m_req_v[5];  assign m_req_r[5] = req_s2_ir[1];
  assign req_s2_if[2] = m_req_f[6];  assign req_s2_iv[2] = m_req_v[6];  assign m_req_r[6] = req_s2_ir[2];
  assign req_s2_if[3] = m_req_f[7];  assign req_s2_iv[3] = m_req_v[7];  assign m_req_r[7] = req_s2_ir[3];
  assign req_s2_if[4] = q12_f;  assign req_s2_iv[4] = q12_v;  assign q12_r = req_s2_ir[4];
  assign req_s2_if[5] = q32_f;  assign req_s2_iv[5] = q32_v;  assign q32_r = req_s2_ir[5];
  assign s_req_f[int'(SID_DDR)] = req_s2_of[0];  assign s_req_v[int'(SID_DDR)] = req_s2_ov[0];  assign req_s2_or[0] = s_req_r[int'(SID_DDR)];
  assign s_req_f[int'(SID_SDRAM)] = req_s2_of[1];  assign s_req_v[int'(SID_SDRAM)] = req_s2_ov[1];  assign req_s2_or[1] = s_req_r[int'(SID_SDRAM)];
  noc_switch #(.NIN(6), .NOUT(2), .DEPTH(BUF_D), .ROUTE(64'h0000_0000_0000_0100)) u_req_s2 (
    .clk(noc_clk), .rst_n,
    .in_flit(req_s2_if), .in_valid(req_s2_iv), .in_ready(req_s2_ir),
    .out_flit(req_s2_of), .out_valid(req_s2_ov), .out_ready(req_s2_or));

  // Switch 3 outputs: 0 FLASH, 1 USB, 2 to S1, 3 to S2.
  flit_t req_s3_if [3];  logic req_s3_iv [3];  logic req_s3_ir [3];
  flit_t req_s3_of [4];  logic req_s3_ov [4];  logic req_s3_or [4];
  assign req_s3_if[0] = m_req_f[8];  assign req_s3_iv[0] = m_req_v[8];  assign m_req_r[8] = req_s3_ir[0];
  assign req_s3_if[1] = m_req_f[9];  assign req_s3_iv[1] = m_req_v[9];  assign m_req_r[9] = req_s3_ir[1];
  assign req_s3_if[2] = q13_f;  assign req_s3_iv[2] = q13_v;  assign q13_r = req_s3_ir[2];
  assign s_req_f[int'(SID_FLASH)] = req_s3_of[0];  assign s_req_v[int'(SID_FLASH)] = req_s3_ov[0];  assign req_s3_or[0] = s_req_r[int'(SID_FLASH)];
  assign s_req_f[int'(SID_USB)] = req_s3_of[1];  assign s_req_v[int'(SID_USB)] = req_s3_ov[1];  assign req_s3_or[1] = s_req_r[int'(SID_USB)];
  assign q31_f = req_s3_of[2];  assign q31_v = req_s3_ov[2];  assign req_s3_or[2] = q31_r;
  assign q32_f = req_s3_of[3];  assign q32_v = req_s3_ov[3];  assign req_s3_or[3] = q32_r;
  noc_switch #(.NIN(3), .NOUT(4), .DEPTH(BUF_D), .ROUTE(64'h0000_0000_0001_0332)) u_req_s3 (
    .clk(noc_clk), .rst_n,
    .in_flit(req_s3_if), .in_valid(req_s3_iv), .in_ready(req_s3_ir),
    .out_flit(req_s3_of), .out_valid(req_s3_ov), .out_ready(req_s3_or));

  // Switch 1 outputs: 0..3 Proc 1..4, 4 to S3.
  flit_t rsp_s1_if [3];  logic rsp_s1_iv [3];  logic rsp_s1_ir [3];
  flit_t rsp_s1_of [5];  logic rsp_s1_ov [5];  logic rsp_s1_or [5];
  assign rsp_s1_if[0] = s_rsp_f[int'(SID_APB)];  assign rsp_s1_iv[0] = s_rsp_v[int'(SID_APB)];  assign s_rsp_r[int'(SID_APB)] = rsp_s1_ir[0];
  assign rsp_s1_if[1] = p21_f;  assign rsp_s1_iv[1] = p21_v;  assign p21_r = rsp_s1_ir[1];
  assign rsp_s1_if[2] = p31_f;  assign rsp_s1_iv[2] = p31_v;  assign p31_r = rsp_s1_ir[2];
  assign m_rsp_f[0] = rsp_s1_of[0];  assign m_rsp_v[0] = rsp_s1_ov[0];  assign rsp_s1_or[0] = m_rsp_r[0];
  assign m_rsp_f[1] = rsp_s1_of[1];  assign m_rsp_v[1] = rsp_s1_ov[1];  assign rsp_s1_or[1] = m_rsp_r[1];
  assign m_rsp_f[2] = rsp_s1_of[2];  assign m_rsp_v[2] = rsp_s1_ov[2];  assign rsp_s1_or[2] = m_rsp_r[2];
  assign m_rsp_f[3] = rsp_s1_of[3];  assign m_rsp_v[3] = rsp_s1_ov[3];  assign rsp_s1_or[3] = m_rsp_r[3];
  assign p13_f = rsp_s1_of[4];  assign p13_v = rsp_s1_ov[4];  assign rsp_s1_or[4] = p13_r;
  noc_switch #(.NIN(3), .NOUT(5), .DEPTH(BUF_D), .ROUTE(64'h0000_0044_0000_3210)) u_rsp_s1 (
    .clk(noc_clk), .rst_n,
    .in_flit(rsp_s1_if), .in_valid(rsp_s1_iv), .in_ready(rsp_s1_ir),
    .out_flit(rsp_s1_of), .out_valid(rsp_s1_ov), .out_ready(rsp_s1_or));

  // Switch 2 outputs: 0..3 DMA, VOM, VIM, CODEC, 4 to S1, 5 to S3.
  flit_t rsp_s2_if [2];  logic rsp_s2_iv [2];  logic rsp_s2_ir [2];
  flit_t rsp_s2_of [6];  logic rsp_s2_ov [6];  logic rsp_s2_or [6];
  assign rsp_s2_if[0] = s_rsp_f[int'(SID_DDR)];  assign rsp_s2_iv[0] = s_rsp_v[int'(SID_DDR)];  assign s_rsp_r[int'(SID_DDR)] = rsp_s2_ir[0];
  assign rsp_s2_if[1] = s_rsp_f[int'(SID_SDRAM)];  assign rsp_s2_iv[1] = s_rsp_v[int'(SID_SDRAM)];  assign s_rsp_r[int'(SID_SDRAM)] = rsp_s2_ir[1];
  assign m_rsp_f[4] = rsp_s2_of[0];  assign m_rsp_v[4] = rsp_s2_ov[0];  assign rsp_s2_or[0] = m_rsp_r[4];
  assign m_rsp_f[5] = rsp_s2_of[1];  assign m_rsp_v[5] = rsp_s2_ov[1];  assign rsp_s2_or[1] = m_rsp_r[5];
  assign m_rsp_f[6] = rsp_s2_of[2];  assign m_rsp_v[6] = rsp_s2_ov[2];  assign rsp_s2_or[2] = m_rsp_r[6];
  assign m_rsp_f[7] = rsp_s2_of[3];  assign m_rsp_v[7] = rsp_s2_ov[3];  assign rsp_s2_or[3] = m_rsp_r[7];
  assign p21_f = rsp_s2_of[4];  assign p21_v = rsp_s2_ov[4];  assign rsp_s2_or[4] = p21_r;
  assign p23_f = rsp_s2_of[5];  assign p23_v = rsp_s2_ov[5];  assign rsp_s2_or[5] = p23_r;
  noc_switch #(.NIN(2), .NOUT(6), .DEPTH(BUF_D), .ROUTE(64'h0000_0055_3210_4444)) u_rsp_s2 (
    .clk(noc_clk), .rst_n,
    .in_flit(rsp_s2_if), .in_valid(rsp_s2_iv), .in_ready(rsp_s2_ir),
    .out_flit(rsp_s2_of), .out_valid(rsp_s2_ov), .out_ready(rsp_s2_or));

  // Switch 3 outputs: 0 SD card, 1 JTAG, 2 to S1.
  flit_t rsp_s3_if [4];  logic rsp_s3_iv [4];  logic rsp_s3_ir [4];
  flit_t rsp_s3_of [3];  logic rsp_s3_ov [3];  logic rsp_s3_or [3];
  assign rsp_s3_if[0] = s_rsp_f[int'(SID_FLASH)];  assign rsp_s3_iv[0] = s_rsp_v[int'(SID_FLASH)];  assign s_rsp_r[int'(SID_FLASH)] = rsp_s3_ir[0];
  assign rsp_s3_if[1] = s_rsp_f[int'(SID_USB)];  assign rsp_s3_iv[1] = s_rsp_v[int'(SID_USB)];  assign s_rsp_r[int'(SID_USB)] = rsp_s3_ir[1];
  assign rsp_s3_if[2] = p13_f;  assign rsp_s3_iv[2] = p13_v;  assign p13_r = rsp_s3_ir[2];
  assign rsp_s3_if[3] = p23_f;  assign rsp_s3_iv[3] = p23_v;  assign p23_r = rsp_s3_ir[3];
  assign m_rsp_f[8] = rsp_s3_of[0];  assign m_rsp_v[8] = rsp_s3_ov[0];  assign rsp_s3_or[0] = m_rsp_r[8];
  assign m_rsp_f[9] = rsp_s3_of[1];  assign m_rsp_v[9] = rsp_s3_ov[1];  assign rsp_s3_or[1] = m_rsp_r[9];
  assign p31_f = rsp_s3_of[2];  assign p31_v = rsp_s3_ov[2];  assign rsp_s3_or[2] = p31_r;
  noc_switch #(.NIN(4), .NOUT(3), .DEPTH(BUF_D), .ROUTE(64'h0000_0010_0000_2222)) u_rsp_s3 (
    .clk(noc_clk), .rst_n,
    .in_flit(rsp_s3_if), .in_valid(rsp_s3_iv), .in_ready(rsp_s3_ir),
    .out_flit(rsp_s3_of), .out_valid(rsp_s3_ov), .out_ready(rsp_s3_or));

endmodule
