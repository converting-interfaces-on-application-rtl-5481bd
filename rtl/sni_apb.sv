// sni_apb: slave network interface for the APB bridge (32-bit APB).
//
// APB has neither bursts nor byte enables nor narrow transfers, so every
// slave beat that sni_req_engine produces (one per 32-bit word, after width
// conversion from a 128-bit master if needed) becomes one APB transfer: a
// setup cycle (psel) followed by access cycles (psel, penable) until pready.
// A narrow write from the master is sent as a full-word APB write carrying
// the master's bytes in their lanes and zeros in the other lanes (this
// design's choice); following the document, the APB slave
// is expected to perform the access regardless of the original data width.
// Read words are handed to sni_resp_engine, which packs them into the
// master's beats; pslverr of any transfer makes the response SLVERR.
//
// Interface: flit ports (valid/ready) in the NoC clock domain, APB3 master
// port in the APB clock domain. The address is word aligned on paddr.
//
// Lint note: rst_n is the asynchronous reset of every flip-flop here and is
// also read, as a plain condition, by the clocked block that holds the
// handshake assertions (they are off during reset); that second use is what
// a linter reports as a reset used both synchronously and asynchronously.
module sni_apb
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
  output logic        psel,
  output logic        penable,
  output logic        pwrite,
  output logic [31:0] paddr,
  output logic [31:0] pwdata,
  input  logic [31:0] prdata,
  input  logic        pready,
  input  logic        pslverr
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

  sni_req_engine #(.SW(32), .MAXB(1), .PASS_BURST(1'b0), .RD_CHUNK_ONLY(1'b0)) u_req (
    .clk, .rst_n, .conservative(1'b0),
    .req_flit(rq_f), .req_valid(rq_v), .req_ready(rq_r),
    .beat, .beat_valid, .beat_ready,
    .hdr, .ss, .total, .start, .issued, .done);

  typedef enum logic [1:0] {P_IDLE, P_SETUP, P_ACCESS} pst_e;
  pst_e        pst;
  logic        rd_v;        // captured read word waiting for the packer
  logic [31:0] rd_d;
  logic [1:0]  rd_resp;
  logic        rd_take;
  logic [1:0]  wr_resp;

  assign psel       = (pst != P_IDLE);
  assign penable    = (pst == P_ACCESS);
  assign pwrite     = beat.write;
  assign paddr      = {beat.addr[31:2], 2'b00};
  assign pwdata     = beat.wdata[31:0];
  assign beat_ready = (pst == P_ACCESS) && pready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst     <= P_IDLE;
      rd_v    <= 1'b0;
      rd_d    <= '0;
      rd_resp <= RESP_OKAY;
      wr_resp <= RESP_OKAY;
    end else begin
      if (rd_take) rd_v <= 1'b0;
      if (start) wr_resp <= RESP_OKAY;
      unique case (pst)
        P_IDLE:   if (beat_valid && !rd_v) pst <= P_SETUP;
        P_SETUP:  pst <= P_ACCESS;
        P_ACCESS: if (pready) begin
          pst <= P_IDLE;
          if (beat.write) begin
            if (pslverr) wr_resp <= RESP_SLVERR;
          end else begin
            rd_v    <= 1'b1;
            rd_d    <= prdata;
            rd_resp <= pslverr ? RESP_SLVERR : RESP_OKAY;
          end
        end
        default: pst <= P_IDLE;
      endcase
    end
  end

  sni_resp_engine #(.SW(32)) u_rsp (
    .clk, .rst_n, .hdr, .ss, .total, .start,
    .rbeat_data(NOC_DW'(rd_d)), .rbeat_resp(rd_resp),
    .rbeat_valid(rd_v), .rbeat_ready(rd_take),
    .wr_done(issued && hdr.write && pst == P_IDLE),
    .wr_resp(wr_resp),
    .rsp_flit(rs_f), .rsp_valid(rs_v), .rsp_ready(rs_r), .done);

  // APB: address, control and data hold through the access phase.
  // (the beat is only popped at the end of the access phase)
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(penable && !psel));
  end
endmodule
