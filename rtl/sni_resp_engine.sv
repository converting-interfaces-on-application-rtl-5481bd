// sni_resp_engine: back half of every slave network interface. It builds the
// single response packet the master receives for a transaction, however many
// transfers the slave side needed.
//
// Reads: the header flit goes out first; then every slave read beat is placed
// in the master byte lanes its address selects, and once a master beat is
// complete (2**(size-ss) slave beats on a narrow slave, one beat otherwise) it
// leaves as a data flit. The flit's resp is the worst of its slave beats; the
// last data flit is the tail. This is the merging step of the document's
// slave-NI width conversion: because the slave NI issues all its slave-side
// transactions with one ID and one at a time, the slave returns them in order
// and no reordering is needed.
// Writes: when the back end reports the write complete (wr_done, with the
// merged response of all its slave-side bursts) a one-flit response leaves.
//
// Interface: hdr/ss/total/start come from sni_req_engine; rbeat_* is the
// slave read data stream (valid/ready, data in slave byte lanes); rsp_* is
// the response flit stream; done pulses when the last flit is accepted.
module sni_resp_engine
  import noc_pkg::*;
#(
  parameter int unsigned SW = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  hdr_t              hdr,
  input  logic [2:0]        ss,
  input  logic [9:0]        total,
  input  logic              start,
  input  logic [NOC_DW-1:0] rbeat_data,
  input  logic [1:0]        rbeat_resp,
  input  logic              rbeat_valid,
  output logic              rbeat_ready,
  input  logic              wr_done,
  input  logic [1:0]        wr_resp,
  output flit_t             rsp_flit,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic              done
);
  localparam int unsigned SWB = SW / 8;

  logic              busy;       // transaction in progress
  logic              hdr_sent;
  logic [9:0]        j;          // slave beats received
  logic [NOC_DW-1:0] acc;
  logic [1:0]        acc_resp;
  logic              out_v;
  flit_t             out_f;
  logic [2:0]        lr;
  logic [31:0]       a, alo;
  logic              mlast;      // this slave beat completes a master beat
  hdr_t              rh;

  assign lr    = hdr.size - ss;
  assign a     = beat_addr(hdr, j, ss);
  assign alo   = a & ~((32'd1 << ss) - 32'd1);
  assign mlast = ((j & ((10'd1 << lr) - 10'd1)) == ((10'd1 << lr) - 10'd1));

  always_comb begin
    rh       = '0;
    rh.dest  = hdr.src;
    rh.src   = hdr.dest;
    rh.tid   = hdr.tid;
    rh.write = hdr.write;
    rh.addr  = hdr.addr;
    rh.len   = hdr.len;
    rh.size  = hdr.size;
    rh.burst = hdr.burst;
    rh.mw    = hdr.mw;
    rh.resp  = wr_resp;
  end

  // The beat being received, merged into the partial master beat.
  logic [NOC_DW-1:0] acc_n;
  always_comb begin
    acc_n = acc;
    for (int b = 0; b < NOC_BYTES; b++)
      if (b < (1 << ss))
        acc_n[8*((alo + 32'(b)) & ((32'd1 << hdr.mw) - 32'd1)) +: 8] =
          rbeat_data[8*((alo + 32'(b)) % SWB) +: 8];
  end

  assign rbeat_ready = busy && !hdr.write && hdr_sent && !out_v;
  assign rsp_valid   = out_v;
  assign rsp_flit    = out_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      hdr_sent <= 1'b0;
      j        <= '0;
      acc      <= '0;
      acc_resp <= '0;
      out_v    <= 1'b0;
      out_f    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (out_v && rsp_ready) begin
        out_v <= 1'b0;
        if (out_f.tail) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (start) begin
        busy     <= 1'b1;
        hdr_sent <= 1'b0;
        j        <= '0;
        acc      <= '0;
        acc_resp <= '0;
      end else if (busy && !out_v && !done) begin
        if (hdr.write) begin
          if (wr_done) begin
            out_v <= 1'b1;
            out_f <= make_head(rh, 1'b1);
          end
        end else if (!hdr_sent) begin
          out_v    <= 1'b1;
          out_f    <= make_head(rh, 1'b0);
          hdr_sent <= 1'b1;
        end else if (rbeat_valid) begin
          j <= j + 10'd1;
          if (mlast) begin
            out_v      <= 1'b1;
            out_f      <= '0;
            out_f.data <= acc_n;
            out_f.resp <= acc_resp | rbeat_resp;
            out_f.tail <= (j == total - 10'd1);
            acc        <= '0;
            acc_resp   <= '0;
          end else begin
            acc      <= acc_n;
            acc_resp <= acc_resp | rbeat_resp;
          end
        end
      end
    end
  end
endmodule
