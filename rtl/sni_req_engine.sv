// sni_req_engine: front half of every slave network interface (SNI). It takes
// one request packet at a time from the network and turns it into the stream
// of slave-side beats that the protocol back end (AXI, AHB or APB) executes.
//
// Data-width conversion happens here, in the slave NI, as the document
// chooses, so the network always carries the master's full-width beats:
//  * narrow slave (master beat wider than the slave bus): each master beat of
//    2**size bytes becomes 2**(size-ss) slave beats of 2**ss bytes, ss being
//    log2 of the slave bus bytes. The slave beats are grouped into
//    incrementing bursts of at most MAXB beats; a group also ends at the wrap
//    point of a wrapping burst (the split shown for a 64-bit master and 32-bit
//    slave in the document) and at the end of each master beat of a fixed
//    burst. With PASS_BURST set and no splitting needed, the master's burst
//    type and length go through unchanged.
//  * wide slave (master bus narrower than the slave bus): every master beat is
//    one slave beat of the same size, moved to the byte lanes its address
//    selects on the slave bus (a narrow transfer on the slave side).
//
// Write data flits are stored in a buffer of 16 master beats as they arrive.
// Normally a slave beat is released as soon as its master beat is stored
// (cut-through). With `conservative` set the whole packet is stored first
// (store-and-forward). If every strobe is set the write goes out as usual.
// Otherwise each slave beat whose strobes are all set stays a normal beat,
// and runs of such consecutive beats are merged into incrementing bursts
// (still ending where a burst would end anyway), while a slave beat with a
// zero strobe is issued as single-byte transfers of its strobed bytes only.
// That is the document's conservative byte-enable option for AHB slaves,
// including its re-merging of fully strobed transfers into bursts;
// speculative mode (conservative = 0) ignores the strobes. A flag per slave
// beat, set as the write data arrives, records whether its strobes are all
// set.
//
// RD_CHUNK_ONLY makes a read emit only the first beat of each slave burst (an
// AXI back end needs one AR per burst, not one per beat).
//
// Interface: req_* is the request flit stream (valid/ready). beat_* is the
// sbeat_t stream to the back end. hdr/ss/total describe the transaction in
// progress for the response side; start pulses when a header is taken,
// issued is high once every beat has been handed out, and done (from the
// response side) ends the transaction. Start addresses are taken to be
// aligned to the transfer size.
module sni_req_engine
  import noc_pkg::*;
#(
  parameter int unsigned SW            = 32,   // slave data width, bits
  parameter int unsigned MAXB          = 16,   // beats per slave-side burst
  parameter bit          PASS_BURST    = 1'b0,
  parameter bit          RD_CHUNK_ONLY = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         conservative,
  input  flit_t        req_flit,
  input  logic         req_valid,
  output logic         req_ready,
  output sbeat_t       beat,
  output logic         beat_valid,
  input  logic         beat_ready,
  output hdr_t         hdr,
  output logic [2:0]   ss,
  output logic [9:0]   total,
  output logic         start,
  output logic         issued,
  input  logic         done
);
  localparam int unsigned SWB  = SW / 8;
  localparam logic [2:0]  SWL  = 3'($clog2(SWB));
  localparam int unsigned NSB  = 16 * NOC_BYTES / SWB;   // most slave beats
  localparam int unsigned SBW  = $clog2(NSB);
  localparam int unsigned RUNMAX = (MAXB < NSB) ? MAXB : NSB;

  typedef enum logic [1:0] {IDLE, RUN, WAIT} st_e;
  st_e st;

  logic [NOC_DW-1:0]    bdata [16];
  logic [NOC_BYTES-1:0] bstrb [16];
  logic [4:0]           wcnt;        // master beats stored
  logic                 any_zero;    // a strobe inside a beat was zero
  logic [9:0]           j;           // next slave beat
  logic [9:0]           cleft;       // beats left in current slave burst
  logic [9:0]           clen_q;
  logic [3:0]           bidx;        // byte within slave beat (byte mode)
  logic                 byte_mode;
  logic [2:0]           lr;
  logic [4:0]           nbeats;      // master beats of the packet
  logic [NSB-1:0]       sfull;       // per slave beat: all strobes set
  logic                 mixed;       // conservative write with a zero strobe

  logic [9:0]  m;
  logic        avail;
  logic [31:0] a, alo;
  logic        whole;       // unsplit pass-through burst
  logic        byte_strb;   // byte mode: current byte is strobed
  logic        step_ok;     // byte mode: current step completes this cycle

  hdr_t hin;
  assign hin    = get_hdr(req_flit);
  assign lr     = hdr.size - ss;
  assign nbeats = 5'(hdr.len) + 5'd1;

  // Stored-data checks: strobes over the bytes a master beat transfers.
  function automatic logic beat_full(logic [NOC_BYTES-1:0] s, logic [31:0] ba,
                                     logic [2:0] size, logic [2:0] mw);
    logic ok;
    logic [31:0] lo;
    ok = 1'b1;
    lo = ba & ~((32'd1 << size) - 32'd1);
    for (int b = 0; b < NOC_BYTES; b++)
      if (b < (1 << size) && !s[(lo + 32'(b)) & ((32'd1 << mw) - 32'd1)]) ok = 1'b0;
    return ok;
  endfunction

  // Strobes over the bytes of one slave beat of 2**ss bytes at address ba.
  function automatic logic slice_full(logic [NOC_BYTES-1:0] s, logic [31:0] ba,
                                      logic [2:0] sz, logic [2:0] mw);
    logic ok;
    logic [31:0] lo;
    ok = 1'b1;
    lo = ba & ~((32'd1 << sz) - 32'd1);
    for (int b = 0; b < SWB; b++)
      if (b < (1 << sz) && !s[(lo + 32'(b)) & ((32'd1 << mw) - 32'd1)]) ok = 1'b0;
    return ok;
  endfunction

  // Length of the run of fully strobed slave beats starting at j0 (which is
  // one), at most n beats.
  function automatic logic [9:0] full_run(logic [NSB-1:0] f, logic [9:0] j0, logic [9:0] n);
    logic [9:0] r;
    logic       go;
    r  = 10'd1;
    go = 1'b1;
    for (int i = 1; i < RUNMAX; i++) begin
      if (go && 10'(i) < n && f[SBW'(j0 + 10'(i))]) r = r + 10'd1;
      else go = 1'b0;
    end
    return r;
  endfunction

  // ---- flit intake ----
  assign req_ready = (st == IDLE) ? 1'b1
                   : (st == RUN && hdr.write && wcnt < nbeats);

  assign start = (st == IDLE) && req_valid && req_flit.head;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      hdr       <= '0;
      ss        <= '0;
      total     <= '0;
      wcnt      <= '0;
      any_zero  <= 1'b0;
      j         <= '0;
      cleft     <= '0;
      clen_q    <= '0;
      bidx      <= '0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          hdr      <= hin;
          ss       <= (hin.size > SWL) ? SWL : hin.size;
          total    <= 10'((5'(hin.len) + 5'd1)) << (hin.size - ((hin.size > SWL) ? SWL : hin.size));
          wcnt     <= '0;
          any_zero <= 1'b0;
          j        <= '0;
          cleft    <= '0;
          bidx     <= '0;
          st       <= RUN;
        end
        RUN: begin
          if (req_valid && req_ready) begin
            wcnt <= wcnt + 5'd1;
            if (!beat_full(req_flit.strb, beat_addr(hdr, 10'(wcnt) << lr, ss), hdr.size, hdr.mw))
              any_zero <= 1'b1;
          end
          if (byte_mode) begin
            if (step_ok) begin
              if (bidx == 4'((1 << ss) - 1)) begin
                bidx <= '0;
                j    <= j + 10'd1;
                if (j == total - 10'd1) st <= WAIT;
              end else begin
                bidx <= bidx + 4'd1;
              end
            end
          end else if (beat_valid && beat_ready) begin
            if (RD_CHUNK_ONLY && !hdr.write) begin
              j     <= j + beat.clen;
              cleft <= '0;
              if (j + beat.clen == total) st <= WAIT;
            end else begin
              j <= j + 10'd1;
              if (beat.first) begin
                cleft  <= beat.clen - 10'd1;
                clen_q <= beat.clen;
              end else begin
                cleft  <= cleft - 10'd1;
              end
              if (j == total - 10'd1) st <= WAIT;
            end
          end
        end
        WAIT: if (done) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == RUN && req_valid && req_ready) begin
      bdata[wcnt[3:0]] <= req_flit.data;
      bstrb[wcnt[3:0]] <= req_flit.strb;
      for (int k = 0; k < NOC_BYTES / SWB; k++)
        if (k < (1 << lr))
          sfull[SBW'((10'(wcnt) << lr) + 10'(k))] <=
            slice_full(req_flit.strb, beat_addr(hdr, (10'(wcnt) << lr) + 10'(k), ss), ss, hdr.mw);
    end
  end

  // ---- beat generation ----

  assign m         = j >> lr;
  assign avail     = !hdr.write ? 1'b1
                   : conservative ? (wcnt == nbeats)
                   : (m < 10'(wcnt));
  assign mixed     = (st == RUN) && hdr.write && conservative && (wcnt == nbeats) && any_zero;
  assign byte_mode = mixed && !sfull[SBW'(j)];
  assign a         = beat_addr(hdr, j, ss);
  assign alo       = a & ~((32'd1 << ss) - 32'd1);
  assign whole     = PASS_BURST && (lr == 3'd0);
  assign byte_strb = bstrb[m[3:0]][(alo + 32'(bidx)) & ((32'd1 << hdr.mw) - 32'd1)];
  assign step_ok   = !byte_strb || beat_ready;

  always_comb begin
    beat       = '0;
    beat_valid = 1'b0;
    beat.write = hdr.write;
    if (st == RUN && avail) begin
      if (byte_mode) begin
        // one single-byte transfer per strobed byte
        beat_valid  = byte_strb;
        beat.addr   = alo + 32'(bidx);
        beat.size   = 3'd0;
        beat.burst  = BURST_INCR;
        beat.first  = 1'b1;
        beat.clen   = 10'd1;
        beat.lastc  = 1'b1;
        beat.wdata[8*((alo + 32'(bidx)) % SWB) +: 8] =
          bdata[m[3:0]][8*((alo + 32'(bidx)) & ((32'd1 << hdr.mw) - 32'd1)) +: 8];
        beat.wstrb[(alo + 32'(bidx)) % SWB] = 1'b1;
      end else begin
        beat_valid = 1'b1;
        beat.addr  = a;
        beat.size  = ss;
        beat.first = (cleft == 10'd0);
        if (whole) begin
          beat.burst = hdr.burst;
          beat.clen  = total;
        end else begin
          beat.burst = BURST_INCR;
          beat.clen  = !beat.first ? clen_q
                     : mixed ? full_run(sfull, j, chunk_beats(hdr, j, ss, total, 10'(MAXB)))
                     : chunk_beats(hdr, j, ss, total, 10'(MAXB));
        end
        beat.lastc = beat.first ? (beat.clen == 10'd1) : (cleft == 10'd1);
        if (hdr.write) begin
          for (int b = 0; b < NOC_BYTES; b++) begin
            if (b < (1 << ss)) begin
              beat.wdata[8*((alo + 32'(b)) % SWB) +: 8] =
                bdata[m[3:0]][8*((alo + 32'(b)) & ((32'd1 << hdr.mw) - 32'd1)) +: 8];
              beat.wstrb[(alo + 32'(b)) % SWB] =
                bstrb[m[3:0]][(alo + 32'(b)) & ((32'd1 << hdr.mw) - 32'd1)];
            end
          end
        end
      end
    end
  end

  assign issued = (st == WAIT);
endmodule
