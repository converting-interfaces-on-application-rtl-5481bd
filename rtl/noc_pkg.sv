// noc_pkg: types, node numbering, address map and the data-width conversion
// arithmetic shared by the network interfaces (NIs) and switches of the
// application-specific NoC.
//
// A packet is a sequence of flits. The first flit (head) carries a header in
// the low bits of its data field; write requests and read responses follow it
// with one data flit per master-side beat. Every flit is 128 data bits wide,
// the widest IP data width of the SoC, so a 128-bit master's beat travels in one
// flit. A narrower master's beat sits in the low bits of the flit, in the byte
// lanes it had on the master bus.
//
// Following the document: ten AXI masters (four processors, DMA, VOM, VIM,
// CODEC, SD card, JTAG) and five slaves (APB bridge, DDR, SDRAM, FLASH, USB) on
// three switches, AXI bursts of at most 16 beats, 32- and 128-bit IP widths.
// This design's own choices: the header layout, 4-bit node and transaction IDs,
// the address map and the separate request and response networks.
package noc_pkg;

  localparam int unsigned NOC_DW      = 128;          // flit data bits
  localparam int unsigned NOC_BYTES   = NOC_DW / 8;
  localparam int unsigned NODE_W      = 4;
  localparam int unsigned TID_W       = 4;
  localparam int unsigned AXI_MAX_LEN = 16;           // beats per AXI burst
  localparam int unsigned NUM_MASTERS = 10;
  localparam int unsigned NUM_SLAVES  = 5;

  // Slave node numbers (request network destinations).
  localparam logic [NODE_W-1:0] SID_APB   = 4'd0;
  localparam logic [NODE_W-1:0] SID_DDR   = 4'd1;
  localparam logic [NODE_W-1:0] SID_SDRAM = 4'd2;
  localparam logic [NODE_W-1:0] SID_FLASH = 4'd3;
  localparam logic [NODE_W-1:0] SID_USB   = 4'd4;

  // Master node numbers (response network destinations):
  // 0..3 Proc 1..4, 4 DMA, 5 VOM, 6 VIM, 7 CODEC, 8 SD card, 9 JTAG.
  // Data width of each master IP in bits, indexed by master node number.
  localparam int unsigned MASTER_DW [NUM_MASTERS] =
    '{32, 32, 32, 32, 32, 128, 128, 128, 32, 32};

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  // AXI address channel (AW or AR). len is beats-1, at most 15.
  typedef struct packed {
    logic [TID_W-1:0] id;
    logic [31:0]      addr;
    logic [3:0]       len;
    logic [2:0]       size;
    burst_e           burst;
  } axi_ax_t;

  // Packet header, carried in the low bits of a head flit.
  typedef struct packed {
    logic [NODE_W-1:0] dest;   // slave (request) or master (response) node
    logic [NODE_W-1:0] src;    // master node that issued the transaction
    logic [TID_W-1:0]  tid;    // the master's AXI ID
    logic              write;
    logic [31:0]       addr;
    logic [3:0]        len;    // master beats - 1
    logic [2:0]        size;   // bytes per master beat, log2
    burst_e            burst;
    logic [2:0]        mw;     // master bus width in bytes, log2
    logic [1:0]        resp;   // response packets only
  } hdr_t;

  typedef struct packed {
    logic                 head;
    logic                 tail;
    logic [1:0]           resp;   // read data flits
    logic [NOC_BYTES-1:0] strb;   // write data flits
    logic [NOC_DW-1:0]    data;
  } flit_t;

  // One slave-side beat produced by a slave NI from a request packet, with
  // its data already moved to the slave bus byte lanes.
  typedef struct packed {
    logic [31:0]          addr;
    logic [2:0]           size;
    burst_e               burst;
    logic                 first;   // first beat of a slave-side burst
    logic [9:0]           clen;    // beats in that burst (valid with first)
    logic                 lastc;   // last beat of that burst
    logic                 write;
    logic [NOC_DW-1:0]    wdata;
    logic [NOC_BYTES-1:0] wstrb;
  } sbeat_t;

  localparam int unsigned FLIT_W = $bits(flit_t);
  localparam int unsigned HDR_W  = $bits(hdr_t);

  function automatic flit_t make_head(hdr_t h, logic tail);
    flit_t f;
    f      = '0;
    f.head = 1'b1;
    f.tail = tail;
    f.data[HDR_W-1:0] = h;
    return f;
  endfunction

  function automatic hdr_t get_hdr(flit_t f);
    return hdr_t'(f.data[HDR_W-1:0]);
  endfunction

  // Address map (this design's choice): decoded on address bits 31:28.
  function automatic logic [NODE_W-1:0] addr_decode(logic [31:0] a);
    unique case (a[31:28])
      4'h0, 4'h1, 4'h2, 4'h3: return SID_FLASH;
      4'h4:                   return SID_APB;
      4'h5, 4'h6, 4'h7:       return SID_USB;
      4'h8, 4'h9, 4'hA, 4'hB: return SID_DDR;
      default:                return SID_SDRAM;
    endcase
  endfunction

  // Address of slave-side beat j of a transaction whose master beats of
  // 2**h.size bytes are cut into slave beats of 2**ss bytes (ss <= h.size).
  // Master beat m = j >> (size-ss) follows the AXI burst rules; the start
  // address is taken to be aligned to the transfer size.
  function automatic logic [31:0] beat_addr(hdr_t h, logic [9:0] j, logic [2:0] ss);
    logic [2:0]  lr;
    logic [9:0]  m, k;
    logic [31:0] region, base, am;
    lr     = h.size - ss;
    m      = j >> lr;
    k      = j & ((10'd1 << lr) - 10'd1);
    region = (32'(h.len) + 32'd1) << h.size;
    base   = h.addr & ~(region - 32'd1);
    unique case (h.burst)
      BURST_FIXED: am = h.addr;
      BURST_WRAP:  am = base + ((h.addr - base + (32'(m) << h.size)) & (region - 32'd1));
      default:     am = h.addr + (32'(m) << h.size);
    endcase
    return am + (32'(k) << ss);
  endfunction

  // Number of slave beats, starting at beat j, that form one incrementing
  // burst on the slave side: it ends at the transaction end, at maxb beats,
  // at the wrap point of a wrapping burst, and at the end of a master beat
  // of a fixed burst.
  function automatic logic [9:0] chunk_beats(hdr_t h, logic [9:0] j, logic [2:0] ss,
                                             logic [9:0] total, logic [9:0] maxb);
    logic [9:0]  n, lim;
    logic [2:0]  lr;
    logic [31:0] region, base, a;
    lr     = h.size - ss;
    n      = total - j;
    if (n > maxb) n = maxb;
    region = (32'(h.len) + 32'd1) << h.size;
    base   = h.addr & ~(region - 32'd1);
    a      = beat_addr(h, j, ss);
    unique case (h.burst)
      BURST_WRAP:  lim = 10'((base + region - a) >> ss);
      BURST_FIXED: lim = (10'd1 << lr) - (j & ((10'd1 << lr) - 10'd1));
      default:     lim = n;
    endcase
    if (lim < n) n = lim;
    return n;
  endfunction

endpackage
