// axi_mem: behavioural AXI slave memory for testbenches. It serves one
// transaction at a time (AW, its W beats, then B; or AR then its R beats),
// follows the FIXED/INCR/WRAP address rules, writes only strobed bytes and
// inserts random ready/valid stalls. Every accepted AW and AR is logged
// (log_* arrays) so a testbench can check how a slave NI split a burst.
// The memory wraps at MEMB bytes and starts at zero.
//
// The DDR, FLASH and USB controllers are outside the design; this model only
// stands in for their AXI buses (128 or 32 bits, as in the example SoC), with
// random stalls of this testbench's choosing.
module axi_mem
  import noc_pkg::*;
#(
  parameter int unsigned DW   = 32,
  parameter int unsigned MEMB = 4096
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
  input  logic              rready
);
  localparam int unsigned DWB = DW / 8;
  logic [7:0] mem [MEMB];
  initial for (int i = 0; i < MEMB; i++) mem[i] = 8'h00;

  axi_ax_t log_ax [256];
  logic    log_w  [256];
  int      log_n = 0;
  int      wlast_err = 0;

  typedef enum logic [2:0] {S_IDLE, S_W, S_B, S_R} st_e;
  st_e     st;
  axi_ax_t cur;
  int      beat;
  logic    rnd;

  function automatic logic [31:0] baddr(axi_ax_t x, int m);
    logic [31:0] region, base;
    region = (32'(x.len) + 1) << x.size;
    base   = x.addr & ~(region - 1);
    case (x.burst)
      BURST_FIXED: return x.addr;
      BURST_WRAP:  return base + ((x.addr - base + (32'(m) << x.size)) & (region - 1));
      default:     return (x.addr & ~((32'd1 << x.size) - 1)) + (32'(m) << x.size);
    endcase
  endfunction

  always_ff @(posedge clk) rnd <= ($urandom % 4) != 0;

  assign awready = (st == S_IDLE) && rnd;
  assign arready = (st == S_IDLE) && rnd && !awvalid;
  assign wready  = (st == S_W) && rnd;
  assign bvalid  = (st == S_B);
  assign bid     = cur.id;
  assign bresp   = RESP_OKAY;
  assign rvalid  = (st == S_R) && rnd;
  assign rid     = cur.id;
  assign rresp   = RESP_OKAY;
  assign rlast   = (beat == int'(cur.len));
  always_comb begin
    logic [31:0] a;
    a = baddr(cur, beat) & ~32'(DWB - 1);
    for (int l = 0; l < DWB; l++) rdata[8*l +: 8] = mem[(a + 32'(l)) % MEMB];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      beat <= 0;
      cur  <= '0;
    end else begin
      case (st)
        S_IDLE: begin
          if (awvalid && awready) begin
            cur <= aw; beat <= 0; st <= S_W;
            log_ax[log_n % 256] <= aw; log_w[log_n % 256] <= 1'b1; log_n <= log_n + 1;
          end else if (arvalid && arready) begin
            cur <= ar; beat <= 0; st <= S_R;
            log_ax[log_n % 256] <= ar; log_w[log_n % 256] <= 1'b0; log_n <= log_n + 1;
          end
        end
        S_W: if (wvalid && wready) begin
          logic [31:0] a;
          a = baddr(cur, beat) & ~32'(DWB - 1);
          for (int l = 0; l < DWB; l++)
            if (wstrb[l]) mem[(a + 32'(l)) % MEMB] <= wdata[8*l +: 8];
          if (wlast != (beat == int'(cur.len))) wlast_err <= wlast_err + 1;
          beat <= beat + 1;
          if (wlast) st <= S_B;
        end
        S_B: if (bready) st <= S_IDLE;
        S_R: if (rvalid && rready) begin
          beat <= beat + 1;
          if (rlast) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
