// ahb_mem: behavioural AHB-Lite slave memory for testbenches. It captures an
// address phase whenever HTRANS is NONSEQ or SEQ and HREADY is high, inserts
// 0..2 random wait states in each data phase, writes the bytes HSIZE and the
// address select and returns read data from the byte lanes. It counts the
// transfer types it sees, including single-byte transfers and BUSY cycles.
// The memory wraps at MEMB bytes and starts at zero.
//
// The SDRAM controller itself is outside the design; this model only stands
// in for its 32-bit AHB-Lite bus, with random wait states of this testbench's
// choosing.
module ahb_mem #(
  parameter int unsigned MEMB = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [2:0]  hburst,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic        hresp
);
  logic [7:0] mem [MEMB];
  initial for (int i = 0; i < MEMB; i++) mem[i] = 8'h00;

  int n_nonseq = 0, n_seq = 0, n_busy = 0, n_byte = 0, n_incr = 0, n_single = 0;

  logic        dp_v, dp_w;
  logic [31:0] dp_a;
  logic [2:0]  dp_s;
  int          wait_n;

  assign hready = !(dp_v && wait_n != 0);
  assign hresp  = 1'b0;
  always_comb begin
    logic [31:0] a;
    a = dp_a & ~32'd3;
    for (int l = 0; l < 4; l++) hrdata[8*l +: 8] = mem[(a + 32'(l)) % MEMB];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_v   <= 1'b0;
      dp_w   <= 1'b0;
      dp_a   <= '0;
      dp_s   <= '0;
      wait_n <= 0;
    end else begin
      if (dp_v && wait_n != 0) wait_n <= wait_n - 1;
      if (hready) begin
        if (dp_v && dp_w)
          for (int b = 0; b < 4; b++)
            if (b < (1 << dp_s))
              mem[((dp_a & ~((32'd1 << dp_s) - 1)) + 32'(b)) % MEMB] <=
                hwdata[8*(((dp_a & ~((32'd1 << dp_s) - 1)) + 32'(b)) % 4) +: 8];
        dp_v <= htrans[1];
        if (htrans[1]) begin
          dp_w   <= hwrite;
          dp_a   <= haddr;
          dp_s   <= hsize;
          wait_n <= int'($urandom % 3);
          if (htrans == 2'b10) n_nonseq <= n_nonseq + 1; else n_seq <= n_seq + 1;
          if (htrans == 2'b10 && hburst == 3'b001) n_incr <= n_incr + 1;
          if (htrans == 2'b10 && hburst == 3'b000) n_single <= n_single + 1;
          if (hsize == 3'd0) n_byte <= n_byte + 1;
        end
        if (htrans == 2'b01) n_busy <= n_busy + 1;
      end
    end
  end
endmodule
