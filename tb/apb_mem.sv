// apb_mem: behavioural APB3 slave memory of 32-bit words for testbenches.
// It stretches each access phase by 0..2 random cycles, writes or reads a
// whole word, and signals PSLVERR for addresses with bit ERR_BIT set (no
// write happens then). It counts the transfers it completes.
//
// The APB peripherals are outside the design; this model only stands in for
// the 32-bit APB3 bus behind the bridge, with random wait states and an error
// address bit of this testbench's choosing.
module apb_mem #(
  parameter int unsigned MEMB    = 4096,
  parameter int unsigned ERR_BIT = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr
);
  logic [7:0] mem [MEMB];
  initial for (int i = 0; i < MEMB; i++) mem[i] = 8'h00;
  int n_xfer = 0;
  int wait_n;

  assign pready  = psel && penable && wait_n == 0;
  assign pslverr = pready && paddr[ERR_BIT];
  always_comb
    for (int l = 0; l < 4; l++) prdata[8*l +: 8] = mem[((paddr & ~32'd3) + 32'(l)) % MEMB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_n <= 0;
    end else begin
      if (psel && !penable) wait_n <= int'($urandom % 3);
      else if (psel && penable && wait_n != 0) wait_n <= wait_n - 1;
      if (pready) begin
        n_xfer <= n_xfer + 1;
        if (pwrite && !paddr[ERR_BIT])
          for (int l = 0; l < 4; l++) mem[((paddr & ~32'd3) + 32'(l)) % MEMB] <= pwdata[8*l +: 8];
      end
    end
  end
endmodule
