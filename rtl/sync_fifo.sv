// sync_fifo: single-clock first-word-fall-through FIFO, used as the input
// buffer of each switch port. Interface is valid/ready on both sides; in_ready
// is "not full" and out_valid "not empty". Push and pop may happen in the same
// cycle. DEPTH is this design's choice (the document gives no buffer sizes).
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;

  assign in_ready  = (cnt < (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (in_valid && in_ready)
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (out_valid && out_ready)
        rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(in_valid && in_ready) - (AW+1)'(out_valid && out_ready);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp] <= in_data;
  end
endmodule
