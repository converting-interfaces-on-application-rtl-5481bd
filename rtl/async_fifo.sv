// async_fifo: dual-clock FIFO that carries flits between an IP's clock domain
// and the NoC clock domain. Every network interface has one per direction,
// because each IP of the SoC runs on its own clock and the NoC on another.
//
// How it works: a memory of DEPTH words is written in the write domain and read
// in the read domain. Each side keeps a binary pointer one bit wider than the
// address and publishes it in Gray code; the other side samples it through a
// two-flop synchronizer. Full and empty are computed from the local pointer and
// the synchronized far pointer, so they are conservative (a word becomes
// visible to the reader three to four read clocks after it is written).
//
// Interface: valid/ready on both sides. wr_ready is "not full", rd_valid is
// "not empty"; rd_data shows the oldest word (first-word fall-through).
// Resets are active low and asynchronous, one per domain.
// The document asks for asynchronous FIFOs in the NIs; the Gray-pointer
// structure and DEPTH are this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4      // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain
  assign wr_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_valid && wr_ready) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wbin[AW-1:0]] <= wr_data;
  end

  // Read domain
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
