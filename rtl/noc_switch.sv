// noc_switch: wormhole packet switch of the ASNoC (Switch 1, 2 and 3 of the
// example SoC, one copy in the request network and one in the response
// network).
//
// How it works: every input port has a small FIFO. When the flit at the head
// of an input FIFO is a head flit, the destination node in its header selects
// an output port through the ROUTE table (ROUTE[dest] = output port). Each
// output port has a round-robin arbiter over the inputs that request it; the
// winner owns the output until the packet's tail flit has passed, so the flits
// of one packet are never interleaved with another's. A flit moves from an
// input FIFO to an output in the cycle the output's ready is high, so the
// switch adds one cycle of latency plus any waiting for arbitration.
//
// Interface: NIN input and NOUT output flit ports with valid/ready.
// The document names the switches and shows which IPs and switches connect to
// which; wormhole switching, round-robin arbitration, table routing and the
// buffer depth are this design's choices.
//
// Lint note: rst_n is the asynchronous reset of every flip-flop here and is
// also read, as a plain condition, by the clocked block that holds the
// handshake assertions (they are off during reset); that second use is what
// a linter reports as a reset used both synchronously and asynchronously.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned NIN   = 6,
  parameter int unsigned NOUT  = 3,
  parameter int unsigned DEPTH = 2,
  // output port for each destination node number (16 nodes, 4 bits each)
  parameter logic [15:0][3:0] ROUTE = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit  [NIN],
  input  logic  in_valid [NIN],
  output logic  in_ready [NIN],
  output flit_t out_flit  [NOUT],
  output logic  out_valid [NOUT],
  input  logic  out_ready [NOUT]
);
  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1;

  flit_t            q_flit  [NIN];
  logic             q_valid [NIN];
  logic             q_ready [NIN];
  logic [3:0]       q_port  [NIN];

  logic             busy    [NOUT];
  logic [IW-1:0]    owner   [NOUT];
  logic [IW-1:0]    rr_last [NOUT];
  logic             gnt_v   [NOUT];
  logic [IW-1:0]    gnt_i   [NOUT];

  for (genvar i = 0; i < NIN; i++) begin : g_in
    sync_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]), .in_ready (in_ready[i]), .in_data (in_flit[i]),
      .out_valid(q_valid[i]),  .out_ready(q_ready[i]),  .out_data(q_flit[i])
    );
    assign q_port[i] = ROUTE[get_hdr(q_flit[i]).dest];
  end

  // Arbitration: a free output grants the first requesting input after the
  // last one it served.
  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      gnt_v[o] = 1'b0;
      gnt_i[o] = '0;
      for (int n = 1; n <= NIN; n++) begin
        int unsigned i;
        i = (int'(rr_last[o]) + n) % NIN;
        if (!gnt_v[o] && q_valid[i] && q_flit[i].head && q_port[i] == 4'(o) && !input_busy(IW'(i))) begin
          gnt_v[o] = 1'b1;
          gnt_i[o] = IW'(i);
        end
      end
    end
  end

  // An input that already owns an output must not be granted another one.
  function automatic logic input_busy(logic [IW-1:0] i);
    logic r;
    r = 1'b0;
    for (int o = 0; o < NOUT; o++)
      if (busy[o] && owner[o] == i) r = 1'b1;
    return r;
  endfunction

  // Output multiplexers and input pops.
  always_comb begin
    for (int i = 0; i < NIN; i++) q_ready[i] = 1'b0;
    for (int o = 0; o < NOUT; o++) begin
      out_valid[o] = busy[o] && q_valid[owner[o]];
      out_flit[o]  = q_flit[owner[o]];
      if (busy[o] && out_ready[o]) q_ready[owner[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NOUT; o++) begin
        busy[o]    <= 1'b0;
        owner[o]   <= '0;
        rr_last[o] <= IW'(NIN-1);
      end
    end else begin
      for (int o = 0; o < NOUT; o++) begin
        if (busy[o]) begin
          if (q_valid[owner[o]] && out_ready[o] && q_flit[owner[o]].tail)
            busy[o] <= 1'b0;
        end else if (gnt_v[o]) begin
          busy[o]    <= 1'b1;
          owner[o]   <= gnt_i[o];
          rr_last[o] <= gnt_i[o];
        end
      end
    end
  end

  // Flits leave an output only while a packet owns it.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int o = 0; o < NOUT; o++)
        assert (!out_valid[o] || busy[o]);
  end
endmodule
