// tb_noc_switch: self-checking testbench of the wormhole switch with 4 inputs
// and 3 outputs. Each input sends random packets (1 to 5 flits) to random
// destinations; the route table maps destinations 0..5 to outputs
// {0,1,2,0,1,2}. Each output must deliver whole packets, unmixed, in the
// order each input sent them, on the port the route table names. Random
// backpressure is applied on the outputs. Arbitration conflicts (two inputs
// wanting one free output) are counted and must occur.
//
// The switch's routing and arbitration are this design's own, so every check
// here is against this design's rules, not the document's.
module tb_noc_switch;
  import noc_pkg::*;
  localparam int NIN = 4, NOUT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  flit_t in_flit [NIN];  logic in_valid [NIN];  logic in_ready [NIN];
  flit_t out_flit [NOUT]; logic out_valid [NOUT]; logic out_ready [NOUT];
  int checks = 0, failures = 0;
  int conflicts = 0;
  int sent [NIN], recvd [NIN];
  flit_t exp_q [NIN][NOUT][$];   // expected flits per (input, output)
  int    cur_src [NOUT];          // input owning the packet on an output
  logic  stop = 1'b0;

  always #5 clk = ~clk;

  noc_switch #(.NIN(NIN), .NOUT(NOUT), .DEPTH(2), .ROUTE(64'h0000_0000_0021_0210)) u_dut (
    .clk, .rst_n, .in_flit, .in_valid, .in_ready, .out_flit, .out_valid, .out_ready);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: random ready, check each flit against its source's queue.
  always @(negedge clk) begin
    for (int o = 0; o < NOUT; o++) out_ready[o] = ($urandom % 4) != 0;
    #1;
    for (int o = 0; o < NOUT; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        int s;
        f = out_flit[o];
        if (f.head) cur_src[o] = int'(f.data[7:0]);   // source id in payload
        s = cur_src[o];
        if (exp_q[s][o].size() == 0) begin
          check(1'b0, $sformatf("unexpected flit on output %0d", o));
        end else begin
          flit_t e;
          e = exp_q[s][o].pop_front();
          check(f == e, $sformatf("output %0d flit from input %0d", o, s));
          if (f.tail) recvd[s]++;
        end
      end
    end
    // conflicts: two inputs with head flits for the same free output
    for (int o = 0; o < NOUT; o++) begin
      int n;
      n = 0;
      for (int i = 0; i < NIN; i++)
        if (u_dut.q_valid[i] && u_dut.q_flit[i].head && u_dut.q_port[i] == 4'(o)) n++;
      if (n > 1 && !u_dut.busy[o]) conflicts++;
    end
  end

  // One sender per input.
  for (genvar i = 0; i < NIN; i++) begin : g_src
    initial begin
      in_valid[i] = 1'b0;
      in_flit[i]  = '0;
      sent[i] = 0; recvd[i] = 0;
      wait (rst_n);
      while (!stop) begin
        hdr_t h;
        int len, dst, o;
        dst = (i == 0 || stop) ? 0 : $urandom % 6;
        if (sent[i] >= 150) dst = 0;
        len = 1 + $urandom % 5;
        o   = dst % 3;
        h = '0;
        h.dest = 4'(dst);
        for (int k = 0; k < len; k++) begin
          flit_t f;
          f = (k == 0) ? make_head(h, len == 1) : '0;
          f.tail = (k == len - 1);
          f.data[7:0] = 8'(i);
          if (k > 0) f.data[127:8] = {$urandom, $urandom, $urandom, 24'($urandom)};
          else       f.data[127:96] = $urandom;
          exp_q[i][o].push_back(f);
          @(negedge clk);
          in_flit[i] = f; in_valid[i] = 1'b1; #1;
          while (!in_ready[i]) begin @(negedge clk); #1; end
          @(posedge clk); #1;
          in_valid[i] = 1'b0;
        end
        sent[i]++;
        if (sent[i] >= 200) break;
      end
    end
  end

  initial begin
    for (int o = 0; o < NOUT; o++) cur_src[o] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (sent[0] >= 200 && sent[1] >= 200 && sent[2] >= 200 && sent[3] >= 200);
    repeat (200) @(posedge clk);
    for (int i = 0; i < NIN; i++) begin
      check(recvd[i] == sent[i], $sformatf("input %0d: %0d of %0d packets delivered", i, recvd[i], sent[i]));
      for (int o = 0; o < NOUT; o++)
        check(exp_q[i][o].size() == 0, $sformatf("input %0d output %0d queue empty", i, o));
    end
    check(conflicts > 0, $sformatf("%0d arbitration conflicts", conflicts));
    $display("conflicts=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
