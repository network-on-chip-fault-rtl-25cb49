// tb_noc_router_core: one router core at (1,1) of a mesh. Each of the five
// input ports sends random multi-flit packets to random destinations in a
// 4 x 4 space; each output port accepts at random. A scoreboard checks that
// every flit leaves on the XY output port for its destination, in order per
// input, without interleaving two packets on one output (wormhole lock), and
// with no CRC error; then that a flit corrupted in a FIFO by fault_mask is
// flagged on pop_err when it leaves. Also checks the one-cycle hop latency
// and counts output contention (two inputs wanting one output).
module tb_noc_router_core;
  import noc_pkg::*;

  localparam int MX = 1, MY = 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS], pop_flit [NPORTS];
  logic [FLIT_W-1:0] fault_mask [NPORTS];
  logic  pop_err [NPORTS];
  logic  busy;

  noc_router_core #(.MY_X(MX), .MY_Y(MY), .FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic port_e xy(flit_t f);
    if (f.dst_x > MX) return P_EAST;
    if (f.dst_x < MX) return P_WEST;
    if (f.dst_y > MY) return P_NORTH;
    if (f.dst_y < MY) return P_SOUTH;
    return P_LOCAL;
  endfunction

  // Data word tags the flit: [31:29] input port, [28:16] sequence number.
  flit_t exp_q [NPORTS][NPORTS][$];   // [out][in]
  int    out_owner [NPORTS];          // input whose packet holds the output, -1 free
  int    sent = 0, recv = 0, contention = 0, errs = 0;
  int    remaining [NPORTS];          // flits left in the current packet
  logic [COORD_W-1:0] pk_x [NPORTS], pk_y [NPORTS];
  int    seq [NPORTS];
  bit    sending = 1;    // stimulus process owns the inputs
  bit    stop_new = 0;   // finish current packets, start no new ones

  // Stimulus on the negative edge.
  always @(negedge clk) if (rst_n && sending) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (!(in_valid[p] && !in_ready[p])) begin   // hold while stalled
        if ((remaining[p] > 0 || !stop_new) && ($urandom % 2)) begin
          if (remaining[p] == 0) begin
            remaining[p] = 1 + $urandom % 4;
            pk_x[p] = COORD_W'($urandom % 4);
            pk_y[p] = COORD_W'($urandom % 4);
          end
          in_valid[p]      = 1;
          in_flit[p].dst_x = pk_x[p];
          in_flit[p].dst_y = pk_y[p];
          in_flit[p].tail  = (remaining[p] == 1);
          in_flit[p].data  = {3'(p), 13'(seq[p]), 16'($urandom)};
        end else begin
          in_valid[p] = 0;
        end
      end
      out_ready[p] = ($urandom % 4) != 0;
    end
  end

  // Scoreboard on the positive edge.
  always @(posedge clk) if (rst_n) begin
    int want [NPORTS];
    for (int o = 0; o < NPORTS; o++) want[o] = 0;
    for (int p = 0; p < NPORTS; p++) begin
      if (dut.head_valid[p]) want[dut.route[p]]++;
    end
    for (int o = 0; o < NPORTS; o++) if (want[o] > 1) contention++;
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ready[p]) begin
        exp_q[xy(in_flit[p])][p].push_back(in_flit[p]);
        sent++;
        seq[p]++;
        remaining[p]--;
      end
      if (pop_err[p]) errs++;
    end
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        int src;
        src = int'(out_flit[o].data[31:29]);
        recv++;
        chk("source port in range", src < NPORTS);
        if (src < NPORTS) begin
          chk("flit expected on this output", exp_q[o][src].size() > 0);
          if (exp_q[o][src].size() > 0) chk("flit contents and order", out_flit[o] == exp_q[o][src].pop_front());
          chk("no interleaving", out_owner[o] < 0 || out_owner[o] == src);
          out_owner[o] = out_flit[o].tail ? -1 : src;
        end
      end
    end
  end

  initial begin
    int cyc;
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 1; fault_mask[p] = '0;
      out_owner[p] = -1; remaining[p] = 0; seq[p] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    // Finish the packets in flight, then drain.
    stop_new = 1;
    do begin
      @(posedge clk); #1;
    end while (remaining[0] || remaining[1] || remaining[2] || remaining[3] || remaining[4]);
    sending = 0;
    for (int p = 0; p < NPORTS; p++) begin in_valid[p] = 0; out_ready[p] = 1; end
    repeat (200) @(posedge clk);
    chk("all flits delivered", sent == recv && sent > 1000);
    chk("no CRC errors on clean traffic", errs == 0);
    chk("router idle", !busy);
    chk("contention happened", contention > 50);
    $display("sent=%0d recv=%0d contention=%0d", sent, recv, contention);

    // Latency: a single flit from west to local arrives at the output the next cycle.
    @(negedge clk);
    for (int p = 0; p < NPORTS; p++) begin in_valid[p] = 0; out_ready[p] = 1; end
    // stop the random stimulus from overwriting: sending = 0 keeps valids low
    in_valid[P_WEST] = 1;
    in_flit[P_WEST]  = '{tail: 1'b1, dst_y: 4'(MY), dst_x: 4'(MX), data: {3'(P_WEST), 29'h1234}};
    exp_q[P_LOCAL][P_WEST].push_back(in_flit[P_WEST]);
    @(posedge clk); #1;
    in_valid[P_WEST] = 0;
    chk("one-cycle latency", out_valid[P_LOCAL] && out_flit[P_LOCAL].data[28:0] == 29'h1234);
    repeat (3) @(posedge clk);

    // Fault: corrupt one data bit of a flit entering from the north port.
    @(negedge clk);
    cyc = errs;
    fault_mask[P_NORTH] = FLIT_W'(1) << 5;
    in_valid[P_NORTH] = 1;
    in_flit[P_NORTH]  = '{tail: 1'b1, dst_y: 4'(MY), dst_x: 4'(MX), data: {3'(P_NORTH), 29'h0}};
    exp_q[P_LOCAL][P_NORTH].push_back(flit_t'(in_flit[P_NORTH] ^ (FLIT_W'(1) << 5)));
    @(negedge clk);
    in_valid[P_NORTH] = 0; fault_mask[P_NORTH] = '0;
    chk("corrupted flit flagged", pop_err[P_NORTH] && pop_flit[P_NORTH].data[5]);
    repeat (3) @(posedge clk);
    chk("one error counted", errs == cyc + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
