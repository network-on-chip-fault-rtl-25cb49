// tb_noc_mesh: end-to-end test of the 4 x 4 mesh at its default parameters.
// The testbench plays the sixteen nodes. It
//  1. measures the latency of one flit from node 0 to node 15 in an idle
//     network: one clock per hop, so 6 clocks between acceptance and delivery;
//  2. runs random multi-flit packets between all nodes with random ejection
//     backpressure and checks every flit arrives at its destination node, in
//     order per source, unchanged;
//  3. requests a self-test on every router at once while traffic flows: all
//     must pass and no flit may be lost;
//  4. corrupts one flit in router 5's local input FIFO (transient fault): it
//     must be delivered flagged in router 5's error log and nowhere else;
//  5. sticks one bit in router 6's east input FIFO (permanent fault) and
//     self-tests every router: exactly router 6 must fail.
// It counts each mechanism - injection stalls, ejection backpressure, output
// contention inside routers, multi-flit packets, draining before a test,
// flits passed between two draining neighbours, detected CRC errors, passed
// and failed self-tests - and fails if one never
// happened.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int MX = 4, MY = 4, NR = MX * MY;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic              node_in_valid [NR], node_in_ready [NR], node_out_valid [NR], node_out_ready [NR];
  flit_t             node_in_flit [NR], node_out_flit [NR];
  logic [FLIT_W-1:0] fault_mask [NR][NPORTS];
  logic              test_start [NR], test_mode [NR], test_done [NR], test_pass [NR];
  logic [7:0]        test_fail_count [NR];
  logic              err_clear;
  logic [15:0]       err_count [NR];
  logic [NPORTS-1:0] err_ports [NR];
  logic [PORT_W-1:0] last_err_port [NR];
  flit_t             last_err_flit [NR];

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired: sent=%0d recv=%0d", sent, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Data word: [31:28] source node, [27:16] sequence number, [15:0] random.
  flit_t exp_q [NR][NR][$];           // [dst][src]
  int    sent = 0, recv = 0;
  int    remaining [NR], seq [NR];
  logic [COORD_W-1:0] pk_x [NR], pk_y [NR];
  bit    sending = 0, stop_new = 0;
  // mechanism counters
  int    n_inj_stall = 0, n_ej_bp = 0, n_contention = 0, n_multiflit = 0;
  int    n_drain = 0, n_drain_pass = 0, n_crc_err = 0, n_bist_pass = 0, n_bist_fail = 0;

  always @(negedge clk) if (rst_n && sending) begin
    for (int k = 0; k < NR; k++) begin
      if (!(node_in_valid[k] && !node_in_ready[k])) begin
        if ((remaining[k] > 0 || !stop_new) && ($urandom % 3 == 0)) begin
          if (remaining[k] == 0) begin
            remaining[k] = 1 + $urandom % 4;
            if (remaining[k] > 1) n_multiflit++;
            pk_x[k] = COORD_W'($urandom % MX);
            pk_y[k] = COORD_W'($urandom % MY);
          end
          node_in_valid[k]      = 1;
          node_in_flit[k].dst_x = pk_x[k];
          node_in_flit[k].dst_y = pk_y[k];
          node_in_flit[k].tail  = (remaining[k] == 1);
          node_in_flit[k].data  = {4'(k), 12'(seq[k]), 16'($urandom)};
        end else node_in_valid[k] = 0;
      end
      node_out_ready[k] = ($urandom % 5) != 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NR; k++) begin
      if (node_in_valid[k] && !node_in_ready[k]) n_inj_stall++;
      if (node_out_valid[k] && !node_out_ready[k]) n_ej_bp++;
      if (node_in_valid[k] && node_in_ready[k]) begin
        int d;
        d = int'(node_in_flit[k].dst_y) * MX + int'(node_in_flit[k].dst_x);
        // a flit corrupted on entry (fault_mask) is expected as stored
        exp_q[d][k].push_back(flit_t'(node_in_flit[k] ^ fault_mask[k][P_LOCAL]));
        sent++; seq[k]++;
        if (remaining[k] > 0) remaining[k]--;
      end
      if (node_out_valid[k] && node_out_ready[k]) begin
        int s;
        s = int'(node_out_flit[k].data[31:28]);
        recv++;
        if (exp_q[k][s].size() > 0)
          chk("flit arrives at its destination unchanged and in order", node_out_flit[k] == exp_q[k][s].pop_front());
        else chk("unexpected flit at a node", 1'b0);
      end
    end
  end

  // Contention inside routers and drain phases, watched through the hierarchy.
  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < NPORTS; o++)
          if ($countones(dut.g_y[y].g_x[x].u_router.u_core.req[o]) > 1) n_contention++;
        if (dut.g_y[y].g_x[x].u_router.u_bist.block_in && !dut.g_y[y].g_x[x].u_router.u_bist.test_mode)
          n_drain++;
        for (int p = 1; p < NPORTS; p++)
          if (dut.g_y[y].g_x[x].u_router.draining && dut.g_y[y].g_x[x].u_router.nbr_draining[p] &&
              dut.g_y[y].g_x[x].u_router.in_valid[p] && dut.g_y[y].g_x[x].u_router.in_ready[p])
            n_drain_pass++;
      end
    end
  end

  always @(posedge clk) if (rst_n)
    for (int k = 0; k < NR; k++)
      if (test_done[k]) begin
        // test_pass is updated with test_done; sample it a delta later
        fork
          automatic int kk = k;
          begin #1; if (test_pass[kk]) n_bist_pass++; else n_bist_fail++; end
        join_none
      end

  task automatic quiesce();
    stop_new = 1;
    do begin @(posedge clk); #1; end
    while (remaining.sum() != 0);
    sending = 0;
    for (int k = 0; k < NR; k++) begin node_in_valid[k] = 0; node_out_ready[k] = 1; end
    repeat (100) @(posedge clk);
    stop_new = 0;
  endtask

  task automatic test_all(output int cycles);
    bit all_done;
    bit seen [NR];
    @(negedge clk);
    for (int k = 0; k < NR; k++) begin test_start[k] = 1; seen[k] = 0; end
    @(negedge clk);
    for (int k = 0; k < NR; k++) test_start[k] = 0;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
      all_done = 1;
      for (int k = 0; k < NR; k++) begin
        if (test_done[k]) seen[k] = 1;
        if (!seen[k]) all_done = 0;
      end
    end while (!all_done && cycles < 5000);
    chk("every router finished its self-test", all_done);
  endtask

  initial begin
    int cyc, t0;
    for (int k = 0; k < NR; k++) begin
      node_in_valid[k] = 0; node_in_flit[k] = '0; node_out_ready[k] = 1;
      test_start[k] = 0; remaining[k] = 0; seq[k] = 0;
      for (int p = 0; p < NPORTS; p++) fault_mask[k][p] = '0;
    end
    err_clear = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. latency across the mesh.
    @(negedge clk);
    node_in_valid[0] = 1;
    node_in_flit[0]  = '{tail: 1'b1, dst_x: 4'(MX - 1), dst_y: 4'(MY - 1), data: {4'd0, 12'd4095, 16'h1111}};
    @(posedge clk);
    #1;
    node_in_valid[0] = 0;
    cyc = 0;
    while (!node_out_valid[NR - 1] && cyc < 100) begin @(posedge clk); #1; cyc++; end
    chk("corner-to-corner latency is one clock per hop (6)", cyc == (MX - 1) + (MY - 1));
    $display("latency node 0 -> node %0d: %0d cycles", NR - 1, cyc);
    repeat (5) @(posedge clk);

    // 2. random traffic.
    sending = 1;
    repeat (3000) @(posedge clk);
    quiesce();
    chk("all flits delivered", sent == recv && sent > 3000);
    $display("phase 2: sent=%0d recv=%0d", sent, recv);

    // 3. self-test of every router while traffic flows.
    sending = 1;
    repeat (300) @(posedge clk);
    test_all(cyc);
    for (int k = 0; k < NR; k++) chk("healthy router passes", test_pass[k] && test_fail_count[k] == 0);
    $display("phase 3: all self-tests done in %0d cycles", cyc);
    repeat (300) @(posedge clk);
    quiesce();
    chk("no flit lost around the self-tests", sent == recv);
    for (int k = 0; k < NR; k++) chk("no error on clean traffic", err_count[k] == 0);

    // 4. transient fault: one flit from node 5 to node 10, bit 9 flipped in R5.
    @(negedge clk);
    node_in_valid[5] = 1;
    node_in_flit[5]  = '{tail: 1'b1, dst_x: 4'(2), dst_y: 4'(2), data: {4'd5, 12'(seq[5]), 16'h0000}};
    fault_mask[5][P_LOCAL] = FLIT_W'(1) << 9;
    @(negedge clk);
    node_in_valid[5] = 0;
    fault_mask[5][P_LOCAL] = '0;
    repeat (20) @(posedge clk);
    #1;
    chk("corrupted flit still delivered", sent == recv);
    for (int k = 0; k < NR; k++) begin
      chk("transient error logged only by router 5", err_count[k] == ((k == 5) ? 16'd1 : 16'd0));
      n_crc_err += int'(err_count[k]);
    end
    chk("logged on the local port", err_ports[5] == 5'b00001 && last_err_port[5] == 3'(P_LOCAL));

    // 5. permanent fault in router 6's east FIFO found by self-test.
    fault_mask[6][P_EAST] = FLIT_W'(1) << 20;
    t0 = err_count[6];
    test_all(cyc);
    for (int k = 0; k < NR; k++)
      chk("only the faulty router fails", test_pass[k] == (k != 6));
    chk("faulty router fails the two east-input vectors", test_fail_count[6] == 2);
    chk("faulty router logged the errors", err_count[6] == 16'(t0 + 2) && err_ports[6][P_EAST]);
    n_crc_err += int'(err_count[6]) - t0;
    fault_mask[6][P_EAST] = '0;
    @(negedge clk);
    err_clear = 1;
    @(posedge clk);
    #1;
    err_clear = 0;
    chk("logs cleared", err_count[5] == 0 && err_count[6] == 0);

    repeat (10) @(posedge clk);
    $display("mechanisms: injection stalls %0d, ejection backpressure %0d, router contention %0d, multi-flit packets %0d, drain cycles %0d, flits taken from draining neighbours %0d, CRC errors detected %0d, self-tests passed %0d, failed %0d",
             n_inj_stall, n_ej_bp, n_contention, n_multiflit, n_drain, n_drain_pass, n_crc_err, n_bist_pass, n_bist_fail);
    chk("injection stall happened", n_inj_stall > 0);
    chk("ejection backpressure happened", n_ej_bp > 0);
    chk("output contention happened", n_contention > 0);
    chk("multi-flit packets sent", n_multiflit > 0);
    chk("a router drained before its test", n_drain > 0);
    chk("a draining router took flits from a draining neighbour", n_drain_pass > 0);
    chk("CRC errors detected", n_crc_err == 3);
    chk("self-tests passed", n_bist_pass == 2 * NR - 1);
    chk("self-test failed", n_bist_fail == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
