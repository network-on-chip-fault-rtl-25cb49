// tb_noc_router: the full router at (1,1) of a 4 x 4 mesh, with its CRC
// checking, error log and self-test.
//  1. Random multi-flit packets on all five inputs, random backpressure on all
//     outputs; a scoreboard checks XY output port, order and contents.
//  2. A self-test is requested while traffic flows: the router must finish the
//     packets it has started, then go under test (no link activity: in_ready
//     and out_valid low), pass, and return to service; no flit may be lost.
//  3. A transient fault (one flit corrupted in the east FIFO) must be counted
//     in the error log with its port and flit.
//  4. A permanent fault (a stuck bit in the south FIFO) must make the
//     self-test fail exactly the two vectors that enter from the south.
module tb_noc_router;
  import noc_pkg::*;

  localparam int MX = 1, MY = 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  logic [FLIT_W-1:0] fault_mask [NPORTS];
  logic nbr_draining [NPORTS];
  logic draining;
  logic test_start, test_mode, test_done, test_pass, err_clear;
  logic [7:0] test_fail_count;
  logic [15:0] err_count;
  logic [NPORTS-1:0] err_ports;
  logic [PORT_W-1:0] last_err_port;
  flit_t last_err_flit;

  noc_router #(.MY_X(MX), .MY_Y(MY), .MESH_X(4), .MESH_Y(4), .FIFO_DEPTH(4)) dut (.*);

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

  flit_t exp_q [NPORTS][NPORTS][$];
  int    sent = 0, recv = 0, link_activity_in_test = 0, test_cycles = 0;
  int    remaining [NPORTS], seq [NPORTS];
  logic [COORD_W-1:0] pk_x [NPORTS], pk_y [NPORTS];
  bit    sending = 0, stop_new = 0;

  always @(negedge clk) if (rst_n && sending) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (!(in_valid[p] && !in_ready[p])) begin
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
        end else in_valid[p] = 0;
      end
      out_ready[p] = ($urandom % 4) != 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (test_mode) test_cycles++;
    for (int p = 0; p < NPORTS; p++) begin
      if (test_mode && (in_ready[p] || out_valid[p])) link_activity_in_test++;
      if (in_valid[p] && in_ready[p]) begin
        exp_q[xy(in_flit[p])][p].push_back(in_flit[p]);
        sent++; seq[p]++; remaining[p]--;
      end
    end
    for (int o = 0; o < NPORTS; o++)
      if (out_valid[o] && out_ready[o]) begin
        int src;
        src = int'(out_flit[o].data[31:29]);
        recv++;
        if (src < NPORTS && exp_q[o][src].size() > 0)
          chk("flit contents, port and order", out_flit[o] == exp_q[o][src].pop_front());
        else chk("unexpected flit", 1'b0);
      end
  end

  task automatic quiesce();
    stop_new = 1;
    do begin @(posedge clk); #1; end
    while (remaining[0] || remaining[1] || remaining[2] || remaining[3] || remaining[4]);
    sending = 0;
    for (int p = 0; p < NPORTS; p++) begin in_valid[p] = 0; out_ready[p] = 1; end
    repeat (50) @(posedge clk);
  endtask

  task automatic self_test(output int cycles);
    @(negedge clk);
    test_start = 1;
    @(negedge clk);
    test_start = 0;
    cycles = 0;
    while (!test_done && cycles < 3000) begin @(negedge clk); cycles++; end
    chk("self-test finished", test_done);
  endtask

  initial begin
    int cyc, e0;
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 1; fault_mask[p] = '0;
      remaining[p] = 0; seq[p] = 0;
    end
    test_start = 0; err_clear = 0;
    for (int p = 0; p < NPORTS; p++) nbr_draining[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1 and 2: traffic with a self-test in the middle.
    sending = 1;
    repeat (500) @(posedge clk);
    self_test(cyc);
    chk("healthy router passes", test_pass && test_fail_count == 0);
    chk("router was under test", test_cycles > 10);
    chk("links silent under test", link_activity_in_test == 0);
    repeat (500) @(posedge clk);
    quiesce();
    chk("no flit lost or added", sent == recv && sent > 500);
    chk("no CRC error on clean traffic", err_count == 0 && err_ports == 0);
    $display("sent=%0d recv=%0d self-test %0d cycles, %0d under test", sent, recv, cyc, test_cycles);

    // 3: transient fault on the east input.
    @(negedge clk);
    in_valid[P_EAST] = 1;
    in_flit[P_EAST] = '{tail: 1'b1, dst_x: 4'(MX), dst_y: 4'(MY), data: {3'(P_EAST), 29'h0ABC}};
    fault_mask[P_EAST] = FLIT_W'(1) << 3;
    exp_q[P_LOCAL][P_EAST].push_back(flit_t'(in_flit[P_EAST] ^ (FLIT_W'(1) << 3)));
    @(negedge clk);
    in_valid[P_EAST] = 0; fault_mask[P_EAST] = '0;
    repeat (3) @(negedge clk);
    chk("transient error counted", err_count == 1 && err_ports == 5'b00100);
    chk("error logged with port", last_err_port == 3'(P_EAST));
    chk("error logged with flit", last_err_flit.data == {3'(P_EAST), 29'h0AB4});

    // 4: permanent fault in the south FIFO found by the self-test.
    e0 = err_count;
    fault_mask[P_SOUTH] = FLIT_W'(1) << 17;
    self_test(cyc);
    chk("faulty router fails", !test_pass && test_fail_count == 2);
    chk("its errors are logged", err_count == 16'(e0 + 2) && err_ports[P_SOUTH]);
    fault_mask[P_SOUTH] = '0;
    self_test(cyc);
    chk("repaired router passes", test_pass);
    err_clear = 1;
    @(negedge clk);
    err_clear = 0;
    chk("log cleared", err_count == 0 && err_ports == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
