// tb_router_bist: runs the self-test controller against a behavioural router.
// Checks, for an inner router (1,1) and a corner router (0,0) of a 4 x 4 mesh:
// that the controller waits in DRAIN while the router is busy, holds block_in
// from the start and test_mode only once the router is empty, injects one flit
// per applicable vector (10 inner, 6 at the corner, where the south and west
// neighbours are missing), passes a healthy router, and fails a router that
// corrupts data, reports a CRC error or loses flits, with the expected number
// of failed vectors (2 each, as every output is used by two vectors).
module tb_router_bist;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start [2];
  logic       busy_ext [2];
  logic [1:0] mode [2];
  logic       block_in [2], test_mode [2], done [2], pass [2];
  logic [7:0] fails [2];
  int         injected [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    logic  inj_valid [NPORTS], inj_ready [NPORTS], obs_valid [NPORTS], obs_err [NPORTS];
    flit_t inj_flit [NPORTS], obs_flit [NPORTS];
    logic  mbusy;
    router_bist #(.MY_X(1 - g), .MY_Y(1 - g), .MESH_X(4), .MESH_Y(4), .TIMEOUT(32)) dut (
      .clk, .rst_n, .test_start(start[g]), .router_busy(mbusy || busy_ext[g]),
      .block_in(block_in[g]), .test_mode(test_mode[g]),
      .inj_valid, .inj_flit, .inj_ready, .obs_valid, .obs_flit, .obs_err,
      .test_done(done[g]), .test_pass(pass[g]), .fail_count(fails[g]));
    bist_router_model #(.MY_X(1 - g), .MY_Y(1 - g)) model (
      .clk, .fault_mode(mode[g]), .inj_valid, .inj_flit, .inj_ready, .obs_valid,
      .obs_flit, .obs_err, .busy(mbusy), .injected(injected[g]));
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Runs one test on instance g with the given fault mode; returns cycles.
  task automatic run(int g, logic [1:0] m, int exp_inj, int exp_fail);
    int n0, cyc;
    mode[g] = m;
    n0 = injected[g];
    @(negedge clk);
    busy_ext[g] = 1;               // router still holds traffic
    start[g] = 1;
    @(negedge clk);
    start[g] = 0;
    repeat (5) begin
      chk("block_in while draining", block_in[g]);
      chk("not under test while busy", !test_mode[g]);
      @(negedge clk);
    end
    busy_ext[g] = 0;
    cyc = 0;
    while (!done[g] && cyc < 2000) begin @(negedge clk); cyc++; end
    chk("test finished", done[g]);
    @(negedge clk);
    chk("back in service", !block_in[g] && !test_mode[g]);
    chk("vectors injected", injected[g] - n0 == exp_inj);
    chk("fail count", fails[g] == 8'(exp_fail));
    chk("pass flag", pass[g] == (exp_fail == 0));
    $display("instance %0d mode %0d: %0d cycles, injected %0d, failed %0d", g, m, cyc, injected[g] - n0, fails[g]);
  endtask

  initial begin
    for (int g = 0; g < 2; g++) begin start[g] = 0; busy_ext[g] = 0; mode[g] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    chk("idle after reset", !block_in[0] && !test_mode[0] && !pass[0]);
    run(0, 2'd0, 10, 0);   // healthy inner router
    run(0, 2'd1, 10, 2);   // corrupts data leaving east
    run(0, 2'd2, 10, 2);   // CRC error with flits leaving north
    run(0, 2'd3, 10, 2);   // loses flits leaving west: timeouts
    run(0, 2'd0, 10, 0);   // healthy again
    run(1, 2'd0, 6, 0);    // corner: south and west vectors skipped
    run(1, 2'd3, 6, 0);    // corner never sends west, so mode 3 is harmless
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
