// noc_router: router with CRC error detection, error log and self-test mode.
//
// Wraps noc_router_core with the two additions of the design: the packet log
// (error_logger), fed by the CRC checks of the input FIFOs, and the built-in
// self-test (router_bist). In normal operation the core's ports are the
// router's ports. When a self-test is requested, each input stops taking new
// packets at its next packet boundary (a packet already entering is let in to
// its tail, so no packet is cut in two). An input whose upstream neighbour is
// itself draining (nbr_draining) stays open: two neighbours that drain at the
// same time and each hold flits for the other would otherwise wait for each
// other forever. Flits only move between draining routers and out of that set,
// never into it, and XY paths do not loop, so every draining router empties.
// Once the core is empty the router is
// "under test": its links to the neighbours show not-ready and not-valid, the
// core's inputs are driven by the test controller and all core outputs are
// observed by it (always ready). After the test the router returns to service.
//
// Interface: five valid/ready links in and out (port 0 is the local node),
// draining out to the four neighbours and nbr_draining in from them,
// fault_mask per input FIFO for fault injection, test_start / test_mode /
// test_done / test_pass, and the error log outputs. Timing is the core's: one
// clock per hop. The isolation and boundary rules are this design's choices.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid   [NPORTS],
  input  flit_t             in_flit    [NPORTS],
  output logic              in_ready   [NPORTS],
  output logic              out_valid  [NPORTS],
  output flit_t             out_flit   [NPORTS],
  input  logic              out_ready  [NPORTS],
  input  logic [FLIT_W-1:0] fault_mask [NPORTS],
  input  logic              nbr_draining [NPORTS],
  output logic              draining,
  input  logic              test_start,
  output logic              test_mode,
  output logic              test_done,
  output logic              test_pass,
  output logic [7:0]        test_fail_count,
  input  logic              err_clear,
  output logic [15:0]       err_count,
  output logic [NPORTS-1:0] err_ports,
  output logic [PORT_W-1:0] last_err_port,
  output flit_t             last_err_flit
);

  logic   c_in_valid  [NPORTS];
  flit_t  c_in_flit   [NPORTS];
  logic   c_in_ready  [NPORTS];
  logic   c_out_valid [NPORTS];
  flit_t  c_out_flit  [NPORTS];
  logic   c_out_ready [NPORTS];
  logic   pop_err     [NPORTS];
  flit_t  pop_flit    [NPORTS];
  logic   core_busy;

  logic   inj_valid [NPORTS];
  flit_t  inj_flit  [NPORTS];
  logic   block_in;
  logic   mid       [NPORTS];   // input is inside a packet
  logic   blocked   [NPORTS];
  logic   any_mid;
  logic   any_acc;              // a flit is accepted from a link this cycle
  logic [NPORTS-1:0] err_vec;

  noc_router_core #(.MY_X(MY_X), .MY_Y(MY_Y), .FIFO_DEPTH(FIFO_DEPTH)) u_core (
    .clk, .rst_n,
    .in_valid  (c_in_valid),
    .in_flit   (c_in_flit),
    .in_ready  (c_in_ready),
    .out_valid (c_out_valid),
    .out_flit  (c_out_flit),
    .out_ready (c_out_ready),
    .fault_mask(fault_mask),
    .pop_err   (pop_err),
    .pop_flit  (pop_flit),
    .busy      (core_busy)
  );

  router_bist #(.MY_X(MY_X), .MY_Y(MY_Y), .MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_bist (
    .clk, .rst_n,
    .test_start,
    .router_busy(core_busy || any_mid || any_acc),
    .block_in,
    .test_mode,
    .inj_valid,
    .inj_flit,
    .inj_ready  (c_in_ready),
    .obs_valid  (c_out_valid),
    .obs_flit   (c_out_flit),
    .obs_err    (pop_err),
    .test_done,
    .test_pass,
    .fail_count (test_fail_count)
  );

  always_comb begin
    any_mid = 1'b0;
    any_acc = 1'b0;
    for (int p = 0; p < NPORTS; p++) begin
      blocked[p]     = test_mode || (block_in && !mid[p] && !nbr_draining[p]);
      c_in_valid[p]  = test_mode ? inj_valid[p] : (in_valid[p] && !blocked[p]);
      c_in_flit[p]   = test_mode ? inj_flit[p]  : in_flit[p];
      in_ready[p]    = c_in_ready[p] && !blocked[p];
      out_valid[p]   = c_out_valid[p] && !test_mode;
      out_flit[p]    = c_out_flit[p];
      c_out_ready[p] = test_mode || out_ready[p];
      err_vec[p]     = pop_err[p];
      if (mid[p]) any_mid = 1'b1;
      if (in_valid[p] && in_ready[p]) any_acc = 1'b1;
    end
  end

  assign draining = block_in && !test_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) mid[p] <= 1'b0;
    end else begin
      for (int p = 0; p < NPORTS; p++)
        if (!test_mode && in_valid[p] && in_ready[p]) mid[p] <= !in_flit[p].tail;
    end
  end

  error_logger #(.NPORTS_P(NPORTS), .CNT_W(16)) u_log (
    .clk, .rst_n,
    .err      (err_vec),
    .err_flit (pop_flit),
    .clear    (err_clear),
    .err_count,
    .err_ports,
    .last_port(last_err_port),
    .last_flit(last_err_flit)
  );

endmodule
