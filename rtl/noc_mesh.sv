// noc_mesh: MESH_X x MESH_Y mesh of self-testing routers (top level).
//
// Router Rk sits at column x = k % MESH_X and row y = k / MESH_X, R0 in the
// bottom-left corner, x growing east and y growing north. Port 0 of each
// router is the local node Nk, brought out as the node_in_* (injection) and
// node_out_* (ejection) valid/ready links. Ports 1 to 4 (north, east, south,
// west) join neighbouring routers in both directions; at the mesh edge an
// unused input is idle and an unused output is always ready.
// Each router also brings out its fault-injection masks, its self-test
// controls and its error log, so that a host can run a self-test on any
// router and read which routers have seen corrupted flits.
// A flit takes one clock per router it passes. The 4x4 mesh with XY routing is
// the design's configuration; the node interface and the edge handling are
// this design's choices.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned NR        = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              node_in_valid  [NR],
  input  flit_t             node_in_flit   [NR],
  output logic              node_in_ready  [NR],
  output logic              node_out_valid [NR],
  output flit_t             node_out_flit  [NR],
  input  logic              node_out_ready [NR],
  input  logic [FLIT_W-1:0] fault_mask     [NR][NPORTS],
  input  logic              test_start     [NR],
  output logic              test_mode      [NR],
  output logic              test_done      [NR],
  output logic              test_pass      [NR],
  output logic [7:0]        test_fail_count[NR],
  input  logic              err_clear,
  output logic [15:0]       err_count      [NR],
  output logic [NPORTS-1:0] err_ports      [NR],
  output logic [PORT_W-1:0] last_err_port  [NR],
  output flit_t             last_err_flit  [NR]
);

  logic  r_in_valid  [NR][NPORTS];
  flit_t r_in_flit   [NR][NPORTS];
  logic  r_in_ready  [NR][NPORTS];
  logic  r_out_valid [NR][NPORTS];
  flit_t r_out_flit  [NR][NPORTS];
  logic  r_out_ready [NR][NPORTS];
  logic  r_nbr_drain [NR][NPORTS];
  logic  r_draining  [NR];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned K = y * MESH_X + x;
      noc_router #(
        .MY_X(x), .MY_Y(y), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .FIFO_DEPTH(FIFO_DEPTH)
      ) u_router (
        .clk, .rst_n,
        .in_valid       (r_in_valid[K]),
        .in_flit        (r_in_flit[K]),
        .in_ready       (r_in_ready[K]),
        .out_valid      (r_out_valid[K]),
        .out_flit       (r_out_flit[K]),
        .out_ready      (r_out_ready[K]),
        .fault_mask     (fault_mask[K]),
        .nbr_draining   (r_nbr_drain[K]),
        .draining       (r_draining[K]),
        .test_start     (test_start[K]),
        .test_mode      (test_mode[K]),
        .test_done      (test_done[K]),
        .test_pass      (test_pass[K]),
        .test_fail_count(test_fail_count[K]),
        .err_clear,
        .err_count      (err_count[K]),
        .err_ports      (err_ports[K]),
        .last_err_port  (last_err_port[K]),
        .last_err_flit  (last_err_flit[K])
      );

      // Local port: the node.
      assign r_in_valid[K][P_LOCAL]  = node_in_valid[K];
      assign r_in_flit[K][P_LOCAL]   = node_in_flit[K];
      assign node_in_ready[K]        = r_in_ready[K][P_LOCAL];
      assign node_out_valid[K]       = r_out_valid[K][P_LOCAL];
      assign node_out_flit[K]        = r_out_flit[K][P_LOCAL];
      assign r_out_ready[K][P_LOCAL] = node_out_ready[K];
      assign r_nbr_drain[K][P_LOCAL] = 1'b0;

      // North link: to/from router (x, y+1), its south port.
      if (y + 1 < MESH_Y) begin : g_n
        localparam int unsigned KN = K + MESH_X;
        assign r_in_valid[K][P_NORTH]  = r_out_valid[KN][P_SOUTH];
        assign r_in_flit[K][P_NORTH]   = r_out_flit[KN][P_SOUTH];
        assign r_out_ready[K][P_NORTH] = r_in_ready[KN][P_SOUTH];
        assign r_nbr_drain[K][P_NORTH] = r_draining[KN];
      end else begin : g_n_edge
        assign r_in_valid[K][P_NORTH]  = 1'b0;
        assign r_in_flit[K][P_NORTH]   = '0;
        assign r_out_ready[K][P_NORTH] = 1'b1;
        assign r_nbr_drain[K][P_NORTH] = 1'b0;
      end

      // South link: to/from router (x, y-1), its north port.
      if (y > 0) begin : g_s
        localparam int unsigned KS = K - MESH_X;
        assign r_in_valid[K][P_SOUTH]  = r_out_valid[KS][P_NORTH];
        assign r_in_flit[K][P_SOUTH]   = r_out_flit[KS][P_NORTH];
        assign r_out_ready[K][P_SOUTH] = r_in_ready[KS][P_NORTH];
        assign r_nbr_drain[K][P_SOUTH] = r_draining[KS];
      end else begin : g_s_edge
        assign r_in_valid[K][P_SOUTH]  = 1'b0;
        assign r_in_flit[K][P_SOUTH]   = '0;
        assign r_out_ready[K][P_SOUTH] = 1'b1;
        assign r_nbr_drain[K][P_SOUTH] = 1'b0;
      end

      // East link: to/from router (x+1, y), its west port.
      if (x + 1 < MESH_X) begin : g_e
        localparam int unsigned KE = K + 1;
        assign r_in_valid[K][P_EAST]  = r_out_valid[KE][P_WEST];
        assign r_in_flit[K][P_EAST]   = r_out_flit[KE][P_WEST];
        assign r_out_ready[K][P_EAST] = r_in_ready[KE][P_WEST];
        assign r_nbr_drain[K][P_EAST] = r_draining[KE];
      end else begin : g_e_edge
        assign r_in_valid[K][P_EAST]  = 1'b0;
        assign r_in_flit[K][P_EAST]   = '0;
        assign r_out_ready[K][P_EAST] = 1'b1;
        assign r_nbr_drain[K][P_EAST] = 1'b0;
      end

      // West link: to/from router (x-1, y), its east port.
      if (x > 0) begin : g_w
        localparam int unsigned KW = K - 1;
        assign r_in_valid[K][P_WEST]  = r_out_valid[KW][P_EAST];
        assign r_in_flit[K][P_WEST]   = r_out_flit[KW][P_EAST];
        assign r_out_ready[K][P_WEST] = r_in_ready[KW][P_EAST];
        assign r_nbr_drain[K][P_WEST] = r_draining[KW];
      end else begin : g_w_edge
        assign r_in_valid[K][P_WEST]  = 1'b0;
        assign r_in_flit[K][P_WEST]   = '0;
        assign r_out_ready[K][P_WEST] = 1'b1;
        assign r_nbr_drain[K][P_WEST] = 1'b0;
      end
    end
  end

endmodule
