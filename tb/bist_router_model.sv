// bist_router_model: behavioural stand-in for a router core, used to test the
// self-test controller on its own. A flit accepted on any input appears two
// clocks later on the output that XY routing picks for its destination. A
// fault mode input makes it misbehave: 1 flips data bit 0 of flits leaving
// east, 2 raises a CRC error with flits leaving north, 3 drops flits leaving
// west. busy is high while a flit is inside. Not synthesizable design logic.
module bist_router_model
  import noc_pkg::*;
#(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0
) (
  input  logic        clk,
  input  logic [1:0]  fault_mode,
  input  logic        inj_valid [NPORTS],
  input  flit_t       inj_flit  [NPORTS],
  output logic        inj_ready [NPORTS],
  output logic        obs_valid [NPORTS],
  output flit_t       obs_flit  [NPORTS],
  output logic        obs_err   [NPORTS],
  output logic        busy,
  output int          injected
);
  flit_t pipe1, pipe2;
  logic  v1 = 0, v2 = 0;
  port_e op;

  initial injected = 0;

  always_comb
    for (int p = 0; p < NPORTS; p++) inj_ready[p] = 1'b1;

  always @(posedge clk) begin
    v1 <= 0;
    for (int p = 0; p < NPORTS; p++)
      if (inj_valid[p]) begin v1 <= 1; pipe1 <= inj_flit[p]; injected <= injected + 1; end
    v2 <= v1;
    pipe2 <= pipe1;
  end

  always_comb begin
    if (pipe2.dst_x > MY_X)      op = P_EAST;
    else if (pipe2.dst_x < MY_X) op = P_WEST;
    else if (pipe2.dst_y > MY_Y) op = P_NORTH;
    else if (pipe2.dst_y < MY_Y) op = P_SOUTH;
    else                         op = P_LOCAL;
    for (int p = 0; p < NPORTS; p++) begin
      obs_valid[p] = v2 && (op == port_e'(p));
      obs_flit[p]  = pipe2;
      obs_err[p]   = 1'b0;
    end
    if (v2 && fault_mode == 2'd1 && op == P_EAST)  obs_flit[P_EAST].data[0] = ~pipe2.data[0];
    if (v2 && fault_mode == 2'd2 && op == P_NORTH) obs_err[P_NORTH] = 1'b1;
    if (v2 && fault_mode == 2'd3 && op == P_WEST)  obs_valid[P_WEST] = 1'b0;
    busy = v1 || v2;
  end
endmodule
