// noc_router_core: five-port input-buffered wormhole router with CRC checking.
//
// Every input port has a crc_fifo. The flit at the head of each FIFO is routed
// by xy_route from this router's coordinates (MY_X, MY_Y) to the flit's
// destination and requests that output. Each output has a round-robin arbiter;
// a request is granted only when the output's downstream side is ready. Once a
// non-tail flit has crossed an output, the output stays locked to that input
// until the packet's tail flit has crossed, so packets are never interleaved.
// The crossbar is combinational: a flit at a FIFO head reaches the next
// router's FIFO in the same clock, one cycle per hop, and each output can
// move one flit per clock.
//
// Error detection: pop_err[p] is high in the cycle input p hands on a flit
// whose CRC no longer matches, with that flit on pop_flit[p]. busy is high
// while any FIFO holds a flit or any output is locked.
//
// The baseline router is only named by the design (a CONNECT router in a 4x4
// XY mesh); this single-channel wormhole router with valid/ready links is the
// simplest router that does that job, and its internals are this design's.
module noc_router_core
  import noc_pkg::*;
#(
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
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
  output logic              pop_err    [NPORTS],
  output flit_t             pop_flit   [NPORTS],
  output logic              busy
);

  logic        head_valid [NPORTS];
  flit_t       head_flit  [NPORTS];
  logic        head_err   [NPORTS];
  logic        pop        [NPORTS];
  port_e       route      [NPORTS];

  logic [NPORTS-1:0] req   [NPORTS];   // req[o][i]: input i wants output o
  logic [NPORTS-1:0] grant [NPORTS];   // grant[o][i]
  logic [NPORTS-1:0] arb_grant [NPORTS];
  logic              fire  [NPORTS];   // output o moves a flit this cycle

  logic              lock_valid [NPORTS];
  logic [PORT_W-1:0] lock_in    [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    crc_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid   (in_valid[i]),
      .in_flit    (in_flit[i]),
      .in_ready   (in_ready[i]),
      .out_valid  (head_valid[i]),
      .out_flit   (head_flit[i]),
      .out_ready  (pop[i]),
      .out_crc_err(head_err[i]),
      .fault_mask (fault_mask[i])
    );

    xy_route u_route (
      .cur_x   (COORD_W'(MY_X)),
      .cur_y   (COORD_W'(MY_Y)),
      .dst_x   (head_flit[i].dst_x),
      .dst_y   (head_flit[i].dst_y),
      .out_port(route[i])
    );

    assign pop_err[i]  = pop[i] && head_err[i];
    assign pop_flit[i] = head_flit[i];
  end

  // Requests, masked by the output lock.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        req[o][i] = head_valid[i] && (route[i] == port_e'(o)) &&
                    (!lock_valid[o] || lock_in[o] == PORT_W'(i));
      end
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n,
      .req    (req[o]),
      .advance(fire[o]),
      .grant  (arb_grant[o])
    );

    assign grant[o] = out_ready[o] ? arb_grant[o] : '0;
    assign fire[o]  = |grant[o];

    always_comb begin
      out_valid[o] = |req[o];
      out_flit[o]  = '0;
      for (int i = 0; i < NPORTS; i++)
        if (arb_grant[o][i]) out_flit[o] = head_flit[i];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lock_valid[o] <= 1'b0;
        lock_in[o]    <= '0;
      end else if (fire[o]) begin
        lock_valid[o] <= !out_flit[o].tail;
        for (int i = 0; i < NPORTS; i++)
          if (grant[o][i]) lock_in[o] <= PORT_W'(i);
      end
    end
  end

  // An input is popped when the output it asked for took its flit.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (grant[o][i]) pop[i] = 1'b1;
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int p = 0; p < NPORTS; p++)
      if (head_valid[p] || lock_valid[p]) busy = 1'b1;
  end

endmodule
