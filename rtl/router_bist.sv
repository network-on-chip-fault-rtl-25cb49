// router_bist: built-in self-test controller ("router under test" mode).
//
// A pulse on test_start takes the router out of service and tests it with a
// fixed set of test flits held in the logic:
//   DRAIN  block_in is raised: each input stops accepting new packets at the
//          next packet boundary; the controller waits until the router is
//          empty (router_busy low).
//   SEND   test_mode is raised: the router is cut off from its neighbours and
//          its ports belong to this controller. The current vector's flit is
//          offered on its input port.
//   WAIT   the controller watches every output port. The vector passes when
//          exactly the expected output shows a flit equal to the one sent and
//          no input reports a CRC error in that cycle. Any other outcome, or no
//          flit within TIMEOUT cycles, counts as a failed vector.
//   FLUSH  after the last vector, wait until the router is empty again, then
//          pulse test_done, set test_pass and return the router to service.
// Each vector names an input port, an output port and a data pattern. Its
// destination is this router itself (local output) or the neighbour behind the
// output port, so XY routing must send it there; a vector whose neighbour lies
// outside the mesh is skipped. Over the ten vectors every input and every
// output is used twice.
// A self-test mode driven by hardcoded test vectors is the design's; the
// vectors, the states and the pass rule are this design's choices.
module router_bist
  import noc_pkg::*;
#(
  parameter int unsigned MY_X    = 0,
  parameter int unsigned MY_Y    = 0,
  parameter int unsigned MESH_X  = 4,
  parameter int unsigned MESH_Y  = 4,
  parameter int unsigned TIMEOUT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test_start,
  input  logic        router_busy,
  output logic        block_in,
  output logic        test_mode,
  output logic        inj_valid [NPORTS],
  output flit_t       inj_flit  [NPORTS],
  input  logic        inj_ready [NPORTS],
  input  logic        obs_valid [NPORTS],
  input  flit_t       obs_flit  [NPORTS],
  input  logic        obs_err   [NPORTS],
  output logic        test_done,
  output logic        test_pass,
  output logic [7:0]  fail_count
);

  localparam int unsigned NVEC = 10;
  localparam int unsigned VW   = $clog2(NVEC);
  localparam int unsigned TW   = $clog2(TIMEOUT + 1);

  typedef enum logic [2:0] {S_IDLE, S_DRAIN, S_SEND, S_WAIT, S_FLUSH} state_e;

  // Test vectors: input port, output port, data pattern.
  localparam port_e VEC_IN [NVEC] = '{P_LOCAL, P_NORTH, P_EAST, P_SOUTH, P_WEST,
                                      P_LOCAL, P_NORTH, P_EAST, P_SOUTH, P_WEST};
  localparam port_e VEC_OUT[NVEC] = '{P_NORTH, P_EAST, P_SOUTH, P_WEST, P_LOCAL,
                                      P_SOUTH, P_WEST, P_LOCAL, P_NORTH, P_EAST};
  localparam logic [DATA_W-1:0] VEC_DATA [NVEC] = '{
    32'hAAAA_AAAA, 32'h5555_5555, 32'hFFFF_0000, 32'h0000_FFFF, 32'hF0F0_F0F0,
    32'h0F0F_0F0F, 32'hCCCC_CCCC, 32'h3333_3333, 32'hFFFF_FFFF, 32'h0000_0001};

  state_e          state;
  logic [VW-1:0]   vec;
  logic [TW-1:0]   timer;
  logic            applicable;
  flit_t           vec_flit;
  logic            any_obs, any_err, ok;

  // Destination of the current vector and whether it exists.
  always_comb begin
    vec_flit      = '0;
    vec_flit.tail = 1'b1;
    vec_flit.data = VEC_DATA[vec];
    vec_flit.dst_x = COORD_W'(MY_X);
    vec_flit.dst_y = COORD_W'(MY_Y);
    applicable    = 1'b1;
    unique case (VEC_OUT[vec])
      P_NORTH: begin applicable = (MY_Y + 1 < MESH_Y); vec_flit.dst_y = COORD_W'(MY_Y + 1); end
      P_SOUTH: begin applicable = (MY_Y > 0);          vec_flit.dst_y = COORD_W'(MY_Y - 1); end
      P_EAST:  begin applicable = (MY_X + 1 < MESH_X); vec_flit.dst_x = COORD_W'(MY_X + 1); end
      P_WEST:  begin applicable = (MY_X > 0);          vec_flit.dst_x = COORD_W'(MY_X - 1); end
      default: ;
    endcase
  end

  always_comb begin
    any_obs = 1'b0;
    any_err = 1'b0;
    ok      = 1'b1;
    for (int p = 0; p < NPORTS; p++) begin
      if (obs_valid[p]) any_obs = 1'b1;
      if (obs_err[p])   any_err = 1'b1;
      if (port_e'(p) == VEC_OUT[vec]) begin
        if (!obs_valid[p] || obs_flit[p] != vec_flit) ok = 1'b0;
      end else if (obs_valid[p]) begin
        ok = 1'b0;
      end
    end
    if (any_err) ok = 1'b0;
  end

  assign block_in  = (state != S_IDLE);
  assign test_mode = (state == S_SEND) || (state == S_WAIT) || (state == S_FLUSH);

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      inj_valid[p] = (state == S_SEND) && applicable && (port_e'(p) == VEC_IN[vec]);
      inj_flit[p]  = vec_flit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      vec        <= '0;
      timer      <= '0;
      test_done  <= 1'b0;
      test_pass  <= 1'b0;
      fail_count <= '0;
    end else begin
      test_done <= 1'b0;
      unique case (state)
        S_IDLE: if (test_start) begin
          state      <= S_DRAIN;
          vec        <= '0;
          fail_count <= '0;
        end
        S_DRAIN: if (!router_busy) begin
          state <= S_SEND;
          timer <= '0;
        end
        S_SEND: begin
          if (!applicable) begin
            if (vec == VW'(NVEC - 1)) state <= S_FLUSH;
            else                      vec   <= vec + 1'b1;
          end else if (inj_ready[VEC_IN[vec]]) begin
            state <= S_WAIT;
            timer <= '0;
          end else if (timer == TW'(TIMEOUT)) begin
            fail_count <= fail_count + 1'b1;
            if (vec == VW'(NVEC - 1)) state <= S_FLUSH;
            else                      vec   <= vec + 1'b1;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_WAIT: begin
          if (any_obs || any_err || timer == TW'(TIMEOUT)) begin
            if (!ok) fail_count <= fail_count + 1'b1;
            timer <= '0;
            if (vec == VW'(NVEC - 1)) state <= S_FLUSH;
            else begin
              vec   <= vec + 1'b1;
              state <= S_SEND;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_FLUSH: if (!router_busy) begin
          state     <= S_IDLE;
          test_done <= 1'b1;
          test_pass <= (fail_count == '0);
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
