// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters, searching from the position after the last used
// grant, so every steady requester is served within N grants. grant is
// combinational from req and the pointer; the pointer moves only on a clock
// edge where advance is high (the grant was actually used). The allocation
// policy is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;   // highest priority this cycle
  logic [IW-1:0] win;

  always_comb begin
    grant = '0;
    win   = ptr;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + k) % N);
      if (req[idx]) begin
        grant = '0;
        grant[idx] = 1'b1;
        win = idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    ptr <= '0;
    else if (advance && |req)      ptr <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end

endmodule
