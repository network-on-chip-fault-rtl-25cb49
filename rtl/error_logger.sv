// error_logger: the router's packet log of detected errors.
//
// Each cycle, err[p] says that input FIFO p handed on a flit whose CRC did not
// match. The logger counts such flits in a saturating counter, keeps a sticky
// flag per port, and records the port and contents of the most recent one
// (the lowest-numbered port when several report in the same cycle). clear
// empties the log. All outputs are registers, updated one clock after the
// report. An error counter per router follows the design; the exact contents
// of the log and the counter width are this design's choices.
module error_logger
  import noc_pkg::*;
#(
  parameter int unsigned NPORTS_P = NPORTS,
  parameter int unsigned CNT_W    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NPORTS_P-1:0] err,
  input  flit_t               err_flit [NPORTS_P],
  input  logic                clear,
  output logic [CNT_W-1:0]    err_count,
  output logic [NPORTS_P-1:0] err_ports,
  output logic [PORT_W-1:0]   last_port,
  output flit_t               last_flit
);

  logic [PORT_W:0]     n_err;    // errors reported this cycle
  logic [CNT_W:0]      sum;
  logic [PORT_W-1:0]   first_port;

  always_comb begin
    n_err      = '0;
    first_port = '0;
    for (int p = NPORTS_P - 1; p >= 0; p--) begin
      if (err[p]) begin
        n_err      = n_err + 1'b1;
        first_port = PORT_W'(p);
      end
    end
    sum = {1'b0, err_count} + (CNT_W+1)'(n_err);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_count <= '0;
      err_ports <= '0;
      last_port <= '0;
      last_flit <= '0;
    end else if (clear) begin
      err_count <= '0;
      err_ports <= '0;
      last_port <= '0;
      last_flit <= '0;
    end else if (|err) begin
      err_count <= sum[CNT_W] ? '1 : sum[CNT_W-1:0];
      err_ports <= err_ports | err;
      last_port <= first_port;
      last_flit <= err_flit[first_port];
    end
  end

endmodule
