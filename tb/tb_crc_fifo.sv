// tb_crc_fifo: pushes random flits into a 4-deep CRC FIFO while popping at
// random, and compares every popped flit with a queue model. Checks the full
// and empty flags against the model's occupancy, the one-cycle push-to-head
// latency, that a clean flit never shows a CRC error, and that a flit
// corrupted on its way into storage (fault_mask) leaves with its error flag
// set and with the corrupted contents.
module tb_crc_fifo;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_crc_err;
  flit_t in_flit, out_flit;
  logic [FLIT_W-1:0] fault_mask;

  typedef struct { flit_t f; logic bad; } item_t;
  item_t q[$];
  int n_err_seen = 0;

  crc_fifo #(.DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_flit = '0; fault_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("empty after reset", !out_valid && in_ready);
    // Latency: push one flit, it is at the head the next cycle.
    in_valid = 1; in_flit = flit_t'({$urandom, $urandom});
    @(negedge clk);
    in_valid = 0;
    chk("head after one cycle", out_valid && out_flit == in_flit && !out_crc_err);
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    chk("empty again", !out_valid);
    for (int n = 0; n < 3000; n++) begin
      in_valid   = ($urandom % 3) != 0;
      out_ready  = ($urandom % 3) != 0;
      in_flit    = flit_t'({$urandom, $urandom});
      fault_mask = (($urandom % 8) == 0) ? (FLIT_W'(1) << ($urandom % FLIT_W)) : '0;
      #1;
      chk("in_ready matches occupancy", in_ready == (q.size() < 4));
      chk("out_valid matches occupancy", out_valid == (q.size() > 0));
      if (out_valid && q.size() > 0) begin
        chk("head flit", out_flit == q[0].f);
        chk("crc flag", out_crc_err == q[0].bad);
        if (out_crc_err) n_err_seen++;
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back('{f: flit_t'(in_flit ^ fault_mask), bad: fault_mask != '0});
      @(negedge clk);
    end
    chk("errors were seen", n_err_seen > 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
