// tb_error_logger: reports random error patterns on the five ports and checks
// the count (number of reports, saturating), the sticky per-port flags, the
// last logged port (lowest-numbered when several report at once) and flit,
// and that clear empties the log. Saturation is checked with a 4-bit counter.
module tb_error_logger;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] err;
  flit_t err_flit [5];
  logic clear;
  logic [15:0] cnt;  logic [4:0] ports;  logic [2:0] lport;  flit_t lflit;
  logic [3:0] cnt4;  logic [4:0] ports4; logic [2:0] lport4; flit_t lflit4;

  error_logger #(.NPORTS_P(5), .CNT_W(16)) dut (.clk, .rst_n, .err, .err_flit, .clear,
    .err_count(cnt), .err_ports(ports), .last_port(lport), .last_flit(lflit));
  error_logger #(.NPORTS_P(5), .CNT_W(4)) dut4 (.clk, .rst_n, .err, .err_flit, .clear,
    .err_count(cnt4), .err_ports(ports4), .last_port(lport4), .last_flit(lflit4));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int exp_cnt;
    logic [4:0] exp_ports;
    int exp_port;
    flit_t exp_flit;
    err = '0; clear = 0;
    for (int p = 0; p < 5; p++) err_flit[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset", cnt == 0 && ports == 0);
    exp_cnt = 0; exp_ports = '0; exp_port = 0; exp_flit = '0;
    for (int n = 0; n < 200; n++) begin
      err = (($urandom % 2) == 0) ? 5'($urandom) : '0;
      for (int p = 0; p < 5; p++) err_flit[p] = flit_t'({$urandom, $urandom});
      if (err != 0) begin
        for (int p = 4; p >= 0; p--) if (err[p]) exp_port = p;
        exp_flit = err_flit[exp_port];
        exp_cnt += $countones(err);
        exp_ports |= err;
      end
      @(negedge clk);
      err = '0;
      chk("count", cnt == 16'(exp_cnt));
      chk("saturating count", cnt4 == ((exp_cnt > 15) ? 4'd15 : 4'(exp_cnt)));
      chk("ports", ports == exp_ports);
      chk("last port", lport == 3'(exp_port));
      chk("last flit", lflit == exp_flit);
    end
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk("clear", cnt == 0 && ports == 0 && cnt4 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
