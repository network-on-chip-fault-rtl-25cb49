// tb_rr_arbiter: drives random request vectors into a 5-way round-robin
// arbiter and compares each grant with a reference pointer model: the grant
// goes to the first requester at or after the pointer, and the pointer moves
// past the winner when the grant is used. Also checks that with all five
// requesting every input is granted once in five cycles (fairness).
module tb_rr_arbiter;
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant, exp;
  logic advance;
  int ptr;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .grant);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ref_grant(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++)
      if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    logic [N-1:0] seen;
    req = '0; advance = 0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      req = N'($urandom);
      advance = ($urandom % 4) != 0;
      #1;
      exp = ref_grant(req, ptr);
      checks++;
      if (grant !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL req=%b ptr=%0d grant=%b exp=%b", req, ptr, grant, exp);
      end
      if (advance && |req)
        for (int i = 0; i < N; i++) if (exp[i]) ptr = (i + 1) % N;
    end
    // Fairness with all requesting.
    seen = '0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      req = '1; advance = 1;
      #1;
      seen |= grant;
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL fairness %b", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
