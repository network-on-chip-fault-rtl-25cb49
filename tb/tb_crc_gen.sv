// tb_crc_gen: checks crc_gen against known CRC-8 (poly 0x07) check values and
// against a bit-serial shift-register reference computed in the testbench.
// "123456789" gives 0xF4, the standard check value of this CRC; a single 0x01
// byte gives 0x07; zero gives zero. Random 41-bit flits are compared with a
// reference that feeds one bit per step into an LFSR.
module tb_crc_gen;
  import noc_pkg::*;

  int checks = 0, failures = 0;

  logic [71:0] d72;  logic [7:0] c72;
  logic [7:0]  d8;   logic [7:0] c8;
  logic [FLIT_W-1:0] df; logic [7:0] cf;

  crc_gen #(.IN_W(72)) u72 (.data(d72), .crc(c72));
  crc_gen #(.IN_W(8))  u8  (.data(d8),  .crc(c8));
  crc_gen              uf  (.data(df),  .crc(cf));

  function automatic logic [7:0] ref_crc(logic [FLIT_W-1:0] d);
    logic [7:0] lfsr = 8'h00;
    for (int i = FLIT_W - 1; i >= 0; i--) begin
      logic in_bit = d[i] ^ lfsr[7];
      lfsr = {lfsr[6:0], 1'b0} ^ (in_bit ? 8'h07 : 8'h00);
    end
    return lfsr;
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d72 = "123456789"; d8 = 8'h01; df = '0;
    #1;
    check("123456789", c72, 8'hF4);
    check("0x01", c8, 8'h07);
    check("zero", cf, 8'h00);
    for (int n = 0; n < 200; n++) begin
      df = {$urandom, $urandom};
      #1;
      check("random", cf, ref_crc(df));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
