// crc_gen: combinational CRC of a word.
//
// Computes the CRC remainder of IN_W data bits, most significant bit first, with
// generator POLY (the x^CRC_W term implied), initial value zero and no final XOR.
// The default is CRC-8 with x^8 + x^2 + x + 1. The router computes it once as a
// flit enters an input FIFO and once as it leaves, and compares the two.
// Interface: data in, crc out, no clock; the depth is IN_W XOR stages.
// The check itself follows the design's fault-detection scheme; the polynomial,
// width and bit order are this design's choice.
module crc_gen #(
  parameter int unsigned        IN_W  = noc_pkg::FLIT_W,
  parameter int unsigned        CRC_W = noc_pkg::CRC_W,
  parameter logic [CRC_W-1:0]   POLY  = 8'h07
) (
  input  logic [IN_W-1:0]  data,
  output logic [CRC_W-1:0] crc
);

  always_comb begin
    logic [CRC_W-1:0] r;
    logic             fb;
    r = '0;
    for (int i = IN_W - 1; i >= 0; i--) begin
      fb = r[CRC_W-1] ^ data[i];
      r  = {r[CRC_W-2:0], 1'b0};
      if (fb) r = r ^ POLY;
    end
    crc = r;
  end

endmodule
