// crc_fifo: router input FIFO with CRC error detection.
//
// Each flit pushed in has its CRC taken on the way in; flit and CRC are stored
// side by side. At the read side the CRC of the flit at the head is taken again
// and compared with the stored one, so a flit altered while it sat in the
// buffer is flagged on out_crc_err while it is the head. The flit is still
// handed on: the scheme detects, it does not correct or drop.
//
// fault_mask is a test hook modelling a storage upset: its bits are XORed into
// the flit as it is written, after its CRC has been taken. Hold it for a
// permanent fault, pulse it for a transient one; tie it to zero otherwise.
//
// Interface: valid/ready on both sides. in_ready is "not full" and out_valid
// "not empty", both from registers, so there is no combinational path through
// the FIFO. A flit pushed at one edge is at the head after that edge.
// Comparing CRCs at the FIFO's input and output follows the design's detection
// scheme; the depth and the fault hook are this design's choices.
module crc_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ready,
  output logic              out_valid,
  output flit_t             out_flit,
  input  logic              out_ready,
  output logic              out_crc_err,
  input  logic [FLIT_W-1:0] fault_mask
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    flit_t            flit;
    logic [CRC_W-1:0] crc;
  } entry_t;

  entry_t          mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [AW:0]     count;
  logic [CRC_W-1:0] crc_in, crc_out;
  logic            push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  crc_gen u_crc_in  (.data(in_flit),                      .crc(crc_in));
  crc_gen u_crc_out (.data(FLIT_W'(mem[rd_ptr].flit)),    .crc(crc_out));

  assign out_flit    = mem[rd_ptr].flit;
  assign out_crc_err = out_valid && (crc_out != mem[rd_ptr].crc);

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= '{flit: flit_t'(in_flit ^ fault_mask), crc: crc_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

endmodule
