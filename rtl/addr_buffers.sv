// Address buffers between the second address generator and the request
// multiplexer.
//
// Two banks of T entries; each entry holds a computed address and the index
// of its stream element. Entries are written at the index of the bank
// (memory module or supermodule) the address maps to, so a sequence can be
// read back in any bank order. The generator fills one bank with sequence
// q+1 while the requests of sequence q are read from the other bank. Write
// is synchronous, read is combinational.
// The published structure has a single set of M latches; the second bank is
// this design's addition, so that a sequence being filled can never
// overwrite an entry of the sequence still being issued.
module addr_buffers #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned T_LOG  = 3,
  parameter int unsigned LAMBDA = 6
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic              wr_bank,
  input  logic [T_LOG-1:0]  wr_idx,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [LAMBDA-1:0] wr_elem,
  input  logic              rd_bank,
  input  logic [T_LOG-1:0]  rd_idx,
  output logic [ADDR_W-1:0] rd_addr,
  output logic [LAMBDA-1:0] rd_elem
);
  localparam int unsigned T = 1 << T_LOG;

  logic [ADDR_W-1:0] addr_q [2][T];
  logic [LAMBDA-1:0] elem_q [2][T];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      addr_q[wr_bank][wr_idx] <= wr_addr;
      elem_q[wr_bank][wr_idx] <= wr_elem;
    end
  end

  assign rd_addr = addr_q[rd_bank][rd_idx];
  assign rd_elem = elem_q[rd_bank][rd_idx];
endmodule
