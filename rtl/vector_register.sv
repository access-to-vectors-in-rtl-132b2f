// Vector register of L = 2^LAMBDA elements, the processor side of a stream
// access.
//
// Returning load data is written at the element index carried by the
// response (elements come back out of order); store data is read at the
// element index of the outgoing request. A host port reads and writes
// single elements between stream operations; a memory write has priority
// over a host write in the same cycle. Writes are synchronous, reads
// combinational. Contents are not reset.
// Vector registers of length L are part of the published port model; the
// host port is this design's addition for loading and inspecting them.
module vector_register #(
  parameter int unsigned LAMBDA = 6,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              mem_we,
  input  logic [LAMBDA-1:0] mem_widx,
  input  logic [DATA_W-1:0] mem_wdata,
  input  logic [LAMBDA-1:0] mem_ridx,
  output logic [DATA_W-1:0] mem_rdata,
  input  logic              host_we,
  input  logic [LAMBDA-1:0] host_idx,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata
);
  localparam int unsigned L = 1 << LAMBDA;

  logic [DATA_W-1:0] elem_q [L];

  always_ff @(posedge clk) begin
    if (mem_we)       elem_q[mem_widx] <= mem_wdata;
    else if (host_we) elem_q[host_idx] <= host_wdata;
  end

  assign mem_rdata  = elem_q[mem_ridx];
  assign host_rdata = elem_q[host_idx];
endmodule
