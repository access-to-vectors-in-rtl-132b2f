// Sequence address generator.
//
// A stream of L = 2^LAMBDA elements (first address a0, stride S = sigma*2^x)
// is split into L/T sequences of T = 2^T_LOG elements. With D = 2^d, sequence
// q has the elements
//   e(q,k) = j1' * T * D + j0 + k * D,   k = 0..T-1,
//   j0 = q mod D,  j1 = q div D,  j1' = (j1 + rot) mod 2^nj1,
// i.e. the elements of a sequence are D apart, so their addresses are
// sigma*2^(x+d) apart. The caller picks d (d = s - x puts the stride of a
// sequence on the bank field) and nj1 = LAMBDA - T_LOG - d; rot lets each
// port of a multiprocessor start at a different group of sequences.
//
// `load` (one cycle) positions the generator at element 0 of sequence q_init.
// Each `adv` moves to the next element: inside a sequence the address is
// updated incrementally by adding S*D (a shift of S); at the start of a
// sequence it is computed as a0 + S*e(q,0). Addresses wrap modulo 2^ADDR_W.
// Outputs are registered and valid from the cycle after `load`.
// The sequence definition and the incremental update inside a sequence follow
// the published method; computing each sequence's first address with one
// multiply and the rotation input are this design's choices.
module seq_addr_gen #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned T_LOG  = 3,
  parameter int unsigned LAMBDA = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [LAMBDA-T_LOG-1:0]  q_init,
  input  logic                     adv,
  input  logic [ADDR_W-1:0]        a0,
  input  logic [ADDR_W-1:0]        stride,
  input  logic [7:0]               d,
  input  logic [7:0]               nj1,
  input  logic [7:0]               rot,
  output logic [ADDR_W-1:0]        addr,
  output logic [LAMBDA-1:0]        elem,
  output logic [T_LOG-1:0]         k,
  output logic [LAMBDA-T_LOG-1:0]  q,
  output logic                     last
);
  localparam int unsigned QW = LAMBDA - T_LOG;

  if (LAMBDA <= T_LOG) begin : g_bad
    $error("seq_addr_gen: a stream must hold more than one sequence");
  end

  // First element of sequence qq.
  function automatic logic [LAMBDA-1:0] first_elem(input logic [QW-1:0] qq,
                                                   input logic [7:0] dd,
                                                   input logic [7:0] nn,
                                                   input logic [7:0] rr);
    logic [LAMBDA-1:0] j0, j1, mask_d, mask_n;
    mask_d = LAMBDA'((1 << dd) - 1);
    mask_n = LAMBDA'((1 << nn) - 1);
    j0 = LAMBDA'(qq) & mask_d;
    j1 = (LAMBDA'(qq >> dd) + LAMBDA'(rr)) & mask_n;
    return (j1 << (T_LOG + dd)) | j0;
  endfunction

  logic [LAMBDA-1:0] next_first;
  logic [QW-1:0]     q_next;

  assign q_next     = load ? q_init : q + QW'(1);
  assign next_first = first_elem(q_next, d, nj1, rot);
  assign last       = (k == '1) && (q == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      elem <= '0;
      k    <= '0;
      q    <= '0;
    end else if (load || (adv && k == '1)) begin
      // Start of a sequence: base address from the element index.
      q    <= q_next;
      k    <= '0;
      elem <= next_first;
      addr <= a0 + ADDR_W'(stride * next_first);
    end else if (adv) begin
      // Inside a sequence: add S * D.
      k    <= k + T_LOG'(1);
      elem <= elem + LAMBDA'(1 << d);
      addr <= addr + (stride << d);
    end
  end
endmodule
