// Matched XOR storage scheme for a single processor.
//
// An address A = a_(n-1)..a_0 is mapped to memory module
//   b_i = a_i XOR a_(S_POS+i),  0 <= i < M_LOG
// and to displacement d = A >> M_LOG inside that module. With the default
// M_LOG = 3 (M = 8 modules) and S_POS = 3 this is the eight-module XOR table
// whose second row holds 9 8 11 10 13 12 15 14. Taking the displacement from
// the upper n-m address bits is one-to-one because the upper XOR field is part
// of it. Purely combinational.
// The XOR formula and the eight-module example follow the published scheme;
// taking the displacement from the upper address bits is this design's choice.
module xor_map #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned M_LOG  = 3,
  parameter int unsigned S_POS  = 3
) (
  input  logic [ADDR_W-1:0]       addr,
  output logic [M_LOG-1:0]        module_idx,
  output logic [ADDR_W-M_LOG-1:0] disp
);
  if (S_POS < M_LOG || S_POS + M_LOG > ADDR_W) begin : g_bad
    $error("xor_map: the upper field must lie above the module field");
  end

  assign module_idx = addr[M_LOG-1:0] ^ addr[S_POS +: M_LOG];
  assign disp       = addr[ADDR_W-1:M_LOG];
endmodule
