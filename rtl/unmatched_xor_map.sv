// XOR-based storage scheme for an unmatched memory with M = T^2 modules.
//
// The 2t-bit module number is
//   b_i = a_(S_POS+i) XOR a_i   for 0 <= i < t      (needs S_POS >= t)
//   b_i = a_(Y_POS+i-t)         for t <= i < 2t     (needs Y_POS >= S_POS+t)
// so the modules form T sections of T modules, every block of 2^Y_POS
// addresses lives in one section, and inside a section the lower t module
// bits follow the matched XOR pattern. The displacement is the address with
// the two fields that only feed the module number removed:
//   d = { a[n-1:Y_POS+t], a[Y_POS-1:t] },
// which makes the mapping one-to-one. Defaults t = 2, s = 3, y = 7 give the
// 16-module example (address 137 in module 4, 507 in module 12, 512 in
// module 0 at displacement 32). Purely combinational.
// The module-number formula and the example sizes follow the published scheme;
// the displacement field is this design's choice.
module unmatched_xor_map #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned T_LOG  = 2,
  parameter int unsigned S_POS  = 3,
  parameter int unsigned Y_POS  = 7
) (
  input  logic [ADDR_W-1:0]         addr,
  output logic [2*T_LOG-1:0]        module_idx,
  output logic [ADDR_W-2*T_LOG-1:0] disp
);
  if (S_POS < T_LOG || Y_POS < S_POS + T_LOG || Y_POS + T_LOG > ADDR_W) begin : g_bad
    $error("unmatched_xor_map: need t <= s, s + t <= y, y + t <= n");
  end

  assign module_idx = {addr[Y_POS +: T_LOG], addr[T_LOG-1:0] ^ addr[S_POS +: T_LOG]};

  if (Y_POS + T_LOG == ADDR_W) begin : g_top
    assign disp = addr[Y_POS-1:T_LOG];
  end else begin : g_mid
    assign disp = {addr[ADDR_W-1:Y_POS+T_LOG], addr[Y_POS-1:T_LOG]};
  end
endmodule
