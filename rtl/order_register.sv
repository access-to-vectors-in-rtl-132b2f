// Circular shift register holding the bank order of the first sequence.
//
// While the first sequence of a stream is issued, every issued request
// shifts its bank number (module or supermodule) in at the tail (`capture`).
// After T captures the head holds the bank visited first. For every later
// sequence each issued request rotates the register by one (`rotate`), so
// the head always names the bank that must be requested next, and all
// sequences visit the banks in the order of the first one. `head` is the
// register's first entry; both operations take effect at the clock edge.
// The circular shift register follows the published mechanism; its reset
// value (identity order) is this design's choice.
module order_register #(
  parameter int unsigned T_LOG = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             capture,
  input  logic [T_LOG-1:0] capture_bank,
  input  logic             rotate,
  output logic [T_LOG-1:0] head
);
  localparam int unsigned T = 1 << T_LOG;

  logic [T_LOG-1:0] order_q [T];

  assign head = order_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < T; i++) order_q[i] <= T_LOG'(i);
    end else if (capture || rotate) begin
      for (int i = 0; i < T - 1; i++) order_q[i] <= order_q[i+1];
      order_q[T-1] <= capture ? capture_bank : order_q[0];
    end
  end
endmodule
