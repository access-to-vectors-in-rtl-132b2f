// Out-of-order stream access unit (one processor port).
//
// Issues the L = 2^LAMBDA element requests of a stream (a0, stride S =
// sigma*2^x) one per cycle, in an order that is conflict-free for every
// balanced stride family:
//   * If FIELD_POS + T_LOG - LAMBDA <= x <= FIELD_POS ("reorder mode") the
//     stream is split into L/T sequences whose T elements are 2^(FIELD_POS-x)
//     elements apart, so the addresses of a sequence step through the bank
//     field (bits FIELD_POS+T_LOG-1..FIELD_POS) and hit T different banks.
//   * Address generator 1 computes the first sequence, whose requests go out
//     immediately, and records their bank order in a circular shift
//     register. Address generator 2 computes every later sequence one
//     sequence ahead and parks each address in a double bank of buffers at
//     the index of its bank. Sequences after the first are read from the
//     buffers in the recorded bank order, so consecutive sequences visit the
//     banks in the same order and no bank is revisited within T cycles.
//   * Any other family cannot be made conflict-free; the unit then issues
//     the elements in plain order and the memory stalls it on conflicts.
// For the unmatched memory (MAP_XOR_UNMATCHED, M = T^2) there are two
// fields: strides with x <= FIELD_POS = s use sequences that walk the XOR
// field at s (bank = low half of the module number), strides with
// s < x <= Y_POS use sequences that walk the field at y (bank = high half).
// Within one sequence the other half is constant, so indexing the buffers
// and the order register by the walked half keeps consecutive sequences
// off each other's busy modules exactly as in the matched case.
// For the multiprocessor (MAP_BLOCK_INTERLEAVED, bank = supermodule field at
// FIELD_POS = c0) port `port_id` of 2^P_LOG rotates its group-of-sequences
// index by port_id >> max(P_LOG - x, 0) so that the ports, all running in
// lockstep, address 2^P_LOG different sections in every cycle.
//
// Interface: `start` (while idle) takes a0 and stride; after two set-up
// cycles requests appear on req_* with a valid/ready handshake (a request
// is issued in a cycle where req_valid && req_ready). `done` pulses in the
// cycle of the last issued request. With req_ready held high the L requests
// leave in L consecutive cycles.
//
// The sequence construction (including the choice of the s- or y-field in
// the unmatched memory), the two generators, the buffers and the order
// register follow the document. Buffers are double banks (one being filled,
// one being read); the per-port rotation rule and the reuse of the matched
// inter-sequence order for the unmatched memory are this design's own.
module ooo_access_unit
  import vecmem_pkg::*;
#(
  parameter int unsigned ADDR_W    = 16,
  parameter int unsigned T_LOG     = 3,
  parameter int unsigned LAMBDA    = 6,
  parameter map_kind_e   MAP       = MAP_XOR_MATCHED,
  parameter int unsigned FIELD_POS = 3,
  parameter int unsigned Y_POS     = 0,
  parameter int unsigned P_LOG     = 0,
  localparam int unsigned PID_W    = (P_LOG > 0) ? P_LOG : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] a0,
  input  logic [ADDR_W-1:0] stride,
  input  logic [PID_W-1:0]  port_id,
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  output logic [LAMBDA-1:0] req_elem,
  output logic              busy,
  output logic              done,
  output logic              reorder
);
  localparam int unsigned QW   = LAMBDA - T_LOG;
  localparam int unsigned T    = 1 << T_LOG;
  localparam int unsigned NSEQ = 1 << QW;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_e;
  state_e state;

  logic [ADDR_W-1:0] a0_q, stride_q;
  logic [7:0]        d_q, nj1_q, rot_q;
  logic              hi_q;

  // ---- stride decode ------------------------------------------------------
  int unsigned x_c;
  logic        reorder_c, lo_fit, hi_fit;
  logic [7:0]  d_c, nj1_c, rot_c;

  always_comb begin
    x_c       = stride_family(32'(stride));
    lo_fit    = (x_c <= FIELD_POS) && (x_c + LAMBDA >= FIELD_POS + T_LOG);
    hi_fit    = (MAP == MAP_XOR_UNMATCHED) && (x_c > FIELD_POS) && (x_c <= Y_POS) &&
                (x_c + LAMBDA >= Y_POS + T_LOG);
    reorder_c = lo_fit || hi_fit;
    d_c       = lo_fit ? 8'(FIELD_POS - x_c) : hi_fit ? 8'(Y_POS - x_c) : 8'd0;
    nj1_c     = 8'(LAMBDA - T_LOG) - d_c;
    rot_c     = '0;
    if (reorder_c && P_LOG > 0) begin
      rot_c = (x_c >= P_LOG) ? 8'(port_id) : 8'(port_id >> (P_LOG - x_c));
    end
  end

  // ---- address generators -----------------------------------------------
  logic [ADDR_W-1:0] g1_addr, g2_addr;
  logic [LAMBDA-1:0] g1_elem, g2_elem;
  logic [T_LOG-1:0]  g1_k, g2_k;
  logic [QW-1:0]     g1_q, g2_q;
  logic              g1_last, g2_last;
  logic              g1_adv, g2_adv, gen_load;

  assign gen_load = (state == S_LOAD);

  seq_addr_gen #(.ADDR_W(ADDR_W), .T_LOG(T_LOG), .LAMBDA(LAMBDA)) u_gen1 (
    .clk, .rst_n, .load(gen_load), .q_init(QW'(0)), .adv(g1_adv),
    .a0(a0_q), .stride(stride_q), .d(d_q), .nj1(nj1_q), .rot(rot_q),
    .addr(g1_addr), .elem(g1_elem), .k(g1_k), .q(g1_q), .last(g1_last));

  seq_addr_gen #(.ADDR_W(ADDR_W), .T_LOG(T_LOG), .LAMBDA(LAMBDA)) u_gen2 (
    .clk, .rst_n, .load(gen_load), .q_init(QW'(1)), .adv(g2_adv),
    .a0(a0_q), .stride(stride_q), .d(d_q), .nj1(nj1_q), .rot(rot_q),
    .addr(g2_addr), .elem(g2_elem), .k(g2_k), .q(g2_q), .last(g2_last));

  // ---- bank of an address ---------------------------------------------------
  logic [T_LOG-1:0] g1_bank, g2_bank;

  if (MAP == MAP_XOR_MATCHED) begin : g_xor
    logic [ADDR_W-T_LOG-1:0] unused_d1, unused_d2;
    xor_map #(.ADDR_W(ADDR_W), .M_LOG(T_LOG), .S_POS(FIELD_POS)) u_map1 (
      .addr(g1_addr), .module_idx(g1_bank), .disp(unused_d1));
    xor_map #(.ADDR_W(ADDR_W), .M_LOG(T_LOG), .S_POS(FIELD_POS)) u_map2 (
      .addr(g2_addr), .module_idx(g2_bank), .disp(unused_d2));
  end else if (MAP == MAP_XOR_UNMATCHED) begin : g_um
    logic [2*T_LOG-1:0]        m1, m2;
    logic [ADDR_W-2*T_LOG-1:0] unused_d1, unused_d2;
    unmatched_xor_map #(.ADDR_W(ADDR_W), .T_LOG(T_LOG), .S_POS(FIELD_POS), .Y_POS(Y_POS))
      u_map1 (.addr(g1_addr), .module_idx(m1), .disp(unused_d1));
    unmatched_xor_map #(.ADDR_W(ADDR_W), .T_LOG(T_LOG), .S_POS(FIELD_POS), .Y_POS(Y_POS))
      u_map2 (.addr(g2_addr), .module_idx(m2), .disp(unused_d2));
    assign g1_bank = hi_q ? m1[T_LOG +: T_LOG] : m1[T_LOG-1:0];
    assign g2_bank = hi_q ? m2[T_LOG +: T_LOG] : m2[T_LOG-1:0];
  end else begin : g_bi
    assign g1_bank = g1_addr[FIELD_POS +: T_LOG];
    assign g2_bank = g2_addr[FIELD_POS +: T_LOG];
  end

  // ---- issue side -------------------------------------------------------
  logic [QW-1:0]     issue_q;
  logic [T_LOG-1:0]  issue_k;
  logic [QW:0]       filled;      // sequences fully present (seq 0 counts)
  logic              fill_active;
  logic              in_first, accept, fill_en;
  logic [T_LOG-1:0]  order_head;
  logic [ADDR_W-1:0] buf_addr;
  logic [LAMBDA-1:0] buf_elem;

  assign in_first  = (issue_q == '0);
  assign req_valid = (state == S_RUN) && (in_first || (filled > (QW+1)'(issue_q)));
  assign accept    = req_valid && req_ready;
  assign req_addr  = in_first ? g1_addr : buf_addr;
  assign req_elem  = in_first ? g1_elem : buf_elem;
  assign g1_adv    = accept && in_first;
  assign busy      = (state != S_IDLE);
  assign done      = accept && (issue_k == T_LOG'(T - 1)) && (issue_q == QW'(NSEQ - 1));

  order_register #(.T_LOG(T_LOG)) u_order (
    .clk, .rst_n,
    .capture(accept && in_first),
    .capture_bank(reorder ? g1_bank : issue_k),
    .rotate(accept && !in_first),
    .head(order_head));

  // ---- fill side (generator 2 runs one sequence ahead) --------------------
  assign fill_en = (state == S_RUN) && fill_active &&
                   ((QW+1)'(g2_q) <= (QW+1)'(issue_q) + (QW+1)'(1));
  assign g2_adv  = fill_en;

  addr_buffers #(.ADDR_W(ADDR_W), .T_LOG(T_LOG), .LAMBDA(LAMBDA)) u_buf (
    .clk,
    .wr_en(fill_en), .wr_bank(g2_q[0]), .wr_idx(reorder ? g2_bank : g2_k),
    .wr_addr(g2_addr), .wr_elem(g2_elem),
    .rd_bank(issue_q[0]), .rd_idx(order_head),
    .rd_addr(buf_addr), .rd_elem(buf_elem));

  // ---- control ----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      a0_q        <= '0;
      stride_q    <= '0;
      d_q         <= '0;
      nj1_q       <= '0;
      rot_q       <= '0;
      hi_q        <= 1'b0;
      reorder     <= 1'b0;
      issue_q     <= '0;
      issue_k     <= '0;
      filled      <= '0;
      fill_active <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          a0_q     <= a0;
          stride_q <= stride;
          d_q      <= d_c;
          nj1_q    <= nj1_c;
          rot_q    <= rot_c;
          hi_q     <= hi_fit;
          reorder  <= reorder_c;
          state    <= S_LOAD;
        end
        S_LOAD: begin
          issue_q     <= '0;
          issue_k     <= '0;
          filled      <= (QW+1)'(1);
          fill_active <= 1'b1;
          state       <= S_RUN;
        end
        S_RUN: begin
          if (fill_en) begin
            if (g2_k == T_LOG'(T - 1)) filled <= filled + (QW+1)'(1);
            if (g2_last) fill_active <= 1'b0;
          end
          if (accept) begin
            issue_k <= issue_k + T_LOG'(1);
            if (issue_k == T_LOG'(T - 1)) begin
              issue_q <= issue_q + QW'(1);
              if (issue_q == QW'(NSEQ - 1)) state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The buffers must never be read before generator 2 has filled them.
  a_buffer_ready : assert property (@(posedge clk) disable iff (!rst_n)
    (accept && !in_first) |-> (filled > (QW+1)'(issue_q)));
endmodule
