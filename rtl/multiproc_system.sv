// Vector multiprocessor with synchronous, out-of-order access to one stream
// through a crossbar into a matched, block-interleaved sectioned memory.
//
// P = 2^S_LOG ports, each with a vector register of L = 2^LAMBDA elements,
// reach 2^S_LOG sections of T = 2^T_LOG modules (latency T) through a
// P x P crossbar; M = P*T modules in all (matched memory). A stream
// (a0, stride S) of P*L elements is loaded or stored as P consecutive
// vectors: port i handles vector V_i, elements i*L .. i*L+L-1, whose first
// address is a0 + i*L*S. The storage scheme puts the supermodule field at
// c0 = LAMBDA - T_LOG and the section field right above it.
//
// All ports start together and run the same sequence order: each port's
// access unit walks its vector in sequences of T elements with the
// supermodule order of its first sequence, and port i starts at a different
// group of sequences so that in every cycle the P requests go to P
// different sections and the same supermodule. For a balanced stride family
// this needs no arbitration at all: P requests per cycle, L cycles, and the
// last responses come back L+T-1 cycles after the first requests. Other
// strides still complete: the crossbar resolves section conflicts by port
// priority and busy modules stall the requester.
//
// Interface: pulse `start` with op/a0/stride while !busy; `done` pulses when
// the P*L-th response has returned. port_req_* show every port's request
// each cycle; section_conflict / stall flag cycles with a section conflict or
// with any request held back. The host port reads and writes single
// elements of the vector register of port host_port.
// Structure, storage scheme and vector placement follow the published
// design; c0 = LAMBDA - T_LOG, the per-port rotation rule and the host port
// are this design's choices.
module multiproc_system
  import vecmem_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned S_LOG  = 2,
  parameter int unsigned T_LOG  = 2,
  parameter int unsigned LAMBDA = 5,
  localparam int unsigned P     = 1 << S_LOG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  mem_op_e           op,
  input  logic [ADDR_W-1:0] a0,
  input  logic [ADDR_W-1:0] stride,
  output logic              busy,
  output logic              done,
  output logic              reorder,
  output logic              section_conflict,
  output logic              stall,
  output logic              port_req_valid       [P],
  output logic              port_req_ready       [P],
  output logic [S_LOG-1:0]  port_req_section     [P],
  output logic [T_LOG-1:0]  port_req_supermodule [P],
  output logic [LAMBDA-1:0] port_req_elem        [P],
  input  logic [S_LOG-1:0]  host_port,
  input  logic              host_we,
  input  logic [LAMBDA-1:0] host_idx,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata
);
  localparam int unsigned L      = 1 << LAMBDA;
  localparam int unsigned C0     = LAMBDA - T_LOG;
  localparam int unsigned C1     = C0 + T_LOG;
  localparam int unsigned DISP_W = ADDR_W - S_LOG - T_LOG;
  localparam int unsigned TAG_W  = S_LOG + LAMBDA;
  // request payload: we, displacement, write data, supermodule, element
  localparam int unsigned REQ_W  = 1 + DISP_W + DATA_W + T_LOG + LAMBDA;
  // response payload: we, element, read data
  localparam int unsigned RESP_W = 1 + LAMBDA + DATA_W;
  localparam int unsigned CNT_W  = S_LOG + LAMBDA + 1;

  mem_op_e            op_q;
  logic               active;
  logic [CNT_W-1:0]   resp_cnt;
  logic               port_reorder [P];

  logic [REQ_W-1:0]   x_req_payload  [P];
  logic               x_sec_valid    [P];
  logic [S_LOG-1:0]   x_sec_port     [P];
  logic [REQ_W-1:0]   x_sec_payload  [P];
  logic               x_sec_ready    [P];
  logic               x_sec_conflict [P];
  logic               x_resp_valid   [P];
  logic [S_LOG-1:0]   x_resp_port    [P];
  logic [RESP_W-1:0]  x_resp_payload [P];
  logic               p_resp_valid   [P];
  logic [RESP_W-1:0]  p_resp_payload [P];
  logic [DATA_W-1:0]  p_host_rdata   [P];

  // ---- ports ------------------------------------------------------------------
  for (genvar i = 0; i < P; i++) begin : g_port
    logic [ADDR_W-1:0] a0_i, addr;
    logic [DISP_W-1:0] disp;
    logic [DATA_W-1:0] st_data;
    logic              r_we;
    logic [LAMBDA-1:0] r_elem;
    logic [DATA_W-1:0] r_data;

    assign a0_i = a0 + ADDR_W'((stride << LAMBDA) * i);

    ooo_access_unit #(
      .ADDR_W(ADDR_W), .T_LOG(T_LOG), .LAMBDA(LAMBDA),
      .MAP(MAP_BLOCK_INTERLEAVED), .FIELD_POS(C0), .P_LOG(S_LOG)
    ) u_access (
      .clk, .rst_n, .start(start && !busy), .a0(a0_i), .stride,
      .port_id(S_LOG'(i)),
      .req_valid(port_req_valid[i]), .req_ready(port_req_ready[i]),
      .req_addr(addr), .req_elem(port_req_elem[i]),
      .busy(), .done(), .reorder(port_reorder[i]));

    // block-interleaved storage scheme: M-field at c0, S-field at c1, and
    // the displacement is the high bits above the S-field joined to the
    // c0 bits below the M-field
    assign port_req_supermodule[i] = addr[C0 +: T_LOG];
    assign port_req_section[i]     = addr[C1 +: S_LOG];
    assign disp                    = {addr[ADDR_W-1:C1+S_LOG], addr[C0-1:0]};

    assign x_req_payload[i] = {op_q == OP_STORE, disp, st_data,
                               port_req_supermodule[i], port_req_elem[i]};

    assign {r_we, r_elem, r_data} = p_resp_payload[i];

    vector_register #(.LAMBDA(LAMBDA), .DATA_W(DATA_W)) u_vreg (
      .clk,
      .mem_we(p_resp_valid[i] && !r_we), .mem_widx(r_elem), .mem_wdata(r_data),
      .mem_ridx(port_req_elem[i]), .mem_rdata(st_data),
      .host_we(host_we && !busy && host_port == S_LOG'(i)), .host_idx, .host_wdata,
      .host_rdata(p_host_rdata[i]));
  end

  assign host_rdata = p_host_rdata[host_port];
  assign reorder    = port_reorder[0];

  // ---- interconnection network ----------------------------------------
  crossbar_network #(.P_LOG(S_LOG), .REQ_W(REQ_W), .RESP_W(RESP_W)) u_xbar (
    .port_req_valid, .port_req_section, .port_req_payload(x_req_payload),
    .port_req_ready,
    .sec_req_valid(x_sec_valid), .sec_req_port(x_sec_port),
    .sec_req_payload(x_sec_payload), .sec_req_ready(x_sec_ready),
    .sec_conflict(x_sec_conflict),
    .sec_resp_valid(x_resp_valid), .sec_resp_port(x_resp_port),
    .sec_resp_payload(x_resp_payload),
    .port_resp_valid(p_resp_valid), .port_resp_payload(p_resp_payload));

  // ---- sections ---------------------------------------------------------
  for (genvar j = 0; j < P; j++) begin : g_sec
    logic              we;
    logic [DISP_W-1:0] disp;
    logic [DATA_W-1:0] wdata;
    logic [T_LOG-1:0]  smod;
    logic [LAMBDA-1:0] elem;
    logic              r_valid, r_we;
    logic [TAG_W-1:0]  r_tag;
    logic [DATA_W-1:0] r_data;

    assign {we, disp, wdata, smod, elem} = x_sec_payload[j];

    single_bus_memory #(
      .M_LOG(T_LOG), .DISP_W(DISP_W), .DATA_W(DATA_W), .TAG_W(TAG_W), .LAT(1 << T_LOG)
    ) u_section (
      .clk, .rst_n,
      .req_valid(x_sec_valid[j]), .req_ready(x_sec_ready[j]), .req_module(smod),
      .req_we(we), .req_disp(disp), .req_wdata(wdata), .req_tag({x_sec_port[j], elem}),
      .resp_valid(r_valid), .resp_we(r_we), .resp_tag(r_tag), .resp_data(r_data));

    assign x_resp_valid[j]   = r_valid;
    assign x_resp_port[j]    = r_tag[LAMBDA +: S_LOG];
    assign x_resp_payload[j] = {r_we, r_tag[LAMBDA-1:0], r_data};
  end

  // ---- status -------------------------------------------------------------
  always_comb begin
    section_conflict = 1'b0;
    stall            = 1'b0;
    for (int j = 0; j < P; j++) section_conflict |= x_sec_conflict[j];
    for (int i = 0; i < P; i++) stall |= port_req_valid[i] && !port_req_ready[i];
  end

  logic [S_LOG:0] n_resp;
  always_comb begin
    n_resp = '0;
    for (int j = 0; j < P; j++) n_resp += (S_LOG+1)'(x_resp_valid[j]);
  end

  assign busy = active;
  assign done = active && (resp_cnt + CNT_W'(n_resp) == CNT_W'(P * L)) && (n_resp != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      op_q     <= OP_LOAD;
      resp_cnt <= '0;
    end else if (!active) begin
      if (start) begin
        active   <= 1'b1;
        op_q     <= op;
        resp_cnt <= '0;
      end
    end else begin
      resp_cnt <= resp_cnt + CNT_W'(n_resp);
      if (done) active <= 1'b0;
    end
  end
endmodule
