// Single vector processor with out-of-order stream access to an unmatched
// XOR memory: M = T^2 = 2^(2*T_LOG) modules of latency T on one bus.
//
// The module number of an address is {a[y+t-1:y], a[t-1:0] XOR a[s+t-1:s]}:
// T sections of T modules, every block of 2^y addresses inside one section.
// The access unit splits a stream into sequences of T elements requested
// with stride sigma*2^s when x <= s, or sigma*2^y when s < x <= y, so the
// T elements of a sequence sit in T different modules; later sequences are
// replayed in the module order of the first, as in the matched case. With
// s = LAMBDA - T_LOG and y = 2*(LAMBDA - T_LOG) + 1 (the defaults) this
// makes every family 0 <= x <= y conflict-free. Other families are issued
// in plain order and stall on busy modules.
//
// Interface and timing are those of the matched single-processor system:
// pulse `start` with op/a0/stride while !busy; `done` pulses when the last
// of the L responses has returned, L+T-1 cycles after the first request for
// a conflict-free family. bus_* show the request bus, `conflict` a cycle in
// which the request waits for a busy module.
// The mapping, the module count and the field used by each family follow
// the published design; reusing the matched inter-sequence order (the
// published one is only said to be "slightly modified"), the store path,
// the tags and the host port are this design's choices.
module unmatched_system
  import vecmem_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned T_LOG  = 2,
  parameter int unsigned S_POS  = 3,
  parameter int unsigned Y_POS  = 7,
  parameter int unsigned LAMBDA = 5,
  localparam int unsigned M_LOG = 2 * T_LOG
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  mem_op_e                 op,
  input  logic [ADDR_W-1:0]       a0,
  input  logic [ADDR_W-1:0]       stride,
  output logic                    busy,
  output logic                    done,
  output logic                    reorder,
  output logic                    conflict,
  output logic                    bus_valid,
  output logic                    bus_ready,
  output logic [M_LOG-1:0]        bus_module,
  output logic [ADDR_W-M_LOG-1:0] bus_disp,
  output logic [LAMBDA-1:0]       bus_elem,
  input  logic                    host_we,
  input  logic [LAMBDA-1:0]       host_idx,
  input  logic [DATA_W-1:0]       host_wdata,
  output logic [DATA_W-1:0]       host_rdata
);
  localparam int unsigned L      = 1 << LAMBDA;
  localparam int unsigned DISP_W = ADDR_W - M_LOG;

  mem_op_e           op_q;
  logic [ADDR_W-1:0] req_addr;
  logic [DATA_W-1:0] st_data;
  logic              resp_valid, resp_we;
  logic [LAMBDA-1:0] resp_tag;
  logic [DATA_W-1:0] resp_data;
  logic [LAMBDA:0]   resp_cnt;
  logic              active;

  ooo_access_unit #(
    .ADDR_W(ADDR_W), .T_LOG(T_LOG), .LAMBDA(LAMBDA),
    .MAP(MAP_XOR_UNMATCHED), .FIELD_POS(S_POS), .Y_POS(Y_POS), .P_LOG(0)
  ) u_access (
    .clk, .rst_n, .start(start && !busy), .a0, .stride, .port_id(1'b0),
    .req_valid(bus_valid), .req_ready(bus_ready),
    .req_addr, .req_elem(bus_elem),
    .busy(), .done(), .reorder);

  unmatched_xor_map #(.ADDR_W(ADDR_W), .T_LOG(T_LOG), .S_POS(S_POS), .Y_POS(Y_POS)) u_map (
    .addr(req_addr), .module_idx(bus_module), .disp(bus_disp));

  single_bus_memory #(
    .M_LOG(M_LOG), .DISP_W(DISP_W), .DATA_W(DATA_W), .TAG_W(LAMBDA), .LAT(1 << T_LOG)
  ) u_mem (
    .clk, .rst_n,
    .req_valid(bus_valid), .req_ready(bus_ready), .req_module(bus_module),
    .req_we(op_q == OP_STORE), .req_disp(bus_disp), .req_wdata(st_data),
    .req_tag(bus_elem),
    .resp_valid, .resp_we, .resp_tag, .resp_data);

  vector_register #(.LAMBDA(LAMBDA), .DATA_W(DATA_W)) u_vreg (
    .clk,
    .mem_we(resp_valid && !resp_we), .mem_widx(resp_tag), .mem_wdata(resp_data),
    .mem_ridx(bus_elem), .mem_rdata(st_data),
    .host_we(host_we && !busy), .host_idx, .host_wdata, .host_rdata);

  assign conflict = bus_valid && !bus_ready;
  assign busy     = active;
  assign done     = active && resp_valid && (resp_cnt == (LAMBDA+1)'(L - 1));

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
    end else if (resp_valid) begin
      resp_cnt <= resp_cnt + (LAMBDA+1)'(1);
      if (done) active <= 1'b0;
    end
  end
endmodule
