// Top level: the three memory organisations of the design side by side.
//
//  * up_*  : single vector processor, matched XOR memory (M = T = 8), with
//            out-of-order conflict-free stream access (uniproc_system).
//  * mp_*  : four-port vector multiprocessor, crossbar to four sections of
//            four modules, block-interleaved storage, synchronous out-of-order
//            access to one stream (multiproc_system).
//  * um_*  : single vector processor, unmatched XOR memory with M = T^2 = 16
//            modules (T = 4, s = 3, y = 7, L = 32), out-of-order access
//            conflict-free for stride families 0..7 (unmatched_system).
// The blocks share only clock and reset; see each block for its timing.
// Default sizes are the published worked examples.
module vecmem_top
  import vecmem_pkg::*;
#(
  parameter int unsigned ADDR_W    = 16,
  parameter int unsigned DATA_W    = 32,
  // single processor: T = M = 2^UP_T_LOG, XOR upper field at UP_S_POS, L = 2^UP_LAMBDA
  parameter int unsigned UP_T_LOG  = 3,
  parameter int unsigned UP_S_POS  = 3,
  parameter int unsigned UP_LAMBDA = 6,
  // multiprocessor: P = 2^MP_S_LOG ports and sections, T = 2^MP_T_LOG, L = 2^MP_LAMBDA
  parameter int unsigned MP_S_LOG  = 2,
  parameter int unsigned MP_T_LOG  = 2,
  parameter int unsigned MP_LAMBDA = 5,
  // unmatched memory: t (M = T^2), s, y, L = 2^UM_LAMBDA
  parameter int unsigned UM_T_LOG  = 2,
  parameter int unsigned UM_S_POS  = 3,
  parameter int unsigned UM_Y_POS  = 7,
  parameter int unsigned UM_LAMBDA = 5,
  localparam int unsigned MP_P     = 1 << MP_S_LOG
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // single processor
  input  logic                       up_start,
  input  mem_op_e                    up_op,
  input  logic [ADDR_W-1:0]          up_a0,
  input  logic [ADDR_W-1:0]          up_stride,
  output logic                       up_busy,
  output logic                       up_done,
  output logic                       up_reorder,
  output logic                       up_conflict,
  output logic                       up_bus_valid,
  output logic                       up_bus_ready,
  output logic [UP_T_LOG-1:0]        up_bus_module,
  output logic [ADDR_W-UP_T_LOG-1:0] up_bus_disp,
  output logic [UP_LAMBDA-1:0]       up_bus_elem,
  input  logic                       up_host_we,
  input  logic [UP_LAMBDA-1:0]       up_host_idx,
  input  logic [DATA_W-1:0]          up_host_wdata,
  output logic [DATA_W-1:0]          up_host_rdata,
  // multiprocessor
  input  logic                       mp_start,
  input  mem_op_e                    mp_op,
  input  logic [ADDR_W-1:0]          mp_a0,
  input  logic [ADDR_W-1:0]          mp_stride,
  output logic                       mp_busy,
  output logic                       mp_done,
  output logic                       mp_reorder,
  output logic                       mp_section_conflict,
  output logic                       mp_stall,
  output logic                       mp_req_valid       [MP_P],
  output logic                       mp_req_ready       [MP_P],
  output logic [MP_S_LOG-1:0]        mp_req_section     [MP_P],
  output logic [MP_T_LOG-1:0]        mp_req_supermodule [MP_P],
  output logic [MP_LAMBDA-1:0]       mp_req_elem        [MP_P],
  input  logic [MP_S_LOG-1:0]        mp_host_port,
  input  logic                       mp_host_we,
  input  logic [MP_LAMBDA-1:0]       mp_host_idx,
  input  logic [DATA_W-1:0]          mp_host_wdata,
  output logic [DATA_W-1:0]          mp_host_rdata,
  // unmatched memory
  input  logic                       um_start,
  input  mem_op_e                    um_op,
  input  logic [ADDR_W-1:0]          um_a0,
  input  logic [ADDR_W-1:0]          um_stride,
  output logic                       um_busy,
  output logic                       um_done,
  output logic                       um_reorder,
  output logic                       um_conflict,
  output logic                       um_bus_valid,
  output logic                       um_bus_ready,
  output logic [2*UM_T_LOG-1:0]      um_bus_module,
  output logic [ADDR_W-2*UM_T_LOG-1:0] um_bus_disp,
  output logic [UM_LAMBDA-1:0]       um_bus_elem,
  input  logic                       um_host_we,
  input  logic [UM_LAMBDA-1:0]       um_host_idx,
  input  logic [DATA_W-1:0]          um_host_wdata,
  output logic [DATA_W-1:0]          um_host_rdata
);
  uniproc_system #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .T_LOG(UP_T_LOG), .S_POS(UP_S_POS),
    .LAMBDA(UP_LAMBDA)
  ) u_uniproc (
    .clk, .rst_n, .start(up_start), .op(up_op), .a0(up_a0), .stride(up_stride),
    .busy(up_busy), .done(up_done), .reorder(up_reorder), .conflict(up_conflict),
    .bus_valid(up_bus_valid), .bus_ready(up_bus_ready), .bus_module(up_bus_module),
    .bus_disp(up_bus_disp), .bus_elem(up_bus_elem),
    .host_we(up_host_we), .host_idx(up_host_idx), .host_wdata(up_host_wdata),
    .host_rdata(up_host_rdata));

  multiproc_system #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .S_LOG(MP_S_LOG), .T_LOG(MP_T_LOG),
    .LAMBDA(MP_LAMBDA)
  ) u_multiproc (
    .clk, .rst_n, .start(mp_start), .op(mp_op), .a0(mp_a0), .stride(mp_stride),
    .busy(mp_busy), .done(mp_done), .reorder(mp_reorder),
    .section_conflict(mp_section_conflict), .stall(mp_stall),
    .port_req_valid(mp_req_valid), .port_req_ready(mp_req_ready),
    .port_req_section(mp_req_section), .port_req_supermodule(mp_req_supermodule),
    .port_req_elem(mp_req_elem),
    .host_port(mp_host_port), .host_we(mp_host_we), .host_idx(mp_host_idx),
    .host_wdata(mp_host_wdata), .host_rdata(mp_host_rdata));

  unmatched_system #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .T_LOG(UM_T_LOG), .S_POS(UM_S_POS),
    .Y_POS(UM_Y_POS), .LAMBDA(UM_LAMBDA)
  ) u_unmatched (
    .clk, .rst_n, .start(um_start), .op(um_op), .a0(um_a0), .stride(um_stride),
    .busy(um_busy), .done(um_done), .reorder(um_reorder), .conflict(um_conflict),
    .bus_valid(um_bus_valid), .bus_ready(um_bus_ready), .bus_module(um_bus_module),
    .bus_disp(um_bus_disp), .bus_elem(um_bus_elem),
    .host_we(um_host_we), .host_idx(um_host_idx), .host_wdata(um_host_wdata),
    .host_rdata(um_host_rdata));
endmodule
