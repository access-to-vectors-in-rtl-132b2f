// 2^M_LOG memory modules of latency LAT sharing one request bus and one
// return bus.
//
// One request per cycle is offered with its module number. It is accepted
// (req_ready high) when the addressed module is idle; otherwise the request
// has hit a busy module (a memory conflict) and the requester must hold it.
// Because every module has the same fixed latency and at most one request
// is accepted per cycle, at most one module answers in any cycle, so the
// return bus needs no arbiter: the responses are simply merged. Used both
// as the single processor's memory and as one section of the multiprocessor
// memory (the modules of a section are its supermodules).
// One bus, fixed latency and a return bus without arbiter follow the
// published memory model; the valid/ready stall on a busy module is this
// design's choice.
module single_bus_memory #(
  parameter int unsigned M_LOG  = 3,
  parameter int unsigned DISP_W = 13,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned TAG_W  = 6,
  parameter int unsigned LAT    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [M_LOG-1:0]  req_module,
  input  logic              req_we,
  input  logic [DISP_W-1:0] req_disp,
  input  logic [DATA_W-1:0] req_wdata,
  input  logic [TAG_W-1:0]  req_tag,
  output logic              resp_valid,
  output logic              resp_we,
  output logic [TAG_W-1:0]  resp_tag,
  output logic [DATA_W-1:0] resp_data
);
  localparam int unsigned M = 1 << M_LOG;

  logic [M-1:0]      mod_busy, mod_valid, mod_rvalid, mod_rwe;
  logic [TAG_W-1:0]  mod_rtag  [M];
  logic [DATA_W-1:0] mod_rdata [M];

  for (genvar i = 0; i < M; i++) begin : g_mod
    assign mod_valid[i] = req_valid && (req_module == M_LOG'(i));
    memory_module #(.DISP_W(DISP_W), .DATA_W(DATA_W), .TAG_W(TAG_W), .LAT(LAT)) u_mod (
      .clk, .rst_n,
      .req_valid(mod_valid[i]), .req_we, .req_disp, .req_wdata, .req_tag,
      .busy(mod_busy[i]),
      .resp_valid(mod_rvalid[i]), .resp_we(mod_rwe[i]),
      .resp_tag(mod_rtag[i]), .resp_data(mod_rdata[i]));
  end

  assign req_ready = !mod_busy[req_module];

  always_comb begin
    resp_valid = |mod_rvalid;
    resp_we    = |(mod_rvalid & mod_rwe);
    resp_tag   = '0;
    resp_data  = '0;
    for (int i = 0; i < M; i++) begin
      if (mod_rvalid[i]) begin
        resp_tag  = resp_tag  | mod_rtag[i];
        resp_data = resp_data | mod_rdata[i];
      end
    end
  end

  a_one_response : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(mod_rvalid));
endmodule
