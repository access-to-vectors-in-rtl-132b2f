// 2^s x 2^s crossbar between the processor ports and the memory sections.
//
// Request path: every port offers at most one request per cycle, tagged
// with its target section. Each section takes the lowest-numbered port that
// addresses it; a port that loses (a section conflict) or whose request the
// section cannot take because the addressed module is busy sees
// port_req_ready low and holds its request. The selected request reaches
// the section together with the number of the port it came from.
// Response path: each section returns at most one response per cycle,
// labelled with the port it belongs to, and the crossbar steers it to that
// port. A port can receive only one response per cycle because it issues
// at most one request per cycle and all modules share one fixed latency.
// Both paths are combinational. sec_conflict flags, per section, a cycle in
// which more than one port addressed it.
// The crossbar follows the published system structure; the lowest-port-wins
// arbitration (never needed for balanced streams) is this design's choice.
module crossbar_network #(
  parameter int unsigned P_LOG  = 2,
  parameter int unsigned REQ_W  = 48,
  parameter int unsigned RESP_W = 40,
  localparam int unsigned P     = 1 << P_LOG
) (
  input  logic              port_req_valid   [P],
  input  logic [P_LOG-1:0]  port_req_section [P],
  input  logic [REQ_W-1:0]  port_req_payload [P],
  output logic              port_req_ready   [P],
  output logic              sec_req_valid    [P],
  output logic [P_LOG-1:0]  sec_req_port     [P],
  output logic [REQ_W-1:0]  sec_req_payload  [P],
  input  logic              sec_req_ready    [P],
  output logic              sec_conflict     [P],
  input  logic              sec_resp_valid   [P],
  input  logic [P_LOG-1:0]  sec_resp_port    [P],
  input  logic [RESP_W-1:0] sec_resp_payload [P],
  output logic              port_resp_valid   [P],
  output logic [RESP_W-1:0] port_resp_payload [P]
);
  logic granted [P];

  always_comb begin
    for (int i = 0; i < P; i++) granted[i] = 1'b0;
    for (int j = 0; j < P; j++) begin
      sec_req_valid[j]   = 1'b0;
      sec_req_port[j]    = '0;
      sec_req_payload[j] = '0;
      sec_conflict[j]    = 1'b0;
      for (int i = P - 1; i >= 0; i--) begin
        if (port_req_valid[i] && port_req_section[i] == P_LOG'(j)) begin
          if (sec_req_valid[j]) sec_conflict[j] = 1'b1;
          sec_req_valid[j]   = 1'b1;
          sec_req_port[j]    = P_LOG'(i);
          sec_req_payload[j] = port_req_payload[i];
        end
      end
      if (sec_req_valid[j]) granted[sec_req_port[j]] = 1'b1;
    end
    for (int i = 0; i < P; i++) begin
      port_req_ready[i] = granted[i] && sec_req_ready[port_req_section[i]];
    end
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      port_resp_valid[i]   = 1'b0;
      port_resp_payload[i] = '0;
    end
    for (int j = 0; j < P; j++) begin
      if (sec_resp_valid[j]) begin
        port_resp_valid[sec_resp_port[j]]   = 1'b1;
        port_resp_payload[sec_resp_port[j]] = sec_resp_payload[j];
      end
    end
  end
endmodule
