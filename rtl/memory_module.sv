// One memory module with an access latency of T = LAT processor cycles.
//
// A request is accepted in a cycle where req_valid is high and the module is
// not busy. The module is then busy for the LAT cycles of its access: the
// next request can be accepted LAT cycles after the previous one, never
// earlier (a request arriving sooner is a memory conflict and must wait).
// The response (tag, write flag and, for a read, the data) is presented for
// one cycle LAT cycles after acceptance; a write updates the array when it
// is accepted and also returns a response so that stores can be counted.
// Storage is a plain array of DEPTH words; its contents are not reset.
// The fixed latency and the busy rule follow the published memory model;
// the array storage, the registered response and the store response are
// this design's choices.
module memory_module #(
  parameter int unsigned DISP_W = 13,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned TAG_W  = 6,
  parameter int unsigned LAT    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [DISP_W-1:0] req_disp,
  input  logic [DATA_W-1:0] req_wdata,
  input  logic [TAG_W-1:0]  req_tag,
  output logic              busy,
  output logic              resp_valid,
  output logic              resp_we,
  output logic [TAG_W-1:0]  resp_tag,
  output logic [DATA_W-1:0] resp_data
);
  localparam int unsigned DEPTH = 1 << DISP_W;
  localparam int unsigned CW    = $clog2(LAT + 1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [CW-1:0]     cnt;
  logic [DISP_W-1:0] disp_q;
  logic              we_q;
  logic [TAG_W-1:0]  tag_q;
  logic              accept;

  if (LAT < 1) begin : g_bad
    $error("memory_module: latency must be at least one cycle");
  end

  assign busy   = (cnt != '0);
  assign accept = req_valid && !busy;

  always_ff @(posedge clk) begin
    if (accept && req_we) mem[req_disp] <= req_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      disp_q     <= '0;
      we_q       <= 1'b0;
      tag_q      <= '0;
      resp_valid <= 1'b0;
      resp_we    <= 1'b0;
      resp_tag   <= '0;
      resp_data  <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (accept) begin
        disp_q <= req_disp;
        we_q   <= req_we;
        tag_q  <= req_tag;
        if (LAT == 1) begin
          resp_valid <= 1'b1;
          resp_we    <= req_we;
          resp_tag   <= req_tag;
          resp_data  <= req_we ? req_wdata : mem[req_disp];
        end else begin
          cnt <= CW'(LAT - 1);
        end
      end else if (cnt == CW'(1)) begin
        cnt        <= '0;
        resp_valid <= 1'b1;
        resp_we    <= we_q;
        resp_tag   <= tag_q;
        resp_data  <= mem[disp_q];
      end else if (cnt != '0) begin
        cnt <= cnt - CW'(1);
      end
    end
  end
endmodule
