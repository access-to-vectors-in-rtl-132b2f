// Testbench for crossbar_network (4 x 4). Random port requests and random
// section readiness: each section must receive the lowest-numbered port
// addressing it, with that port's payload and number; a port is ready only
// if it won its section and the section is ready; conflicts are flagged;
// section responses must reach the port they name.
module tb_crossbar_network;
  localparam int unsigned P_LOG  = 2;
  localparam int unsigned REQ_W  = 48;
  localparam int unsigned RESP_W = 40;
  localparam int unsigned P      = 1 << P_LOG;

  logic              port_req_valid   [P];
  logic [P_LOG-1:0]  port_req_section [P];
  logic [REQ_W-1:0]  port_req_payload [P];
  logic              port_req_ready   [P];
  logic              sec_req_valid    [P];
  logic [P_LOG-1:0]  sec_req_port     [P];
  logic [REQ_W-1:0]  sec_req_payload  [P];
  logic              sec_req_ready    [P];
  logic              sec_conflict     [P];
  logic              sec_resp_valid   [P];
  logic [P_LOG-1:0]  sec_resp_port    [P];
  logic [RESP_W-1:0] sec_resp_payload [P];
  logic              port_resp_valid   [P];
  logic [RESP_W-1:0] port_resp_payload [P];

  crossbar_network dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int winner [P];
      int count [P];
      int perm [P];
      for (int i = 0; i < P; i++) begin
        port_req_valid[i]   = $urandom_range(0, 1);
        port_req_section[i] = P_LOG'($urandom);
        port_req_payload[i] = {$urandom, $urandom};
        sec_req_ready[i]    = ($urandom_range(0, 3) != 0);
        winner[i] = -1;
        count[i] = 0;
        perm[i] = i;
      end
      // responses: a random permutation of ports, some sections silent
      for (int i = P - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(0, i);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int j = 0; j < P; j++) begin
        sec_resp_valid[j]   = $urandom_range(0, 1);
        sec_resp_port[j]    = P_LOG'(perm[j]);
        sec_resp_payload[j] = {$urandom, $urandom};
      end
      #1;
      for (int i = P - 1; i >= 0; i--)
        if (port_req_valid[i]) begin
          winner[port_req_section[i]] = i;
          count[port_req_section[i]]++;
        end
      for (int j = 0; j < P; j++) begin
        check(sec_req_valid[j] == (winner[j] >= 0), "section valid");
        if (winner[j] >= 0)
          check(sec_req_port[j] == P_LOG'(winner[j]) &&
                sec_req_payload[j] == port_req_payload[winner[j]], "lowest port wins");
        check(sec_conflict[j] == (count[j] > 1), "conflict flag");
      end
      for (int i = 0; i < P; i++)
        check(port_req_ready[i] == (port_req_valid[i] && winner[port_req_section[i]] == i &&
                                    sec_req_ready[port_req_section[i]]), "port ready");
      for (int j = 0; j < P; j++) begin
        check(port_resp_valid[perm[j]] == sec_resp_valid[j], "response routed");
        if (sec_resp_valid[j])
          check(port_resp_payload[perm[j]] == sec_resp_payload[j], "response payload");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
