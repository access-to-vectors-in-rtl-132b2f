// Testbench for single_bus_memory (8 modules, latency 8). Random requests
// to random modules are offered each cycle; the testbench keeps its own
// busy timers per module and checks that req_ready is high exactly when the
// addressed module is free, that every accepted request is answered 8
// cycles later with its tag on the shared return bus, and that reads return
// the data last written to that module and displacement.
module tb_single_bus_memory;
  localparam int unsigned M_LOG  = 3;
  localparam int unsigned DISP_W = 13;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned TAG_W  = 6;
  localparam int unsigned LAT    = 8;
  localparam int unsigned M      = 1 << M_LOG;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid, req_ready, req_we, resp_valid, resp_we;
  logic [M_LOG-1:0]  req_module;
  logic [DISP_W-1:0] req_disp;
  logic [DATA_W-1:0] req_wdata, resp_data;
  logic [TAG_W-1:0]  req_tag, resp_tag;

  single_bus_memory dut (.*);

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] ref_mem [logic [M_LOG+DISP_W-1:0]];
  int   free_at [M];
  // expected response per future cycle
  bit               exp_v  [int];
  logic [TAG_W-1:0] exp_tag[int];
  logic             exp_we [int];
  logic [DATA_W-1:0] exp_dat[int];
  bit               exp_known[int];

  initial begin
    int now;
    int n_refused;
    req_valid = 0; req_we = 0; req_module = '0; req_disp = '0; req_wdata = '0; req_tag = '0;
    for (int i = 0; i < M; i++) free_at[i] = 0;
    n_refused = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (now = 0; now < 3000; now++) begin
      @(negedge clk);
      // response due in this cycle
      if (exp_v.exists(now)) begin
        check(resp_valid && resp_tag == exp_tag[now] && resp_we == exp_we[now],
              "response in its cycle");
        if (exp_known[now]) check(resp_data == exp_dat[now], "read data");
      end else begin
        check(!resp_valid, "no unexpected response");
      end
      req_valid  = ($urandom_range(0, 3) != 0);
      req_module = M_LOG'($urandom);
      req_disp   = DISP_W'($urandom_range(0, 3));
      req_we     = (now < 200) || ($urandom_range(0, 1) == 1);
      req_wdata  = $urandom;
      req_tag    = TAG_W'($urandom);
      #1;
      check(req_ready == (now >= free_at[req_module]), "ready iff module free");
      if (req_valid && !req_ready) n_refused++;
      if (req_valid && req_ready) begin
        free_at[req_module] = now + LAT;
        exp_v[now + LAT] = 1;
        exp_tag[now + LAT] = req_tag;
        exp_we[now + LAT] = req_we;
        exp_known[now + LAT] = 0;
        if (req_we) ref_mem[{req_module, req_disp}] = req_wdata;
        else if (ref_mem.exists({req_module, req_disp})) begin
          exp_known[now + LAT] = 1;
          exp_dat[now + LAT] = ref_mem[{req_module, req_disp}];
        end
      end
    end
    check(n_refused > 0, "conflicts were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
