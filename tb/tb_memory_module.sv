// Testbench for memory_module (latency 8): a request accepted in cycle c is
// answered in cycle c+8 with its tag; the module refuses requests (busy)
// for the 8 cycles of an access; reads return what earlier writes stored.
module tb_memory_module;
  localparam int unsigned DISP_W = 13;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned TAG_W  = 6;
  localparam int unsigned LAT    = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid, req_we, busy, resp_valid, resp_we;
  logic [DISP_W-1:0] req_disp;
  logic [DATA_W-1:0] req_wdata, resp_data;
  logic [TAG_W-1:0]  req_tag, resp_tag;

  memory_module dut (.*);

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  logic [DATA_W-1:0] ref_mem [logic [DISP_W-1:0]];

  initial begin
    int acc_cycle;
    logic [TAG_W-1:0] tag;
    logic we;
    logic [DISP_W-1:0] dsp;
    req_valid = 0; req_we = 0; req_disp = '0; req_wdata = '0; req_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      check(!busy, "idle before a request");
      we = (n < 20) || ($urandom_range(0, 2) == 0);
      dsp = DISP_W'($urandom_range(0, 15));
      tag = TAG_W'($urandom);
      req_valid = 1; req_we = we; req_disp = dsp; req_tag = tag;
      req_wdata = $urandom;
      @(posedge clk);
      acc_cycle = cycle;
      #1;
      if (we) ref_mem[dsp] = req_wdata;
      @(negedge clk);
      // keep asking: the module must refuse until the access is over
      req_valid = ($urandom_range(0, 1) == 1);
      for (int c = 1; c < LAT; c++) begin
        check(busy, "busy during the access");
        check(!resp_valid, "no early response");
        @(negedge clk);
      end
      req_valid = 0;
      check(resp_valid && resp_tag == tag && resp_we == we, "response after LAT cycles");
      if (!we && ref_mem.exists(dsp)) check(resp_data == ref_mem[dsp], "read data");
      check(cycle - acc_cycle == LAT, "latency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
