// Testbench for vector_register (64 elements): random host and memory
// writes (memory wins a same-cycle collision), both read ports compared
// with a reference copy.
module tb_vector_register;
  localparam int unsigned LAMBDA = 6;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned L      = 1 << LAMBDA;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              mem_we, host_we;
  logic [LAMBDA-1:0] mem_widx, mem_ridx, host_idx;
  logic [DATA_W-1:0] mem_wdata, mem_rdata, host_wdata, host_rdata;

  vector_register dut (.*);

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

  logic [DATA_W-1:0] ref_v [L];

  initial begin
    mem_we = 0; host_we = 0; mem_widx = '0; mem_ridx = '0; host_idx = '0;
    mem_wdata = '0; host_wdata = '0;
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      host_we = 1; host_idx = LAMBDA'(i); host_wdata = $urandom; ref_v[i] = host_wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      mem_we = $urandom_range(0, 1); host_we = $urandom_range(0, 1);
      mem_widx = LAMBDA'($urandom); host_idx = LAMBDA'($urandom); mem_ridx = LAMBDA'($urandom);
      mem_wdata = $urandom; host_wdata = $urandom;
      #1;
      check(mem_rdata == ref_v[mem_ridx] && host_rdata == ref_v[host_idx], "reads");
      if (mem_we) ref_v[mem_widx] = mem_wdata;
      else if (host_we) ref_v[host_idx] = host_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
