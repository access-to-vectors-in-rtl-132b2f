// Testbench for ooo_access_unit in its single-processor setting (XOR map,
// T = 8, s = 3, L = 64).
//
// For strides of every family the unit must request each of the L elements
// exactly once, at address a0 + S*element. For the families it reorders,
// each group of T consecutive requests must cover all T modules, in the
// module order of the first group. With req_ready always high the L
// requests must leave in L consecutive cycles; with random back-pressure the
// same order and completeness must hold.
module tb_ooo_access_unit;
  import vecmem_pkg::*;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned T_LOG  = 3;
  localparam int unsigned LAMBDA = 6;
  localparam int unsigned T      = 1 << T_LOG;
  localparam int unsigned L      = 1 << LAMBDA;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, req_valid, req_ready, busy, done, reorder;
  logic [ADDR_W-1:0] a0, stride, req_addr;
  logic [0:0]        port_id;
  logic [LAMBDA-1:0] req_elem;

  ooo_access_unit dut (.*);

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

  function automatic logic [T_LOG-1:0] modnum(input logic [ADDR_W-1:0] a);
    return a[2:0] ^ a[5:3];
  endfunction

  task automatic run(input int aa, input int ss, input bit expect_reorder, input bit stalls);
    bit seen [L];
    logic [T_LOG-1:0] mods [L];
    int n, first, lastc, done_seen;
    for (int i = 0; i < L; i++) seen[i] = 0;
    n = 0; first = -1; lastc = -1; done_seen = 0;
    @(negedge clk);
    a0 = ADDR_W'(aa); stride = ADDR_W'(ss); start = 1'b1; req_ready = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (n < L) begin
      req_ready = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(posedge clk);
      if (req_valid && req_ready) begin
        if (first < 0) first = cycle;
        lastc = cycle;
        check(!seen[req_elem], "element requested once");
        seen[req_elem] = 1;
        check(req_addr == ADDR_W'(aa + ss * req_elem), "address of element");
        mods[n] = modnum(req_addr);
        if (done) done_seen++;
        n++;
      end else if (done) begin
        done_seen += 10;
      end
      @(negedge clk);
    end
    check(done_seen == 1, "done pulses with the last request");
    check(reorder == expect_reorder, "reorder decision");
    if (!stalls) check(lastc - first == L - 1, "L requests in L cycles");
    if (expect_reorder) begin
      for (int i = 0; i < L; i++) begin
        check(mods[i] == mods[i % T], "every sequence follows the first one's order");
        for (int j = 1; j < T && j <= i; j++)
          check(mods[i] != mods[i - j], "no module twice within T requests");
      end
    end
    @(negedge clk);
    check(!busy, "idle after the stream");
  endtask

  initial begin
    start = 0; a0 = '0; stride = '0; req_ready = 1; port_id = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(32, 20, 1, 0);
    run(32, 40, 1, 0);
    run(100, 1, 1, 0);
    run(5, 6, 1, 1);
    run(999, 12, 1, 1);
    run(3, 16, 0, 0);
    run(3, 48, 0, 1);
    for (int r = 0; r < 6; r++)
      run($urandom_range(0, 65535), (2 * $urandom_range(0, 200) + 1) << $urandom_range(0, 3), 1,
          r[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
