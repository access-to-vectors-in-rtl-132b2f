// Self-checking testbench for uniproc_system (defaults: M = T = 8, s = 3,
// L = 64).
//
// Every stream is first stored from the vector register and then loaded
// back into a cleared register. A shadow memory in the testbench predicts
// load data. On the request bus the testbench checks, for every issued
// request, that module and displacement equal the XOR mapping of
// a0 + S*element, that every element is requested exactly once, and for
// balanced strides that the L requests leave in L consecutive cycles with no
// conflict and that the last response arrives L+T-1 cycles after the first
// request. For a0 = 32 and S = 20 or 40 it checks the module order
// 4,1,6,3,0,5,2,7 of the first sequence and that every later sequence
// repeats it. An unbalanced stride (S = 16) must show conflicts and still
// return correct data.
module tb_uniproc_system;
  import vecmem_pkg::*;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned T_LOG  = 3;
  localparam int unsigned LAMBDA = 6;
  localparam int unsigned T      = 1 << T_LOG;
  localparam int unsigned L      = 1 << LAMBDA;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    start;
  mem_op_e                 op;
  logic [ADDR_W-1:0]       a0, stride;
  logic                    busy, done, reorder, conflict;
  logic                    bus_valid, bus_ready;
  logic [T_LOG-1:0]        bus_module;
  logic [ADDR_W-T_LOG-1:0] bus_disp;
  logic [LAMBDA-1:0]       bus_elem;
  logic                    host_we;
  logic [LAMBDA-1:0]       host_idx;
  logic [DATA_W-1:0]       host_wdata, host_rdata;

  uniproc_system dut (.*);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [T_LOG-1:0] ref_module(input logic [ADDR_W-1:0] a);
    return a[2:0] ^ a[5:3];
  endfunction

  logic [DATA_W-1:0] shadow [logic [ADDR_W-1:0]];

  // results of the last run
  int n_req, n_conf, first_req, last_req, done_cyc;
  logic [T_LOG-1:0] mod_seq [L];
  int total_conflicts = 0;

  task automatic run(input mem_op_e o, input logic [ADDR_W-1:0] aa,
                     input logic [ADDR_W-1:0] ss);
    bit seen [L];
    logic [ADDR_W-1:0] addr;
    for (int i = 0; i < L; i++) seen[i] = 0;
    n_req = 0; n_conf = 0; first_req = -1; last_req = -1; done_cyc = -1;
    @(negedge clk);
    start = 1'b1; op = o; a0 = aa; stride = ss;
    @(negedge clk);
    start = 1'b0;
    while (done_cyc < 0) begin
      @(posedge clk);
      if (bus_valid && !bus_ready) n_conf++;
      if (bus_valid && bus_ready) begin
        addr = aa + ADDR_W'(ss * bus_elem);
        if (first_req < 0) first_req = cycle;
        last_req = cycle;
        if (n_req < L) mod_seq[n_req] = bus_module;
        n_req++;
        check(!seen[bus_elem], "element requested twice");
        seen[bus_elem] = 1;
        check(bus_module == ref_module(addr) && bus_disp == addr[ADDR_W-1:T_LOG],
              $sformatf("mapping of element %0d", bus_elem));
        if (o == OP_STORE) shadow[addr] = data_of(bus_elem, aa, ss);
      end
      if (done) done_cyc = cycle;
    end
    total_conflicts += n_conf;
    check(n_req == L, "number of requests");
  endtask

  function automatic logic [DATA_W-1:0] data_of(input int e, input logic [ADDR_W-1:0] aa,
                                                input logic [ADDR_W-1:0] ss);
    return DATA_W'(32'h9e37_79b9 * (e + 1)) ^ {aa, ss};
  endfunction

  task automatic fill_vreg(input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss);
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_idx = LAMBDA'(i); host_wdata = data_of(i, aa, ss);
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic clear_vreg();
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_idx = LAMBDA'(i); host_wdata = '0;
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic check_vreg(input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss);
    logic [ADDR_W-1:0] addr;
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      host_idx = LAMBDA'(i);
      #1;
      addr = aa + ADDR_W'(ss * i);
      if (shadow.exists(addr))
        check(host_rdata == shadow[addr], $sformatf("load data element %0d", i));
    end
  endtask

  task automatic check_conflict_free(input string name);
    check(n_conf == 0, {name, ": no conflict"});
    check(last_req - first_req == L - 1, {name, ": L requests in L cycles"});
    check(done_cyc - first_req == L + T - 1, {name, ": last response after L+T-1 cycles"});
  endtask

  task automatic check_paper_order(input string name);
    int exp_mod [T] = '{4, 1, 6, 3, 0, 5, 2, 7};
    for (int i = 0; i < L; i++)
      check(mod_seq[i] == T_LOG'(exp_mod[i % T]), $sformatf("%s: module order at %0d", name, i));
  endtask

  task automatic store_load(input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss,
                            input bit balanced, input string name);
    fill_vreg(aa, ss);
    run(OP_STORE, aa, ss);
    if (balanced) check_conflict_free({name, " store"});
    clear_vreg();
    run(OP_LOAD, aa, ss);
    if (balanced) check_conflict_free({name, " load"});
    check_vreg(aa, ss);
  endtask

  initial begin
    start = 0; op = OP_LOAD; a0 = '0; stride = '0;
    host_we = 0; host_idx = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // family x = 2: needs two reorderings
    store_load(16'd32, 16'd20, 1, "S=20");
    check(reorder == 1'b1, "S=20 uses reordering");
    check_paper_order("S=20");
    // family x = 3: conflict-free in order
    store_load(16'd32, 16'd40, 1, "S=40");
    check_paper_order("S=40");
    // families x = 0 and 1
    store_load(16'd1000, 16'd3, 1, "S=3");
    store_load(16'd5, 16'd6, 1, "S=6");
    // overlapping loads: read part of what earlier stores wrote
    clear_vreg();
    run(OP_LOAD, 16'd32, 16'd4);
    check_conflict_free("S=4 load");
    check_vreg(16'd32, 16'd4);
    // family x = 4 is not balanced: conflicts, but correct data
    store_load(16'd7, 16'd16, 0, "S=16");
    check(reorder == 1'b0, "S=16 issued in order");
    check(n_conf > 0, "S=16 shows memory conflicts");

    $display("conflict cycles seen: %0d", total_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
