// Self-checking testbench for unmatched_system (defaults: t = 2, M = 16,
// T = 4, s = 3, y = 7, L = 32).
//
// Every stream is first stored from the vector register and then loaded
// back into a cleared register; a shadow memory in the testbench predicts
// load data. For every issued request the testbench checks module and
// displacement against its own copy of the mapping, that each element is
// requested once and that each group of T consecutive requests hits T
// different modules. For every family 0 <= x <= y (several random a0 and
// odd sigma each) it checks that the L requests leave in L consecutive
// cycles with no conflict and that the last response arrives L+T-1 cycles
// after the first request. Families above y are issued in plain order;
// at least one of them must show conflicts, and all must return correct
// data.
module tb_unmatched_system;
  import vecmem_pkg::*;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned T_LOG  = 2;
  localparam int unsigned M_LOG  = 4;
  localparam int unsigned LAMBDA = 5;
  localparam int unsigned Y      = 7;
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
  logic [M_LOG-1:0]        bus_module;
  logic [ADDR_W-M_LOG-1:0] bus_disp;
  logic [LAMBDA-1:0]       bus_elem;
  logic                    host_we;
  logic [LAMBDA-1:0]       host_idx;
  logic [DATA_W-1:0]       host_wdata, host_rdata;

  unmatched_system dut (.*);

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

  function automatic logic [M_LOG-1:0] ref_module(input logic [ADDR_W-1:0] a);
    return {a[8:7], a[1:0] ^ a[4:3]};
  endfunction

  function automatic logic [ADDR_W-M_LOG-1:0] ref_disp(input logic [ADDR_W-1:0] a);
    return {a[15:9], a[6:2]};
  endfunction

  logic [DATA_W-1:0] shadow [logic [ADDR_W-1:0]];

  // results of the last run
  int n_req, n_conf, first_req, last_req, done_cyc;
  logic [M_LOG-1:0] mod_seq [L];
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
        check(bus_module == ref_module(addr) && bus_disp == ref_disp(addr),
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

  task automatic check_sequences(input string name);
    for (int q = 0; q < L / T; q++)
      for (int i = 0; i < T; i++)
        for (int j = i + 1; j < T; j++)
          check(mod_seq[q*T+i] != mod_seq[q*T+j],
                $sformatf("%s: sequence %0d hits distinct modules", name, q));
  endtask

  task automatic store_load(input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss,
                            input bit balanced, input string name);
    fill_vreg(aa, ss);
    run(OP_STORE, aa, ss);
    if (balanced) begin
      check_conflict_free({name, " store"});
      check_sequences({name, " store"});
    end
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

    // every family 0..y is conflict-free
    for (int x = 0; x <= int'(Y); x++) begin
      for (int r = 0; r < 3; r++) begin
        logic [ADDR_W-1:0] aa, ss;
        aa = ADDR_W'($urandom);
        ss = ADDR_W'(((2 * ($urandom % 16) + 1)) << x);
        store_load(aa, ss, 1, $sformatf("x=%0d S=%0d", x, ss));
        check(reorder == 1'b1, "families 0..y use the sequence order");
      end
    end
    // families above y: plain order, conflicts, correct data
    begin
      int conf_before;
      conf_before = total_conflicts;
      for (int x = Y + 1; x <= 10; x++) begin
        store_load(16'd5, ADDR_W'(1 << x), 0, $sformatf("x=%0d", x));
        check(reorder == 1'b0, "families above y issued in order");
      end
      check(total_conflicts > conf_before, "families above y show memory conflicts");
    end

    $display("conflict cycles seen: %0d", total_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
