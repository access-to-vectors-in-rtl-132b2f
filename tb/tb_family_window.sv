// Workload testbench: the window of conflict-free stride families.
//
// For the two matched systems of vecmem_top at their default sizes, loads
// of streams with random first address and random odd sigma are run for
// every stride family x = 0..6 (S = sigma * 2^x). Families x = 0 ..
// lambda-t (0..3 for both: lambda - t = 6 - 3 and 5 - 2) must be
// conflict-free: L request cycles, no stall, no section conflict, last
// response L+T-1 cycles after the first request. Larger families are not
// balanced and must show conflicts.
// The unmatched memory (M = 16, T = 4) is run the same way twice: the one
// in vecmem_top (s = 3, y = 7, L = 32) for families 0..10, which must be
// conflict-free for x = 0..7, and a second instance sized like a Cray-1
// (s = 4, y = 9, L = 64) for families 0..12, conflict-free for x = 0..9,
// i.e. 0 .. 2*(lambda-t)+1 in both cases. The number of conflict-free
// families found in each system is printed.
module tb_family_window;
  import vecmem_pkg::*;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned MP     = 4;
  localparam int unsigned UL = 64, UT = 8, ML = 32, MT = 4;
  localparam int unsigned TRIALS = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              up_start, up_busy, up_done, up_reorder, up_conflict;
  mem_op_e           up_op, mp_op;
  logic [ADDR_W-1:0] up_a0, up_stride, mp_a0, mp_stride, um_a0, um_stride;
  logic              up_bus_valid, up_bus_ready;
  logic [2:0]        up_bus_module;
  logic [12:0]       up_bus_disp;
  logic [5:0]        up_bus_elem, up_host_idx;
  logic              up_host_we;
  logic [DATA_W-1:0] up_host_wdata, up_host_rdata;
  logic              mp_start, mp_busy, mp_done, mp_reorder, mp_section_conflict, mp_stall;
  logic              mp_req_valid [MP];
  logic              mp_req_ready [MP];
  logic [1:0]        mp_req_section [MP];
  logic [1:0]        mp_req_supermodule [MP];
  logic [4:0]        mp_req_elem [MP];
  logic [1:0]        mp_host_port;
  logic              mp_host_we;
  logic [4:0]        mp_host_idx;
  logic [DATA_W-1:0] mp_host_wdata, mp_host_rdata;
  logic              um_start, um_busy, um_done, um_reorder, um_conflict;
  mem_op_e           um_op;
  logic              um_bus_valid, um_bus_ready;
  logic [3:0]        um_bus_module;
  logic [11:0]       um_bus_disp;
  logic [4:0]        um_bus_elem, um_host_idx;
  logic              um_host_we;
  logic [DATA_W-1:0] um_host_wdata, um_host_rdata;

  vecmem_top dut (.*);

  // unmatched memory sized like a Cray-1: M = 16, T = 4, L = 64
  logic              cr_start, cr_busy, cr_done, cr_reorder, cr_conflict;
  logic [ADDR_W-1:0] cr_a0, cr_stride;
  logic              cr_bus_valid, cr_bus_ready;
  logic [3:0]        cr_bus_module;
  logic [11:0]       cr_bus_disp;
  logic [5:0]        cr_bus_elem;
  logic [DATA_W-1:0] cr_host_rdata;

  unmatched_system #(.T_LOG(2), .S_POS(4), .Y_POS(9), .LAMBDA(6)) u_cray (
    .clk, .rst_n, .start(cr_start), .op(OP_LOAD), .a0(cr_a0), .stride(cr_stride),
    .busy(cr_busy), .done(cr_done), .reorder(cr_reorder), .conflict(cr_conflict),
    .bus_valid(cr_bus_valid), .bus_ready(cr_bus_ready), .bus_module(cr_bus_module),
    .bus_disp(cr_bus_disp), .bus_elem(cr_bus_elem),
    .host_we(1'b0), .host_idx(6'd0), .host_wdata('0), .host_rdata(cr_host_rdata));

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns number of conflict cycles; first/last request and done cycles
  task automatic up_load(input int aa, input int ss, output int conf, output int span,
                         output int total);
    int first, lastc, dn;
    first = -1; lastc = -1; dn = -1; conf = 0;
    @(negedge clk);
    up_start = 1; up_op = OP_LOAD; up_a0 = ADDR_W'(aa); up_stride = ADDR_W'(ss);
    @(negedge clk);
    up_start = 0;
    while (dn < 0) begin
      @(posedge clk);
      if (up_conflict) conf++;
      if (up_bus_valid && up_bus_ready) begin
        if (first < 0) first = cycle;
        lastc = cycle;
      end
      if (up_done) dn = cycle;
    end
    span = lastc - first;
    total = dn - first;
  endtask

  task automatic mp_load(input int aa, input int ss, output int conf, output int span,
                         output int total);
    int first, lastc, dn;
    first = -1; lastc = -1; dn = -1; conf = 0;
    @(negedge clk);
    mp_start = 1; mp_op = OP_LOAD; mp_a0 = ADDR_W'(aa); mp_stride = ADDR_W'(ss);
    @(negedge clk);
    mp_start = 0;
    while (dn < 0) begin
      @(posedge clk);
      if (mp_stall || mp_section_conflict) conf++;
      for (int p = 0; p < MP; p++)
        if (mp_req_valid[p] && mp_req_ready[p]) begin
          if (first < 0) first = cycle;
          lastc = cycle;
        end
      if (mp_done) dn = cycle;
    end
    span = lastc - first;
    total = dn - first;
  endtask

  task automatic um_load(input bit cray, input int aa, input int ss, output int conf,
                         output int span, output int total);
    int first, lastc, dn;
    first = -1; lastc = -1; dn = -1; conf = 0;
    @(negedge clk);
    if (cray) begin
      cr_start = 1; cr_a0 = ADDR_W'(aa); cr_stride = ADDR_W'(ss);
    end else begin
      um_start = 1; um_op = OP_LOAD; um_a0 = ADDR_W'(aa); um_stride = ADDR_W'(ss);
    end
    @(negedge clk);
    cr_start = 0;
    um_start = 0;
    while (dn < 0) begin
      @(posedge clk);
      if (cray ? cr_conflict : um_conflict) conf++;
      if (cray ? (cr_bus_valid && cr_bus_ready) : (um_bus_valid && um_bus_ready)) begin
        if (first < 0) first = cycle;
        lastc = cycle;
      end
      if (cray ? cr_done : um_done) dn = cycle;
    end
    span = lastc - first;
    total = dn - first;
  endtask

  initial begin
    int conf, span, total, up_window, mp_window, um_window, cr_window;
    bit um_ok [11];
    bit cr_ok [13];
    bit up_ok [7];
    bit mp_ok [7];
    up_start = 0; up_op = OP_LOAD; up_a0 = '0; up_stride = '0;
    up_host_we = 0; up_host_idx = '0; up_host_wdata = '0;
    mp_start = 0; mp_op = OP_LOAD; mp_a0 = '0; mp_stride = '0;
    mp_host_port = '0; mp_host_we = 0; mp_host_idx = '0; mp_host_wdata = '0;
    um_start = 0; um_op = OP_LOAD; um_a0 = '0; um_stride = '0;
    um_host_we = 0; um_host_idx = '0; um_host_wdata = '0;
    cr_start = 0; cr_a0 = '0; cr_stride = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int x = 0; x <= 6; x++) begin
      up_ok[x] = 1;
      mp_ok[x] = 1;
      for (int r = 0; r < TRIALS; r++) begin
        int sigma, aa;
        sigma = 2 * $urandom_range(0, 60) + 1;
        aa = $urandom_range(0, 65535);
        up_load(aa, sigma << x, conf, span, total);
        if (!(conf == 0 && span == UL - 1 && total == UL + UT - 1)) up_ok[x] = 0;
        mp_load(aa, sigma << x, conf, span, total);
        if (!(conf == 0 && span == ML - 1 && total == ML + MT - 1)) mp_ok[x] = 0;
      end
      check(up_ok[x] == (x <= 3), $sformatf("single processor, family %0d", x));
      check(mp_ok[x] == (x <= 3), $sformatf("multiprocessor, family %0d", x));
    end
    up_window = 0;
    mp_window = 0;
    for (int x = 0; x <= 6; x++) begin
      up_window += up_ok[x];
      mp_window += mp_ok[x];
    end
    um_window = 0;
    for (int x = 0; x <= 10; x++) begin
      um_ok[x] = 1;
      for (int r = 0; r < TRIALS; r++) begin
        um_load(0, $urandom_range(0, 65535), (2 * $urandom_range(0, 15) + 1) << x,
                conf, span, total);
        if (!(conf == 0 && span == ML - 1 && total == ML + MT - 1)) um_ok[x] = 0;
      end
      check(um_ok[x] == (x <= 7), $sformatf("unmatched memory, family %0d", x));
      um_window += um_ok[x];
    end
    cr_window = 0;
    for (int x = 0; x <= 12; x++) begin
      cr_ok[x] = 1;
      for (int r = 0; r < TRIALS; r++) begin
        um_load(1, $urandom_range(0, 65535), (2 * $urandom_range(0, 7) + 1) << x,
                conf, span, total);
        if (!(conf == 0 && span == 64 - 1 && total == 64 + MT - 1)) cr_ok[x] = 0;
      end
      check(cr_ok[x] == (x <= 9), $sformatf("Cray-1 sized unmatched memory, family %0d", x));
      cr_window += cr_ok[x];
    end
    $display("conflict-free families: single processor %0d, multiprocessor %0d, unmatched %0d, unmatched Cray-1 size %0d",
             up_window, mp_window, um_window, cr_window);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
