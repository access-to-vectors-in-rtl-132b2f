// Self-checking testbench for multiproc_system (defaults: P = 4 ports and
// sections, T = 4, L = 32, c0 = 3).
//
// Streams of P*L elements are stored from the four vector registers and
// loaded back into cleared registers; a shadow memory predicts load data.
// For every issued request the testbench checks section and supermodule
// against the block-interleaved mapping of a0 + (i*L + element)*S and that
// each element of each vector is requested once. For the balanced families
// x = 0..3 it checks the three ordering properties in every cycle: all four
// ports issue together, to four different sections, to the same supermodule,
// and T consecutive requests of a port use T different supermodules; the
// stream takes L request cycles and the last response arrives L+T-1 cycles
// after the first request. For the printed example a0 = 4, S = 4 it checks
// that the ports start with elements 0, 8, 16, 24 (addresses 4, 164, 324,
// 484) and that the second sequences start with addresses 32, 192, 352, 512.
// Stride 16 (x = 4, not balanced) must show stalls and still be correct.
module tb_multiproc_system;
  import vecmem_pkg::*;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned S_LOG  = 2;
  localparam int unsigned T_LOG  = 2;
  localparam int unsigned LAMBDA = 5;
  localparam int unsigned P      = 1 << S_LOG;
  localparam int unsigned T      = 1 << T_LOG;
  localparam int unsigned L      = 1 << LAMBDA;
  localparam int unsigned C0     = LAMBDA - T_LOG;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start;
  mem_op_e           op;
  logic [ADDR_W-1:0] a0, stride;
  logic              busy, done, reorder, section_conflict, stall;
  logic              port_req_valid       [P];
  logic              port_req_ready       [P];
  logic [S_LOG-1:0]  port_req_section     [P];
  logic [T_LOG-1:0]  port_req_supermodule [P];
  logic [LAMBDA-1:0] port_req_elem        [P];
  logic [S_LOG-1:0]  host_port;
  logic              host_we;
  logic [LAMBDA-1:0] host_idx;
  logic [DATA_W-1:0] host_wdata, host_rdata;

  multiproc_system dut (.*);

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

  logic [DATA_W-1:0] shadow [logic [ADDR_W-1:0]];

  function automatic logic [ADDR_W-1:0] addr_of(input int p, input int e,
      input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss);
    return aa + ADDR_W'(ss * (p * L + e));
  endfunction

  function automatic logic [DATA_W-1:0] data_of(input int p, input int e,
      input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss);
    return DATA_W'(32'h85eb_ca6b * (p * L + e + 1)) ^ {ss, aa};
  endfunction

  int n_stall, n_secconf, first_req, last_req, done_cyc;
  int elem_log [P][L];   // element issued by port p in its n-th request
  int total_stall = 0;
  int total_secconf = 0;

  task automatic run(input mem_op_e o, input logic [ADDR_W-1:0] aa,
                     input logic [ADDR_W-1:0] ss, input bit balanced);
    bit seen [P][L];
    int n [P];
    logic [ADDR_W-1:0] addr;
    logic [T_LOG-1:0] sm_hist [P][T];
    for (int p = 0; p < P; p++) begin
      n[p] = 0;
      for (int e = 0; e < L; e++) seen[p][e] = 0;
    end
    n_stall = 0; n_secconf = 0; first_req = -1; last_req = -1; done_cyc = -1;
    @(negedge clk);
    start = 1'b1; op = o; a0 = aa; stride = ss;
    @(negedge clk);
    start = 1'b0;
    while (done_cyc < 0) begin
      @(posedge clk);
      if (stall) n_stall++;
      if (section_conflict) n_secconf++;
      if (balanced && port_req_valid[0]) begin
        bit [P-1:0] secs_used = '0;
        for (int p = 0; p < P; p++) begin
          check(port_req_valid[p] && port_req_ready[p], "all ports issue together");
          check(!secs_used[port_req_section[p]], "P1: different sections");
          secs_used[port_req_section[p]] = 1'b1;
          check(port_req_supermodule[p] == port_req_supermodule[0], "P2: same supermodule");
        end
      end
      for (int p = 0; p < P; p++) begin
        if (port_req_valid[p] && port_req_ready[p]) begin
          int e;
          e = int'(port_req_elem[p]);
          addr = addr_of(p, e, aa, ss);
          if (first_req < 0) first_req = cycle;
          last_req = cycle;
          check(!seen[p][e], "element requested twice");
          seen[p][e] = 1;
          check(port_req_section[p] == addr[C0+T_LOG +: S_LOG] &&
                port_req_supermodule[p] == addr[C0 +: T_LOG],
                $sformatf("mapping port %0d element %0d", p, e));
          if (balanced) begin
            for (int h = 1; h < T && h <= n[p]; h++)
              check(sm_hist[p][(n[p] - h) % T] != port_req_supermodule[p],
                    "P3: T consecutive requests to different supermodules");
          end
          sm_hist[p][n[p] % T] = port_req_supermodule[p];
          if (n[p] < L) elem_log[p][n[p]] = e;
          n[p]++;
          if (o == OP_STORE) shadow[addr] = data_of(p, e, aa, ss);
        end
      end
      if (done) done_cyc = cycle;
    end
    for (int p = 0; p < P; p++) check(n[p] == L, "requests per port");
    total_stall += n_stall;
    total_secconf += n_secconf;
    if (balanced) begin
      check(n_stall == 0 && n_secconf == 0, "balanced stride: no conflict");
      check(last_req - first_req == L - 1, "L request cycles");
      check(done_cyc - first_req == L + T - 1, "last response after L+T-1 cycles");
    end
  endtask

  task automatic fill_vregs(input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss,
                            input bit zero);
    for (int p = 0; p < P; p++)
      for (int e = 0; e < L; e++) begin
        @(negedge clk);
        host_we = 1'b1; host_port = S_LOG'(p); host_idx = LAMBDA'(e);
        host_wdata = zero ? '0 : data_of(p, e, aa, ss);
      end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic check_vregs(input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss);
    logic [ADDR_W-1:0] addr;
    for (int p = 0; p < P; p++)
      for (int e = 0; e < L; e++) begin
        @(negedge clk);
        host_port = S_LOG'(p); host_idx = LAMBDA'(e);
        #1;
        addr = addr_of(p, e, aa, ss);
        if (shadow.exists(addr))
          check(host_rdata == shadow[addr], $sformatf("load data port %0d element %0d", p, e));
      end
  endtask

  task automatic store_load(input logic [ADDR_W-1:0] aa, input logic [ADDR_W-1:0] ss,
                            input bit balanced);
    fill_vregs(aa, ss, 0);
    run(OP_STORE, aa, ss, balanced);
    fill_vregs(aa, ss, 1);
    run(OP_LOAD, aa, ss, balanced);
    check_vregs(aa, ss);
  endtask

  initial begin
    start = 0; op = OP_LOAD; a0 = '0; stride = '0;
    host_port = '0; host_we = 0; host_idx = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // printed example: a0 = 4, S = 4 (x = 2)
    store_load(16'd4, 16'd4, 1);
    check(reorder == 1'b1, "S=4 uses reordering");
    check(elem_log[0][0] == 0 && elem_log[1][0] == 8 && elem_log[2][0] == 16 &&
          elem_log[3][0] == 24, "first sequences start at 4, 164, 324, 484");
    check(elem_log[0][T] == 7 && elem_log[1][T] == 15 && elem_log[2][T] == 23 &&
          elem_log[3][T] == 31, "second sequences start at 32, 192, 352, 512");
    // the other balanced families
    store_load(16'd100, 16'd1, 1);
    store_load(16'd3000, 16'd6, 1);
    store_load(16'd77, 16'd24, 1);
    store_load(16'd9, 16'd8, 1);
    // not balanced
    store_load(16'd12, 16'd16, 0);
    check(n_stall > 0, "S=16 stalls");
    // random balanced strides
    for (int r = 0; r < 4; r++) begin
      logic [ADDR_W-1:0] ss;
      ss = ADDR_W'(($urandom_range(0, 50) * 2 + 1) << $urandom_range(0, C0));
      store_load(ADDR_W'($urandom_range(0, 20000)), ss, 1);
    end

    $display("stall cycles %0d, section-conflict cycles %0d", total_stall, total_secconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
