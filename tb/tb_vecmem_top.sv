// End-to-end testbench for vecmem_top at its default parameters.
//
// Single processor (M = T = 8, L = 64): a vector is stored with stride 20
// (reordered, conflict-free), loaded back and compared; a stride-16 load
// (unbalanced) must stall on module conflicts and still deliver the stored
// elements it reads. Multiprocessor (4 ports, T = 4, L = 32): the printed
// example stream a0 = 4, S = 4 is stored and loaded back conflict-free in
// L+T-1 cycles; a stride-16 stream must produce section conflicts and
// still complete. Unmatched memory (M = 16, T = 4, L = 32): a family-6
// stream, whose sequences walk the y-field, is stored and loaded back
// conflict-free in L+T-1 cycles, and a family-9 stream stalls and still
// delivers its elements.
// Each mechanism (reordered access, in-order access, module conflict
// stall, section conflict, y-field sequences of the unmatched memory,
// store, load) is counted and must occur.
module tb_vecmem_top;
  import vecmem_pkg::*;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned UL     = 64;
  localparam int unsigned UT     = 8;
  localparam int unsigned MP     = 4;
  localparam int unsigned ML     = 32;
  localparam int unsigned MT     = 4;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_reordered = 0, n_inorder = 0, n_mod_conflict = 0, n_sec_conflict = 0;
  int n_store = 0, n_load = 0, n_yfield = 0;

  always @(posedge clk) begin
    if (up_conflict || um_conflict || (mp_stall && !mp_section_conflict)) n_mod_conflict++;
    if (mp_section_conflict) n_sec_conflict++;
  end

  function automatic logic [DATA_W-1:0] val(input int e);
    return DATA_W'(32'hc2b2_ae35 * (e + 7));
  endfunction

  // ---------------- single processor ----------------
  int up_first, up_done_cyc;
  task automatic up_run(input mem_op_e o, input int aa, input int ss);
    up_first = -1; up_done_cyc = -1;
    @(negedge clk);
    up_start = 1; up_op = o; up_a0 = ADDR_W'(aa); up_stride = ADDR_W'(ss);
    @(negedge clk);
    up_start = 0;
    while (up_done_cyc < 0) begin
      @(posedge clk);
      if (up_bus_valid && up_bus_ready && up_first < 0) up_first = cycle;
      if (up_done) up_done_cyc = cycle;
    end
    if (up_reorder) n_reordered++; else n_inorder++;
    if (o == OP_STORE) n_store++; else n_load++;
  endtask

  // ---------------- multiprocessor ----------------
  int mp_first, mp_done_cyc;
  task automatic mp_run(input mem_op_e o, input int aa, input int ss);
    mp_first = -1; mp_done_cyc = -1;
    @(negedge clk);
    mp_start = 1; mp_op = o; mp_a0 = ADDR_W'(aa); mp_stride = ADDR_W'(ss);
    @(negedge clk);
    mp_start = 0;
    while (mp_done_cyc < 0) begin
      @(posedge clk);
      if (mp_req_valid[0] && mp_req_ready[0] && mp_first < 0) mp_first = cycle;
      if (mp_done) mp_done_cyc = cycle;
    end
    if (mp_reorder) n_reordered++; else n_inorder++;
    if (o == OP_STORE) n_store++; else n_load++;
  endtask

  // ---------------- unmatched memory ----------------
  int um_first, um_done_cyc;
  logic [3:0] um_mods [32];
  int um_n;
  bit um_yfield;
  task automatic um_run(input mem_op_e o, input int aa, input int ss);
    um_first = -1; um_done_cyc = -1;
    @(negedge clk);
    um_start = 1; um_op = o; um_a0 = ADDR_W'(aa); um_stride = ADDR_W'(ss);
    @(negedge clk);
    um_start = 0;
    um_n = 0;
    while (um_done_cyc < 0) begin
      @(posedge clk);
      if (um_bus_valid && um_bus_ready) begin
        if (um_first < 0) um_first = cycle;
        if (um_n < 32) um_mods[um_n] = um_bus_module;
        um_n++;
      end
      if (um_done) um_done_cyc = cycle;
    end
    // y-field sequences: within each group of four requests the section
    // part (low bits) of the module stays and the high bits all differ
    um_yfield = 1;
    for (int g = 0; g < 8; g++)
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++)
          if (um_mods[4*g+i][1:0] != um_mods[4*g+j][1:0] ||
              um_mods[4*g+i][3:2] == um_mods[4*g+j][3:2]) um_yfield = 0;
    if (um_reorder) n_reordered++; else n_inorder++;
    if (o == OP_STORE) n_store++; else n_load++;
  endtask

  initial begin
    int c0;
    up_start = 0; up_op = OP_LOAD; up_a0 = '0; up_stride = '0;
    up_host_we = 0; up_host_idx = '0; up_host_wdata = '0;
    mp_start = 0; mp_op = OP_LOAD; mp_a0 = '0; mp_stride = '0;
    mp_host_port = '0; mp_host_we = 0; mp_host_idx = '0; mp_host_wdata = '0;
    um_start = 0; um_op = OP_LOAD; um_a0 = '0; um_stride = '0;
    um_host_we = 0; um_host_idx = '0; um_host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // single processor: store stride 20, load it back
    for (int i = 0; i < UL; i++) begin
      @(negedge clk);
      up_host_we = 1; up_host_idx = 6'(i); up_host_wdata = val(i);
    end
    @(negedge clk);
    up_host_we = 0;
    c0 = n_mod_conflict;
    up_run(OP_STORE, 32, 20);
    check(up_done_cyc - up_first == UL + UT - 1, "uniprocessor store in L+T-1 cycles");
    for (int i = 0; i < UL; i++) begin
      @(negedge clk);
      up_host_we = 1; up_host_idx = 6'(i); up_host_wdata = '0;
    end
    @(negedge clk);
    up_host_we = 0;
    up_run(OP_LOAD, 32, 20);
    check(up_done_cyc - up_first == UL + UT - 1, "uniprocessor load in L+T-1 cycles");
    check(n_mod_conflict == c0, "no conflict on stride 20");
    for (int i = 0; i < UL; i++) begin
      @(negedge clk);
      up_host_idx = 6'(i);
      #1;
      check(up_host_rdata == val(i), "uniprocessor load data");
    end
    // unbalanced stride 80 = 5*16 from a0 = 32: the even elements of the
    // stride-20 stream stored above ... element i sits at 32 + 80 i =
    // element 4 i of the stride-20 stream for 4 i < 64
    up_run(OP_LOAD, 32, 80);
    check(n_mod_conflict > c0, "stride 80 causes module conflicts");
    for (int i = 0; i < UL / 4; i++) begin
      @(negedge clk);
      up_host_idx = 6'(i);
      #1;
      check(up_host_rdata == val(4 * i), "uniprocessor strided reload");
    end

    // multiprocessor: printed example a0 = 4, S = 4
    for (int p = 0; p < MP; p++)
      for (int e = 0; e < ML; e++) begin
        @(negedge clk);
        mp_host_we = 1; mp_host_port = 2'(p); mp_host_idx = 5'(e);
        mp_host_wdata = val(100 + p * ML + e);
      end
    @(negedge clk);
    mp_host_we = 0;
    c0 = n_sec_conflict;
    mp_run(OP_STORE, 4, 4);
    check(mp_done_cyc - mp_first == ML + MT - 1, "multiprocessor store in L+T-1 cycles");
    for (int p = 0; p < MP; p++)
      for (int e = 0; e < ML; e++) begin
        @(negedge clk);
        mp_host_we = 1; mp_host_port = 2'(p); mp_host_idx = 5'(e); mp_host_wdata = '0;
      end
    @(negedge clk);
    mp_host_we = 0;
    mp_run(OP_LOAD, 4, 4);
    check(mp_done_cyc - mp_first == ML + MT - 1, "multiprocessor load in L+T-1 cycles");
    check(n_sec_conflict == c0, "no section conflict on stride 4");
    for (int p = 0; p < MP; p++)
      for (int e = 0; e < ML; e++) begin
        @(negedge clk);
        mp_host_port = 2'(p); mp_host_idx = 5'(e);
        #1;
        check(mp_host_rdata == val(100 + p * ML + e), "multiprocessor load data");
      end
    // unbalanced stride 64 from a0 = 4: element n of this stream is element
    // 16 n of the stored one (port p, element e of the stored one is stream
    // element 32 p + e), defined for n < 8
    mp_run(OP_LOAD, 4, 64);
    check(n_sec_conflict > c0, "stride 64 causes section conflicts");
    for (int e = 0; e < 8; e++) begin
      @(negedge clk);
      mp_host_port = 2'(0); mp_host_idx = 5'(e);
      #1;
      check(mp_host_rdata == val(100 + 16 * e), "multiprocessor strided reload");
    end

    // unmatched memory: family 6 (s < x <= y) stored and loaded back
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      um_host_we = 1; um_host_idx = 5'(i); um_host_wdata = val(500 + i);
    end
    @(negedge clk);
    um_host_we = 0;
    c0 = n_mod_conflict;
    um_run(OP_STORE, 9, 5 * 64);
    check(um_reorder, "unmatched family 6 reordered");
    check(um_done_cyc - um_first == 32 + 4 - 1, "unmatched store in L+T-1 cycles");
    if (um_yfield) n_yfield++;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      um_host_we = 1; um_host_idx = 5'(i); um_host_wdata = '0;
    end
    @(negedge clk);
    um_host_we = 0;
    um_run(OP_LOAD, 9, 5 * 64);
    check(um_done_cyc - um_first == 32 + 4 - 1, "unmatched load in L+T-1 cycles");
    check(n_mod_conflict == c0, "no conflict on unmatched family 6");
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      um_host_idx = 5'(i);
      #1;
      check(um_host_rdata == val(500 + i), "unmatched reload");
    end
    // family 9 (above y): in order, stalls; its elements 0..3 are elements
    // 0, 8, 16, 24 of the family-6 stream stored above
    c0 = n_mod_conflict;
    um_run(OP_LOAD, 9, 5 * 512);
    check(!um_reorder, "unmatched family 9 issued in order");
    check(n_mod_conflict > c0, "unmatched family 9 stalls");
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      um_host_idx = 5'(i);
      #1;
      check(um_host_rdata == val(500 + 8 * i), "unmatched family 9 data");
    end

    $display("mechanisms: reordered %0d, in-order %0d, module conflicts %0d, section conflicts %0d, y-field %0d, stores %0d, loads %0d",
             n_reordered, n_inorder, n_mod_conflict, n_sec_conflict, n_yfield, n_store, n_load);
    check(n_reordered > 0, "reordered access happened");
    check(n_inorder > 0, "in-order access happened");
    check(n_mod_conflict > 0, "module conflict stall happened");
    check(n_sec_conflict > 0, "section conflict happened");
    check(n_yfield > 0, "y-field sequences of the unmatched memory happened");
    check(n_store > 0 && n_load > 0, "stores and loads happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
