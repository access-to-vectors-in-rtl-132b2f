// Testbench for seq_addr_gen (T = 8, L = 64). For several (a0, stride, d,
// rotation) settings the generator is loaded at sequence 0 and advanced
// through all L elements; element indices and addresses are compared with
// a reference that builds each sequence directly from the definition
// (sequence q: j0 = q mod 2^d, j1 = q div 2^d, elements
// ((j1+rot) mod 2^nj1)*T*2^d + j0 + k*2^d). Loading at sequence 1 and
// advancing with gaps is checked as well.
module tb_seq_addr_gen;
  localparam int unsigned ADDR_W = 16;
  localparam int unsigned T_LOG  = 3;
  localparam int unsigned LAMBDA = 6;
  localparam int unsigned T      = 1 << T_LOG;
  localparam int unsigned L      = 1 << LAMBDA;
  localparam int unsigned QW     = LAMBDA - T_LOG;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              load, adv;
  logic [QW-1:0]     q_init;
  logic [ADDR_W-1:0] a0, stride, addr;
  logic [7:0]        d, nj1, rot;
  logic [LAMBDA-1:0] elem;
  logic [T_LOG-1:0]  k;
  logic [QW-1:0]     q;
  logic              last;

  seq_addr_gen dut (.*);

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_elem(input int qq, input int kk, input int dd,
                                  input int nn, input int rr);
    int dsz, j0, j1;
    dsz = 1 << dd;
    j0 = qq % dsz;
    j1 = ((qq / dsz) + rr) % (1 << nn);
    return j1 * T * dsz + j0 + kk * dsz;
  endfunction

  task automatic sweep(input int aa, input int ss, input int dd, input int rr,
                       input int q0, input bit gaps);
    @(negedge clk);
    a0 = ADDR_W'(aa); stride = ADDR_W'(ss); d = 8'(dd); nj1 = 8'(LAMBDA - T_LOG - dd);
    rot = 8'(rr); q_init = QW'(q0); load = 1'b1; adv = 1'b0;
    @(negedge clk);
    load = 1'b0;
    for (int qq = q0; qq < (1 << QW); qq++)
      for (int kk = 0; kk < T; kk++) begin
        int e;
        e = ref_elem(qq, kk, dd, LAMBDA - T_LOG - dd, rr);
        check(int'(elem) == e && addr == ADDR_W'(aa + ss * e) && int'(q) == qq && int'(k) == kk,
              $sformatf("d=%0d rot=%0d q=%0d k=%0d: elem %0d addr %0d", dd, rr, qq, kk, elem, addr));
        check(last == (qq == (1 << QW) - 1 && kk == T - 1), "last flag");
        if (gaps && $urandom_range(0, 2) == 0) begin
          adv = 1'b0;
          @(negedge clk);
        end
        adv = 1'b1;
        @(negedge clk);
        adv = 1'b0;
      end
  endtask

  initial begin
    load = 0; adv = 0; q_init = '0; a0 = '0; stride = '0; d = '0; nj1 = '0; rot = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    sweep(32, 20, 1, 0, 0, 0);   // example stream, family x = 2
    sweep(32, 40, 0, 0, 0, 0);   // family x = 3
    sweep(1000, 3, 3, 0, 0, 1);  // family x = 0
    sweep(7, 12, 1, 1, 1, 1);    // rotated, starting at sequence 1
    sweep(65000, 6, 2, 1, 0, 1); // address wrap-around
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
