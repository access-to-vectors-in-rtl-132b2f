// Testbench for addr_buffers (two banks of eight entries): random writes to
// both banks, each read compared with a reference copy; writing one bank
// must leave the other unchanged.
module tb_addr_buffers;
  localparam int unsigned ADDR_W = 16;
  localparam int unsigned T_LOG  = 3;
  localparam int unsigned LAMBDA = 6;
  localparam int unsigned T      = 1 << T_LOG;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              wr_en, wr_bank, rd_bank;
  logic [T_LOG-1:0]  wr_idx, rd_idx;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [LAMBDA-1:0] wr_elem, rd_elem;

  addr_buffers dut (.*);

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

  logic [ADDR_W-1:0] ra [2][T];
  logic [LAMBDA-1:0] re [2][T];

  initial begin
    wr_en = 0; wr_bank = 0; rd_bank = 0; wr_idx = '0; rd_idx = '0; wr_addr = '0; wr_elem = '0;
    // initialise both banks
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < T; i++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = b[0]; wr_idx = T_LOG'(i);
        wr_addr = ADDR_W'($urandom); wr_elem = LAMBDA'($urandom);
        ra[b][i] = wr_addr; re[b][i] = wr_elem;
      end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_bank = $urandom_range(0, 1);
      wr_idx = T_LOG'($urandom);
      wr_addr = ADDR_W'($urandom); wr_elem = LAMBDA'($urandom);
      rd_bank = $urandom_range(0, 1);
      rd_idx = T_LOG'($urandom);
      #1;
      check(rd_addr == ra[rd_bank][rd_idx] && rd_elem == re[rd_bank][rd_idx],
            "read matches last write");
      if (wr_en) begin
        ra[wr_bank][wr_idx] = wr_addr;
        re[wr_bank][wr_idx] = wr_elem;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
