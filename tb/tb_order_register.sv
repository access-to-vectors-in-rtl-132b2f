// Testbench for order_register (T = 8): after eight captures the head
// must present the captured banks in capture order, repeating for as many
// rotations as are applied; idle cycles must not move it.
module tb_order_register;
  localparam int unsigned T_LOG = 3;
  localparam int unsigned T     = 1 << T_LOG;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             capture, rotate;
  logic [T_LOG-1:0] capture_bank, head;

  order_register dut (.*);

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
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [T_LOG-1:0] ord [T];
    capture = 0; rotate = 0; capture_bank = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 5; trial++) begin
      // a random permutation
      for (int i = 0; i < T; i++) ord[i] = T_LOG'(i);
      for (int i = T - 1; i > 0; i--) begin
        int j;
        logic [T_LOG-1:0] t;
        j = $urandom_range(0, i);
        t = ord[i]; ord[i] = ord[j]; ord[j] = t;
      end
      for (int i = 0; i < T; i++) begin
        @(negedge clk);
        capture = 1'b1; capture_bank = ord[i];
      end
      @(negedge clk);
      capture = 1'b0;
      for (int n = 0; n < 4 * T; n++) begin
        check(head == ord[n % T], $sformatf("head after %0d rotations", n));
        rotate = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (!rotate) begin
          check(head == ord[n % T], "idle keeps head");
          rotate = 1'b1;
          @(negedge clk);
        end
        rotate = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
