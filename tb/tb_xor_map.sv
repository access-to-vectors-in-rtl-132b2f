// Testbench for xor_map (M = 8, s = 3): the first nine rows of the
// eight-module XOR table (row r holds displacement r) must land in the
// printed columns, and for 4096 addresses the mapping must match a bitwise
// reference and be one-to-one.
module tb_xor_map;
  logic [15:0] addr;
  logic [2:0]  module_idx;
  logic [12:0] disp;

  xor_map dut (.*);

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
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int table_rows [9][8] = '{
    '{ 0,  1,  2,  3,  4,  5,  6,  7},
    '{ 9,  8, 11, 10, 13, 12, 15, 14},
    '{18, 19, 16, 17, 22, 23, 20, 21},
    '{27, 26, 25, 24, 31, 30, 29, 28},
    '{36, 37, 38, 39, 32, 33, 34, 35},
    '{45, 44, 47, 46, 41, 40, 43, 42},
    '{54, 55, 52, 53, 50, 51, 48, 49},
    '{63, 62, 61, 60, 59, 58, 57, 56},
    '{64, 65, 66, 67, 68, 69, 70, 71}};

  bit used [8][512];

  initial begin
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 8; c++) begin
        addr = 16'(table_rows[r][c]);
        #1;
        check(module_idx == 3'(c) && disp == 13'(r), $sformatf("table entry %0d", addr));
      end
    for (int a = 0; a < 4096; a++) begin
      logic [2:0] b;
      addr = 16'(a);
      #1;
      for (int i = 0; i < 3; i++) b[i] = addr[i] ^ addr[3 + i];
      check(module_idx == b && disp == 13'(a >> 3), "bitwise reference");
      check(!used[module_idx][disp], "one-to-one");
      used[module_idx][disp] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
