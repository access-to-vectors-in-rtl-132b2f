// Testbench for unmatched_xor_map (t = 2, s = 3, y = 7, 16 modules):
// addresses from the 16-module example table must land in the printed
// module and row, and over 4096 addresses the mapping must be one-to-one
// and put every 128-address block into a single section of four modules.
module tb_unmatched_xor_map;
  logic [15:0] addr;
  logic [3:0]  module_idx;
  logic [11:0] disp;

  unmatched_xor_map dut (.*);

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

  // {address, module, row}
  int exp [26][3] = '{
    '{0, 0, 0}, '{3, 3, 0}, '{4, 0, 1}, '{9, 0, 2}, '{10, 3, 2}, '{13, 0, 3},
    '{18, 0, 4}, '{27, 0, 6}, '{31, 0, 7}, '{32, 0, 8}, '{41, 0, 10},
    '{123, 0, 30}, '{120, 3, 30}, '{127, 0, 31}, '{128, 4, 0}, '{137, 4, 2},
    '{146, 4, 4}, '{155, 4, 6}, '{160, 4, 8}, '{256, 8, 0}, '{261, 9, 1},
    '{384, 12, 0}, '{507, 12, 30}, '{508, 15, 31}, '{519, 3, 33}, '{896, 12, 32}};

  bit used [16][256];

  initial begin
    for (int i = 0; i < 26; i++) begin
      addr = 16'(exp[i][0]);
      #1;
      check(module_idx == 4'(exp[i][1]) && disp == 12'(exp[i][2]),
            $sformatf("address %0d -> module %0d row %0d", addr, module_idx, disp));
    end
    for (int a = 0; a < 4096; a++) begin
      addr = 16'(a);
      #1;
      check(module_idx[3:2] == 2'((a >> 7) & 3), "block of 2^y in one section");
      check(!used[module_idx][disp], "one-to-one");
      used[module_idx][disp] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
