// tb_rom_or_array: the second stage must give F1..F8 as sums of minterms.
// Each function's minterm list is written out here; for a line pattern the
// function is 1 when any of its listed lines is high. All 256 patterns are
// applied, one-hot (normal ROM operation) and arbitrary.
module tb_rom_or_array;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] int_lines, f;

  rom_or_array dut (.int_lines(int_lines), .f(f));

  // Minterm lists of F1..F8, -1 terminated
  int minterms [8][8] = '{
    '{1, 3, 5, 7, -1, -1, -1, -1},
    '{0, 1, 4, 5, -1, -1, -1, -1},
    '{2, 3, 4, 5, 6, -1, -1, -1},
    '{3, 4, 7, -1, -1, -1, -1, -1},
    '{0, 1, 2, 3, -1, -1, -1, -1},
    '{0, 5, 6, -1, -1, -1, -1, -1},
    '{2, 3, 4, 5, -1, -1, -1, -1},
    '{1, 2, 3, 4, 5, 6, -1, -1}
  };

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      int_lines = 8'(p);
      @(posedge clk);
      for (int j = 0; j < 8; j++) begin
        logic e;
        e = 1'b0;
        for (int t = 0; t < 8; t++)
          if (minterms[j][t] >= 0 && int_lines[minterms[j][t]]) e = 1'b1;
        checks++;
        if (f[j] !== e) begin
          failures++;
          $display("FAIL lines=%b F%0d=%b expected %b", int_lines, j + 1, f[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
