// tb_rom_decoder: exhaustive check of the 3-to-8 decoder.
// Every input combination must raise exactly the line of its minterm number;
// the expected line is computed here by counting, independent of the gates.
module tb_rom_decoder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] a;
  logic [7:0] int_lines;

  rom_decoder dut (.a(a), .int_lines(int_lines));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++) begin
      a = 3'(m);
      @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int_lines[k] !== (k == m)) begin
          failures++;
          $display("FAIL a=%0d line %0d = %b", m, k, int_lines[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
