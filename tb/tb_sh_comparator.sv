// tb_sh_comparator: random check of the per-line mismatch flags and the
// summary error flag, including the all-equal (no error) case.
module tb_sh_comparator;
  int checks = 0, failures = 0;
  int n_err = 0, n_ok = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] int_actual, int_desired, err_lines;
  logic       error;

  sh_comparator dut (.int_actual(int_actual), .int_desired(int_desired),
                     .err_lines(err_lines), .error(error));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int_desired = 8'($urandom);
      // Half the time equal, otherwise a random number of differing lines
      int_actual  = (i % 2 == 0) ? int_desired : 8'($urandom);
      @(posedge clk);
      begin
        logic any;
        any = 1'b0;
        for (int k = 0; k < 8; k++) begin
          logic differs;
          differs = (int_actual[k] != int_desired[k]);
          any |= differs;
          checks++;
          if (err_lines[k] !== differs) begin
            failures++;
            $display("FAIL line %0d actual=%b desired=%b flag=%b", k, int_actual[k], int_desired[k], err_lines[k]);
          end
        end
        checks++;
        if (error !== any) begin
          failures++;
          $display("FAIL error=%b expected %b", error, any);
        end
        if (any) n_err++; else n_ok++;
      end
    end
    checks++;
    if (n_err == 0 || n_ok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
