// tb_sh_healer: flagged lines must be inverted and the others passed. Fed with
// the flags a comparator would give against a desired pattern, the healer
// must return exactly that pattern, for single and multiple faulty lines.
module tb_sh_healer;
  int checks = 0, failures = 0;
  int n_single = 0, n_multi = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] int_actual, err_lines, int_healed;
  logic [7:0] desired;

  sh_healer dut (.int_actual(int_actual), .err_lines(err_lines), .int_healed(int_healed));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Arbitrary flags: per-line invert or pass
    for (int i = 0; i < 1000; i++) begin
      int_actual = 8'($urandom);
      err_lines  = 8'($urandom);
      @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int_healed[k] !== (err_lines[k] ? !int_actual[k] : int_actual[k])) begin
          failures++;
          $display("FAIL actual=%b err=%b healed=%b", int_actual, err_lines, int_healed);
        end
      end
    end
    // Healing against a desired one-hot pattern with stuck lines
    for (int i = 0; i < 1000; i++) begin
      desired    = 8'b1 << ($urandom % 8);
      int_actual = desired;
      for (int k = 0; k < 8; k++)
        if ($urandom % 4 == 0) int_actual[k] = 1'($urandom);
      for (int k = 0; k < 8; k++) err_lines[k] = (int_actual[k] != desired[k]);
      @(posedge clk);
      checks++;
      if (int_healed !== desired) begin
        failures++;
        $display("FAIL heal actual=%b desired=%b healed=%b", int_actual, desired, int_healed);
      end
      if ($countones(err_lines) == 1) n_single++;
      if ($countones(err_lines) > 1)  n_multi++;
    end
    checks++;
    if (n_single == 0 || n_multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
