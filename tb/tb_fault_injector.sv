// tb_fault_injector: random check of stuck-at injection.
// With con = 0 the lines must pass unchanged; with con = 1 each line selected
// for stuck-at-0 must read 0, else each selected for stuck-at-1 must read 1,
// else it keeps its fault-free value. Expected values are worked out line by
// line here.
module tb_fault_injector;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] int_good, sa1, sa0, int_actual;
  logic       con;

  fault_injector dut (.int_good(int_good), .con(con), .sa1(sa1), .sa0(sa0),
                      .int_actual(int_actual));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int_good = 8'($urandom);
      sa1      = 8'($urandom);
      sa0      = 8'($urandom);
      con      = 1'($urandom);
      @(posedge clk);
      if (con) n_on++; else n_off++;
      for (int k = 0; k < 8; k++) begin
        logic e;
        if (!con)        e = int_good[k];
        else if (sa0[k]) e = 1'b0;
        else if (sa1[k]) e = 1'b1;
        else             e = int_good[k];
        checks++;
        if (int_actual[k] !== e) begin
          failures++;
          $display("FAIL con=%b good=%b sa1=%b sa0=%b line %0d = %b", con, int_good, sa1, sa0, k, int_actual[k]);
        end
      end
    end
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
