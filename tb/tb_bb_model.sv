// tb_bb_model: the black box model must give, for each input combination m,
// the first-stage pattern with only line m high.
module tb_bb_model;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] a;
  logic [7:0] int_desired;

  bb_model dut (.a(a), .int_desired(int_desired));

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
        if (int_desired[k] !== (k == m)) begin
          failures++;
          $display("FAIL a=%0d desired line %0d = %b", m, k, int_desired[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
