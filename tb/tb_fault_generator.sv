// tb_fault_generator: checks the fault scenario lookup.
// Codes 4'b0100 and 4'b1000 must give the two scenarios of the reference
// campaign (int(1) stuck at 1; int(1) stuck at 1 with int(4) stuck at 0).
// Every code is checked against the scenario list written out below, and the
// table as a whole must hit every line both stuck at 1 and stuck at 0.
module tb_fault_generator;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] fg;
  logic [7:0] sa1, sa0;
  logic [7:0] seen1, seen0;

  fault_generator dut (.fg(fg), .sa1(sa1), .sa0(sa0));

  // Expected scenarios as lists of stuck lines (-1 ends a list).
  function automatic void expected(input int code, output logic [7:0] e1, output logic [7:0] e0);
    e1 = '0; e0 = '0;
    case (code)
      1:  e1[0] = 1;
      2:  e0[0] = 1;
      3:  e1[7] = 1;
      4:  e1[1] = 1;
      5:  e0[7] = 1;
      6:  begin e1[2] = 1; e1[3] = 1; end
      7:  begin e1[6] = 1; e0[5] = 1; end
      8:  begin e1[1] = 1; e0[4] = 1; end
      9:  e0[2] = 1;
      10: e1[3] = 1;
      11: e1[5] = 1;
      12: e0[6] = 1;
      13: e1 = '1;
      14: e0 = '1;
      15: for (int k = 0; k < 8; k++) if (k % 2 == 0) e1[k] = 1; else e0[k] = 1;
      default: ;
    endcase
  endfunction

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s fg=%b got %b expected %b", what, fg, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e1, e0;
    // Reference campaign scenarios
    fg = 4'b0100; @(posedge clk);
    check("campaign sa1", sa1, 8'b0000_0010);
    check("campaign sa0", sa0, 8'b0000_0000);
    fg = 4'b1000; @(posedge clk);
    check("campaign sa1", sa1, 8'b0000_0010);
    check("campaign sa0", sa0, 8'b0001_0000);
    // Whole table
    seen1 = '0; seen0 = '0;
    for (int c = 0; c < 16; c++) begin
      fg = 4'(c);
      @(posedge clk);
      expected(c, e1, e0);
      check("sa1", sa1, e1);
      check("sa0", sa0, e0);
      checks++;
      if ((sa1 & sa0) != '0) begin
        failures++;
        $display("FAIL fg=%b line both stuck at 0 and 1", fg);
      end
      seen1 |= sa1; seen0 |= sa0;
    end
    check("coverage sa1", seen1, 8'hFF);
    check("coverage sa0", seen0, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
