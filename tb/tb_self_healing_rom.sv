// tb_self_healing_rom: end-to-end test of the self-healing ROM at its default
// parameters.
//
// Part 1 replays the reference fault campaign at input A = 100: 500 time
// units fault free (con = 0, fg = 0100), then int(1) stuck at 1 (con = 1),
// then int(1) stuck at 1 and int(4) stuck at 0 (fg = 1000), then con back to 0.
// The observed interconnect lines must read 00010000, 00010010, 00000010 and
// 00010000 in turn, while the primary outputs keep their fault-free value.
// Part 2 sweeps every input, every fault code and both con values, and
// checks outputs, observed lines, healed lines and detection flags against a
// reference computed here from the sums of minterms and the fault scenarios.
// Every mechanism (no-error path, fault injection, detection, single and
// multiple line healing, a fault that would have corrupted the outputs) is
// counted and must occur at least once.
module tb_self_healing_rom;
  int checks = 0, failures = 0;
  int n_no_error = 0, n_injected = 0, n_detected = 0;
  int n_heal_single = 0, n_heal_multi = 0, n_masked = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] a;
  logic       con;
  logic [3:0] fg;
  logic [7:0] f, int_actual, int_healed, err_lines;
  logic       fault_detected;

  self_healing_rom dut (
    .a(a), .con(con), .fg(fg), .f(f), .int_actual(int_actual),
    .int_healed(int_healed), .err_lines(err_lines), .fault_detected(fault_detected)
  );

  // ---------------- reference ----------------
  int minterms [8][8] = '{
    '{1, 3, 5, 7, -1, -1, -1, -1},   // F1
    '{0, 1, 4, 5, -1, -1, -1, -1},   // F2
    '{2, 3, 4, 5, 6, -1, -1, -1},    // F3
    '{3, 4, 7, -1, -1, -1, -1, -1},  // F4
    '{0, 1, 2, 3, -1, -1, -1, -1},   // F5
    '{0, 5, 6, -1, -1, -1, -1, -1},  // F6
    '{2, 3, 4, 5, -1, -1, -1, -1},   // F7
    '{1, 2, 3, 4, 5, 6, -1, -1}      // F8
  };

  // Outputs of the ROM for a given set of interconnect line values
  function automatic logic [7:0] rom_out(input logic [7:0] lines);
    logic [7:0] r;
    r = '0;
    for (int j = 0; j < 8; j++)
      for (int t = 0; t < 8; t++)
        if (minterms[j][t] >= 0 && lines[minterms[j][t]]) r[j] = 1'b1;
    return r;
  endfunction

  // Fault scenarios by code: stuck-at-1 and stuck-at-0 line sets
  function automatic void scenario(input int code, output logic [7:0] s1, output logic [7:0] s0);
    s1 = '0; s0 = '0;
    case (code)
      1:  s1[0] = 1;
      2:  s0[0] = 1;
      3:  s1[7] = 1;
      4:  s1[1] = 1;
      5:  s0[7] = 1;
      6:  begin s1[2] = 1; s1[3] = 1; end
      7:  begin s1[6] = 1; s0[5] = 1; end
      8:  begin s1[1] = 1; s0[4] = 1; end
      9:  s0[2] = 1;
      10: s1[3] = 1;
      11: s1[5] = 1;
      12: s0[6] = 1;
      13: s1 = '1;
      14: s0 = '1;
      15: for (int k = 0; k < 8; k++) if (k % 2 == 0) s1[k] = 1; else s0[k] = 1;
      default: ;
    endcase
  endfunction

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b con=%b fg=%b: got %b expected %b", what, a, con, fg, got, exp);
    end
  endtask

  // Full check of the present inputs against the reference
  task automatic check_all();
    logic [7:0] good, s1, s0, faulty, flags;
    good = 8'b1 << a;
    scenario(int'(fg), s1, s0);
    faulty = con ? ((good | s1) & ~s0) : good;
    flags  = faulty ^ good;
    check("f", f, rom_out(good));
    check("int_actual", int_actual, faulty);
    check("int_healed", int_healed, good);
    check("err_lines", err_lines, flags);
    check("fault_detected", 8'(fault_detected), 8'(flags != '0));
    if (!con) n_no_error++;
    if (con && faulty != good) n_injected++;
    if (fault_detected) n_detected++;
    if ($countones(flags) == 1) n_heal_single++;
    if ($countones(flags) > 1)  n_heal_multi++;
    if (rom_out(faulty) != rom_out(good)) n_masked++;
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- Part 1: reference campaign at A = 100 ----
    logic [7:0] f_ref;
    a = 3'b100; fg = 4'b0100; con = 1'b0;
    f_ref = rom_out(8'b0001_0000);
    #250; check("campaign lines t<500", int_actual, 8'b0001_0000); check("campaign f", f, f_ref); check_all();
    #250; con = 1'b1;
    #250; check("campaign lines 500..999", int_actual, 8'b0001_0010); check("campaign f", f, f_ref); check_all();
    #250; fg = 4'b1000;
    #250; check("campaign lines 1000..1499", int_actual, 8'b0000_0010); check("campaign f", f, f_ref); check_all();
    #250; con = 1'b0;
    #250; check("campaign lines 1500..2000", int_actual, 8'b0001_0000); check("campaign f", f, f_ref); check_all();
    #250;

    // ---- Part 2: every input, fault code and control value ----
    for (int c = 0; c < 2; c++)
      for (int code = 0; code < 16; code++)
        for (int m = 0; m < 8; m++) begin
          a = 3'(m); fg = 4'(code); con = 1'(c);
          #1;
          check_all();
        end

    // ---- mechanisms ----
    checks++; if (n_no_error == 0)    begin failures++; $display("FAIL no-error path never used"); end
    checks++; if (n_injected == 0)    begin failures++; $display("FAIL no fault injected"); end
    checks++; if (n_detected == 0)    begin failures++; $display("FAIL no fault detected"); end
    checks++; if (n_heal_single == 0) begin failures++; $display("FAIL no single-line heal"); end
    checks++; if (n_heal_multi == 0)  begin failures++; $display("FAIL no multi-line heal"); end
    checks++; if (n_masked == 0)      begin failures++; $display("FAIL no output-corrupting fault healed"); end
    $display("mechanisms: no_error=%0d injected=%0d detected=%0d heal_single=%0d heal_multi=%0d output_faults_masked=%0d",
             n_no_error, n_injected, n_detected, n_heal_single, n_heal_multi, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
