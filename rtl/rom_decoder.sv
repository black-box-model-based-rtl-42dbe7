// rom_decoder: first stage of the 8x8 ROM, a 3-to-8 line decoder.
//
// Each output line int(m) is the AND of the three input literals that make up
// minterm m, so exactly one line is high for every input combination. In the
// ROM these lines are the interconnect between the decoder and the OR array,
// and they are where stuck-at faults are injected and healed.
//
// Interface: a = A(N_IN-1..0), int_lines[m] = minterm m. Purely combinational,
// no clock. The AND-gate decoder is the ROM structure described for the
// design; the generic width parameter is this design's own.
module rom_decoder #(
  parameter int unsigned N_IN    = sh_pkg::N_IN,
  parameter int unsigned N_LINES = 1 << N_IN
) (
  input  logic [N_IN-1:0]    a,
  output logic [N_LINES-1:0] int_lines
);

  // AND of literals: bit k of m selects A(k) or its complement.
  always_comb begin
    for (int m = 0; m < N_LINES; m++) begin
      logic term;
      term = 1'b1;
      for (int k = 0; k < N_IN; k++)
        term &= m[k] ? a[k] : ~a[k];
      int_lines[m] = term;
    end
  end

endmodule
