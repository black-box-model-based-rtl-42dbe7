// rom_or_array: second stage of the 8x8 ROM, one OR gate per output.
//
// Output f[j] (function F(j+1)) is the OR of the interconnect lines whose
// minterms belong to that function, as given by the FUNC_MINTERMS mask. With
// the default masks the outputs are the sums of minterms F1..F8 listed in
// sh_pkg.
//
// Interface: int_lines in, f out (f[0] = F1 ... f[7] = F8). Combinational.
// The OR-of-minterms structure and the functions follow the source; the
// bit order of f is this design's choice.
module rom_or_array #(
  parameter sh_pkg::func_table_t FUNC_MINTERMS = sh_pkg::FUNC_MINTERMS_DEFAULT
) (
  input  logic [sh_pkg::N_LINES-1:0] int_lines,
  output logic [sh_pkg::N_OUT-1:0]   f
);

  always_comb begin
    for (int j = 0; j < sh_pkg::N_OUT; j++)
      f[j] = |(int_lines & FUNC_MINTERMS[j]);
  end

endmodule
