// sh_healer: restores the faulty interconnect lines.
//
// For every line the comparator flags as faulty the healer toggles the line's
// logic state (a NOT gate on that line), which returns it to its fault-free
// value; lines not flagged pass through unchanged, which is the "no error"
// path of the block diagram. With the comparator's flags this makes
// int_healed equal to the desired first-stage output for any set of stuck-at
// lines, single or multiple.
//
// Interface: int_actual, err_lines in; int_healed out. Combinational.
// Toggle-on-error follows the source; the per-line selection between the
// inverted and the direct line is this design's gate-level reading of it.
module sh_healer #(
  parameter int unsigned N_LINES = sh_pkg::N_LINES
) (
  input  logic [N_LINES-1:0] int_actual,
  input  logic [N_LINES-1:0] err_lines,
  output logic [N_LINES-1:0] int_healed
);

  always_comb begin
    for (int m = 0; m < N_LINES; m++)
      int_healed[m] = err_lines[m] ? ~int_actual[m] : int_actual[m];
  end

endmodule
