// sh_comparator: fault detector of the self-healing scheme.
//
// One XOR gate per interconnect line compares the actual first-stage line with
// the desired one from the black box model. A high XOR output marks that line
// as faulty (err_lines); error is their OR and selects the healing path, while
// error = 0 is the "no error" path straight to the second stage.
//
// Interface: int_actual, int_desired in; err_lines, error out. Combinational.
// The per-line XORs follow the source; the summary error flag is the
// Error / No Error decision of the block diagram.
module sh_comparator #(
  parameter int unsigned N_LINES = sh_pkg::N_LINES
) (
  input  logic [N_LINES-1:0] int_actual,
  input  logic [N_LINES-1:0] int_desired,
  output logic [N_LINES-1:0] err_lines,
  output logic               error
);

  always_comb begin
    err_lines = int_actual ^ int_desired;
    error     = |err_lines;
  end

endmodule
