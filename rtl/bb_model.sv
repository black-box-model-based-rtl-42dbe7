// bb_model: black box model of the first stage.
//
// The healer treats the ROM's first stage as a black box: it does not look at
// the decoder's gates, it only knows which line pattern each input combination
// must produce. This block holds that input-output relation as a table indexed
// by the primary inputs and returns the desired first-stage output.
//
// Interface: a in, int_desired out. Combinational. Using a lookup table for
// the known relation is this design's choice; the default contents (input m
// raises line m only) are the decoder's specified behaviour.
module bb_model #(
  parameter sh_pkg::line_table_t DESIRED = sh_pkg::DESIRED_DEFAULT
) (
  input  logic [sh_pkg::N_IN-1:0]    a,
  output logic [sh_pkg::N_LINES-1:0] int_desired
);

  always_comb int_desired = DESIRED[a];

endmodule
