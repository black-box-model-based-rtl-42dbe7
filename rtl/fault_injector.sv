// fault_injector: simulated stuck-at fault injection on the interconnect lines.
//
// While the control signal con is 0 the fault-free first-stage lines pass
// unchanged. While con is 1 every line selected in sa1 is forced to 1 and
// every line selected in sa0 is forced to 0; a line selected in both reads 0.
// The output is what the second stage would see without healing.
//
// Interface: int_good (decoder lines), con, sa1, sa0 in; int_actual out.
// Combinational. The con/stuck-at behaviour follows the source; the
// precedence for a line in both masks is this design's choice.
module fault_injector #(
  parameter int unsigned N_LINES = sh_pkg::N_LINES
) (
  input  logic [N_LINES-1:0] int_good,
  input  logic               con,
  input  logic [N_LINES-1:0] sa1,
  input  logic [N_LINES-1:0] sa0,
  output logic [N_LINES-1:0] int_actual
);

  always_comb begin
    if (con) int_actual = (int_good | sa1) & ~sa0;
    else     int_actual = int_good;
  end

endmodule
