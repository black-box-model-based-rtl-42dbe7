// fault_generator: 4-bit fault generator code -> stuck-at masks.
//
// The fault campaign picks a fault scenario with the code fg. This block looks
// the code up in a table of 16 scenarios and returns, for every interconnect
// line, whether it is to be stuck at 1 (sa1) and whether stuck at 0 (sa0).
// It only selects faults; whether they are applied is decided by the control
// signal in fault_injector.
//
// Interface: fg in, sa1/sa0 masks out (bit m = line int(m)). Combinational.
// The two scenarios of the reference campaign (code 0100: int(1) stuck at 1;
// code 1000: int(1) stuck at 1 and int(4) stuck at 0) follow the source; the
// remaining codes and the table form are this design's choice (see sh_pkg).
module fault_generator #(
  parameter sh_pkg::fault_table_t FAULT_TABLE = sh_pkg::FAULT_TABLE_DEFAULT
) (
  input  logic [sh_pkg::FG_W-1:0]    fg,
  output logic [sh_pkg::N_LINES-1:0] sa1,
  output logic [sh_pkg::N_LINES-1:0] sa0
);

  always_comb begin
    sa1 = FAULT_TABLE[fg].sa1;
    sa0 = FAULT_TABLE[fg].sa0;
  end

endmodule
