// self_healing_rom: 8x8 ROM with stuck-at fault injection and black-box-model
// self healing on its interconnect lines.
//
// Data path (all combinational):
//   a --> rom_decoder --int_good--> fault_injector --int_actual--+
//                                        ^   ^                   |
//               fg --> fault_generator --+   con                 v
//   a --> bb_model --int_desired--> sh_comparator <--------------+
//                                        | err_lines / error
//                                        v
//              int_actual --> sh_healer --int_healed--> rom_or_array --> f
//
// The decoder's eight minterm lines are the interconnect that may be stuck.
// When con is 1 the scenario chosen by fg forces some of them to 0 or 1.
// The black box model supplies what the lines must be for the present inputs;
// eight XORs flag every line that differs, and the healer inverts exactly
// those lines before the OR array, so f keeps its fault-free value for any
// combination of stuck-at faults on the interconnect lines.
//
// Ports: a = A(2..0); con = fault injection enable; fg = fault scenario code;
// f[j] = F(j+1); int_actual = interconnect lines as the faults leave them
// (the int(7..0) signal shown in fault campaigns); int_healed = lines after
// healing; err_lines = per-line fault flags; fault_detected = any line faulty.
// There is no clock: outputs follow the inputs after the gate delays.
// Structure and behaviour follow the source; the observation ports beyond a,
// con, fg and f are this design's addition.
module self_healing_rom #(
  parameter sh_pkg::func_table_t  FUNC_MINTERMS = sh_pkg::FUNC_MINTERMS_DEFAULT,
  parameter sh_pkg::line_table_t  DESIRED       = sh_pkg::DESIRED_DEFAULT,
  parameter sh_pkg::fault_table_t FAULT_TABLE   = sh_pkg::FAULT_TABLE_DEFAULT
) (
  input  logic [sh_pkg::N_IN-1:0]    a,
  input  logic                       con,
  input  logic [sh_pkg::FG_W-1:0]    fg,
  output logic [sh_pkg::N_OUT-1:0]   f,
  output logic [sh_pkg::N_LINES-1:0] int_actual,
  output logic [sh_pkg::N_LINES-1:0] int_healed,
  output logic [sh_pkg::N_LINES-1:0] err_lines,
  output logic                       fault_detected
);

  localparam int unsigned N_LINES = sh_pkg::N_LINES;

  logic [N_LINES-1:0] int_good;
  logic [N_LINES-1:0] int_desired;
  logic [N_LINES-1:0] sa1, sa0;

  // First stage of the ROM
  rom_decoder #(.N_IN(sh_pkg::N_IN)) u_decoder (
    .a         (a),
    .int_lines (int_good)
  );

  // Simulated fault injection on the interconnect lines
  fault_generator #(.FAULT_TABLE(FAULT_TABLE)) u_fault_gen (
    .fg  (fg),
    .sa1 (sa1),
    .sa0 (sa0)
  );

  fault_injector #(.N_LINES(N_LINES)) u_injector (
    .int_good   (int_good),
    .con        (con),
    .sa1        (sa1),
    .sa0        (sa0),
    .int_actual (int_actual)
  );

  // Self healing: black box model, comparator, healer
  bb_model #(.DESIRED(DESIRED)) u_bb_model (
    .a           (a),
    .int_desired (int_desired)
  );

  sh_comparator #(.N_LINES(N_LINES)) u_comparator (
    .int_actual  (int_actual),
    .int_desired (int_desired),
    .err_lines   (err_lines),
    .error       (fault_detected)
  );

  sh_healer #(.N_LINES(N_LINES)) u_healer (
    .int_actual (int_actual),
    .err_lines  (err_lines),
    .int_healed (int_healed)
  );

  // Second stage of the ROM
  rom_or_array #(.FUNC_MINTERMS(FUNC_MINTERMS)) u_or_array (
    .int_lines (int_healed),
    .f         (f)
  );

endmodule
