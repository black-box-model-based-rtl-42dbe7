// sh_pkg: sizes, table types and default tables shared by the self-healing ROM.
//
// The circuit under test is an 8x8 ROM: a 3-to-8 decoder (first stage) whose
// eight minterm lines int(0..7) feed eight OR gates (second stage) that form
// the functions F1..F8. This package holds
//   * the sizes (3 inputs, 8 interconnect lines, 8 outputs, 4-bit fault code),
//   * the ROM contents as one minterm mask per output function,
//   * the table that turns the 4-bit fault generator code into stuck-at masks.
//
// Table encodings:
//   FUNC_MINTERMS[j][m] = 1 when minterm m belongs to output F(j+1);
//   output bit f[j] carries F(j+1).
//   The function masks are the sums of minterms given for the CUT:
//     F1 = S(1,3,5,7)   F2 = S(0,1,4,5)   F3 = S(2,3,4,5,6) F4 = S(3,4,7)
//     F5 = S(0,1,2,3)   F6 = S(0,5,6)     F7 = S(2,3,4,5)   F8 = S(1,2,3,4,5,6)
//   FAULT_TABLE[code] holds a stuck-at-1 mask and a stuck-at-0 mask over the
//   interconnect lines. Codes 4'b0100 (int(1) stuck at 1) and 4'b1000 (int(1)
//   stuck at 1 together with int(4) stuck at 0) are the scenarios of the
//   reference fault campaign; the other fourteen codes are this design's own
//   choice, picked so that every line is hit stuck-at-1 and stuck-at-0 by some
//   code, singly and in combination.
package sh_pkg;

  localparam int unsigned N_IN    = 3;            // primary inputs A(2..0)
  localparam int unsigned N_LINES = 1 << N_IN;    // interconnect lines int(0..7)
  localparam int unsigned N_OUT   = 8;            // primary outputs F1..F8
  localparam int unsigned FG_W    = 4;            // fault generator code width

  // One minterm mask per output function.
  typedef logic [N_OUT-1:0][N_LINES-1:0] func_table_t;

  // Desired first-stage output for each input combination.
  typedef logic [N_LINES-1:0][N_LINES-1:0] line_table_t;

  // One fault scenario: which lines are stuck at 1 and which at 0.
  typedef struct packed {
    logic [N_LINES-1:0] sa1;
    logic [N_LINES-1:0] sa0;
  } fault_t;

  typedef fault_t [(1<<FG_W)-1:0] fault_table_t;

  localparam func_table_t FUNC_MINTERMS_DEFAULT = '{
    8'h7E,   // F8 = S(1,2,3,4,5,6)
    8'h3C,   // F7 = S(2,3,4,5)
    8'h61,   // F6 = S(0,5,6)
    8'h0F,   // F5 = S(0,1,2,3)
    8'h98,   // F4 = S(3,4,7)
    8'h7C,   // F3 = S(2,3,4,5,6)
    8'h33,   // F2 = S(0,1,4,5)
    8'hAA    // F1 = S(1,3,5,7)
  };

  // Known input-output relation of the first stage: input m raises line m.
  function automatic line_table_t onehot_table();
    line_table_t t;
    for (int m = 0; m < N_LINES; m++) t[m] = N_LINES'(1) << m;
    return t;
  endfunction

  localparam line_table_t DESIRED_DEFAULT = onehot_table();

  // Fault scenarios, entry = '{sa1, sa0}; listed from code 15 down to code 0.
  localparam fault_table_t FAULT_TABLE_DEFAULT = '{
    '{8'h55, 8'hAA},   // 15: even lines stuck at 1, odd lines stuck at 0
    '{8'h00, 8'hFF},   // 14: every line stuck at 0
    '{8'hFF, 8'h00},   // 13: every line stuck at 1
    '{8'h00, 8'h40},   // 12: int(6) s-a-0
    '{8'h20, 8'h00},   // 11: int(5) s-a-1
    '{8'h08, 8'h00},   // 10: int(3) s-a-1
    '{8'h00, 8'h04},   //  9: int(2) s-a-0
    '{8'h02, 8'h10},   //  8: int(1) s-a-1 and int(4) s-a-0 (reference campaign)
    '{8'h40, 8'h20},   //  7: int(6) s-a-1 and int(5) s-a-0
    '{8'h0C, 8'h00},   //  6: int(2) and int(3) s-a-1
    '{8'h00, 8'h80},   //  5: int(7) s-a-0
    '{8'h02, 8'h00},   //  4: int(1) s-a-1 (reference campaign)
    '{8'h80, 8'h00},   //  3: int(7) s-a-1
    '{8'h00, 8'h01},   //  2: int(0) s-a-0
    '{8'h01, 8'h00},   //  1: int(0) s-a-1
    '{8'h00, 8'h00}    //  0: no fault
  };

endpackage
