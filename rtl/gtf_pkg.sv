// Shared constants and types of the folded gammatone filter.
//
// The second-order section is folded with folding factor K = 5: every
// functional unit executes one operation in each of the time steps
// m = 0..4 of an iteration, and the switch settings repeat every 5 clock
// cycles (switching instances 5l+m).  The filter order (eight) is reached
// with four second-order sections in cascade.  Data and coefficient widths
// live in the modules as parameters; only the numbers that the whole design
// shares are kept here.
package gtf_pkg;

  // Folding factor: number of operations time-multiplexed on one unit.
  localparam int unsigned K = 5;

  // Number of cascaded second-order sections (eighth-order filter).
  localparam int unsigned N_SECT = 4;

  // Number of coefficients of one section: b0, b1, b2, a1, a2.
  localparam int unsigned N_COEF = 5;

  // Folding time step m of the switching instance 5l+m.
  typedef logic [2:0] fold_step_t;

  // Index of a coefficient within a section's coefficient vector.
  typedef enum logic [2:0] {
    C_B0 = 3'd0,
    C_B1 = 3'd1,
    C_B2 = 3'd2,
    C_A1 = 3'd3,
    C_A2 = 3'd4
  } coef_idx_e;

endpackage
