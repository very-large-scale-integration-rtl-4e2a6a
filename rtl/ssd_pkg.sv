// ssd_pkg: constants and types shared by the sum-of-squared-differences
// device. The default sizes (seven operand pairs, 16-bit operands split into
// groups of four bits) are this design's choice: the source method leaves N,
// n and k open. The control word that the control unit broadcasts to every
// processing element is a packed struct so that all elements see one bundle.
package ssd_pkg;

  localparam int unsigned N_PE_DEF   = 7;   // N: operand pairs processed at once
  localparam int unsigned N_BITS_DEF = 16;  // n: operand width in bits
  localparam int unsigned K_DEF      = 4;   // k: bits per group (h = n/k groups)

  // Control word from the control unit to all processing elements.
  typedef struct packed {
    logic grp_en;     // a group of operand bits is present at the PE inputs
    logic grp_first;  // that group is the least significant one: borrow-in = 0
    logic ld_pc;      // load |dX| from the module calculator into PC
  } pe_ctrl_t;

endpackage
