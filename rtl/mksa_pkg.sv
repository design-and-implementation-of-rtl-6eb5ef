// Shared types and constants of the modified Kogge-Stone adder.
//
// pg_t bundles a group generate and a group propagate signal, the pair that
// every prefix cell consumes and black cells produce. WIDTH is the operand
// width of the adder; the modified carry network is laid out for 8 bits, the
// width the design is presented at.
package mksa_pkg;

  localparam int unsigned WIDTH = 8;

  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate
  } pg_t;

endpackage
