// reshape_pkg: types and constants shared by the address generators, the
// dot-product units and the two accelerators.
//
// Data elements are 8-bit signed integers, as in both evaluated workloads.
// Sums are kept in 32-bit signed accumulators (a design choice: a
// 2048-term dot product of 8-bit values needs 27 bits, two k-tiles 28).
package reshape_pkg;

  localparam int unsigned ELEM_W = 8;    // element width of the workloads
  localparam int unsigned ACC_W  = 32;   // accumulator / result width

  typedef logic signed [ELEM_W-1:0] elem_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Phases of the tile engines.
  typedef enum logic [2:0] {
    PH_IDLE    = 3'd0,
    PH_LOAD_A  = 3'd1,   // tile fetch of the first operand
    PH_LOAD_B  = 3'd2,   // tile fetch of the second operand
    PH_COMPUTE = 3'd3,   // address-driven compute sweep
    PH_DRAIN   = 3'd4    // result tile streamed out
  } phase_e;

endpackage
