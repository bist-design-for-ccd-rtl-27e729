// bist_pkg: types and helpers shared by the CCD soft-test/repair BIST.
//
// The defective pixel map keeps one 3-bit code per pixel. The codes 000..100
// are the ones the design's map defines (stuck low, low sensitive, stuck high,
// high sensitive, normal). 111 is this design's own addition: it is the erased
// state of the flash cell and means "not tested yet"; it is treated like
// normal (no repair). A code whose msb is 0 marks a recorded defect.
package bist_pkg;

  typedef enum logic [2:0] {
    MAP_STUCK_LOW  = 3'b000,
    MAP_LOW_SENS   = 3'b001,
    MAP_STUCK_HIGH = 3'b010,
    MAP_HIGH_SENS  = 3'b011,
    MAP_NORMAL     = 3'b100,
    MAP_ERASED     = 3'b111
  } map_code_e;

  // A recorded defect: repaired in every window, never overwritten by a test.
  function automatic logic is_defect(input logic [2:0] code);
    return code < 3'b100;
  endfunction

  // Number of pixel registers for n parallel test circuits: 9 + 3(n-1).
  function automatic int unsigned n_registers(input int unsigned n_tc);
    return 9 + 3 * (n_tc - 1);
  endfunction

endpackage
