// cfs_pkg: shared types of the comparison-free sorter.
//
// The sorter runs in two phases, write-evaluate and read-sort, bracketed by
// an idle state and a done state that holds the result. The phase encoding
// is this design's choice.
package cfs_pkg;

  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,  // waiting for start
    PH_WRITE = 2'd1,  // write-evaluate: record each element and its count
    PH_READ  = 2'd2,  // read-sort: walk all values, emit present ones
    PH_DONE  = 2'd3   // sorted array valid, held until the next start
  } phase_e;

endpackage
