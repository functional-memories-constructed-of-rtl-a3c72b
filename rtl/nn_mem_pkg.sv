// Shared types of the neural memory networks.
//
// rs_e encodes the three-valued reset input of the vector register. In the
// network that input takes the values {0,1,2} (scaled to {0,0.5,1}); here it is
// a two-bit binary code, which is this design's choice. Code 3 is unused and
// acts like RS_NONE.
package nn_mem_pkg;
  typedef enum logic [1:0] {
    RS_NONE = 2'd0,  // no reset
    RS_ALL  = 2'd1,  // initial reset: counters to 0, words to "meaningless"
    RS_RC   = 2'd2   // read-counter reset only
  } rs_e;
endpackage
