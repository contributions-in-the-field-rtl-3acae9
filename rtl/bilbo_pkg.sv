// bilbo_pkg: operating modes of a built-in logic block observer register.
//
// Origin: The four modes are those of a BILBO in the source architecture; their
// encoding is this design's choice.
package bilbo_pkg;
  typedef enum logic [1:0] {
    BILBO_LOAD  = 2'd0,   // normal parallel load (functional register)
    BILBO_SHIFT = 2'd1,   // serial shift register (scan)
    BILBO_PRPG  = 2'd2,   // autonomous pseudo-random pattern generator
    BILBO_MISR  = 2'd3    // multiple-input signature register
  } bilbo_mode_t;
endpackage
