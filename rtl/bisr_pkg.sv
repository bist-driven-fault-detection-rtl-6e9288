// bisr_pkg: types and constants shared by the microcode BIST / self-repair design.
//
// The 7-bit microcode word carries, from its most significant bit down: a valid
// flag (0 ends the test), the three element-position flags Fo / Io / Lo (first,
// in-between and last operation of a multi-operation March element; all zero for
// a single-operation element), the address order (1 = decreasing), the operation
// (1 = write) and the data polarity (1 = all ones). The program below is March SS,
// 22 operations per address; its encoding follows the source paper's instruction
// table. The mode encoding (1 = test, 2 = normal) follows the source paper's
// simulation traces; 0 = idle is this design's choice.
package bisr_pkg;

  typedef struct packed {
    logic valid;
    logic fo;
    logic io;
    logic lo;
    logic dir_down;
    logic wr;
    logic data;
  } inst_t;

  typedef enum logic [1:0] {
    MODE_IDLE   = 2'd0,
    MODE_TEST   = 2'd1,
    MODE_NORMAL = 2'd2
  } mode_e;

  // Number of operations March SS applies to each address.
  localparam int unsigned MARCH_SS_OPS = 22;

  // March SS:  M0 any(w0); M1 up(r0,r0,w0,r0,w1); M2 up(r1,r1,w1,r1,w0);
  //            M3 down(r0,r0,w0,r0,w1); M4 down(r1,r1,w1,r1,w0); M5 any(r0)
  // followed by a word with valid = 0.
  localparam logic [6:0] MARCH_SS [MARCH_SS_OPS+1] = '{
    7'h42,                                  // M0  w0
    7'h60, 7'h50, 7'h52, 7'h50, 7'h4B,      // M1  r0 r0 w0 r0 w1  (up)
    7'h61, 7'h51, 7'h53, 7'h51, 7'h4A,      // M2  r1 r1 w1 r1 w0  (up)
    7'h64, 7'h54, 7'h56, 7'h54, 7'h4F,      // M3  r0 r0 w0 r0 w1  (down)
    7'h65, 7'h55, 7'h57, 7'h55, 7'h4E,      // M4  r1 r1 w1 r1 w0  (down)
    7'h44,                                  // M5  r0
    7'h00                                   // end of test
  };

endpackage
