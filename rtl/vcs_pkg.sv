// vcs_pkg: types and constants shared by the Voter-Comparator-Switch (VCS).
//
// Computers (and the input channels wired to them) are numbered 0..3 for
// A..D. Every 4-bit computer mask in the design uses bit i for computer i.
// The three 4x4 matrices (P, R, S) are kept as 16-bit vectors in which bit
// 4*row+col is the element of that row and column; the row is the computer
// that owns (writes) it, so bit k-1 is the flip-flop the specification
// numbers k (row A = 1..4, row B = 5..8, ...). Byte bit positions 1..8 of
// the specification map to bits [0]..[7] of a byte.
package vcs_pkg;

  localparam int unsigned NUM_CH        = 4;   // input channels / computers
  localparam int unsigned BYTE_BITS     = 8;   // computer interface byte
  localparam int unsigned WORD_BITS     = 16;  // LP bus data word
  localparam int unsigned FRAME_BITS    = 17;  // LP bus word plus odd parity
  localparam int unsigned VOTE_TIMEOUT  = 15;  // bit times the voter waits for late data
  localparam int unsigned BAD_PAR_TIME  = 2;   // bit times the parity bad line is held
  localparam int unsigned STROBE_TIME   = 2;   // bit times a strobe to the computers is held
  localparam int unsigned CLK_DIV       = 9;   // host clock periods per bit time

  // Matrix operation field of the control byte, bits 3 2 1.
  typedef enum logic [2:0] {
    OP_SET_ALL     = 3'b000,  // set R and P rows, clear S row
    OP_SET_RP      = 3'b001,  // set R and P rows
    OP_CLR_S       = 3'b011,  // clear S row
    OP_SAMPLE_ALL  = 3'b100,  // R, P and S, six bytes
    OP_SAMPLE_DIAG = 3'b110,  // P diagonal and operating mode register, one byte
    OP_SAMPLE_S    = 3'b111   // S, two bytes
  } opcode_e;

  // The fifteen voting-mode terms of the matrix section.
  typedef struct packed {
    logic       v4way;  // all four computers
    logic [3:0] v3way;  // [0]=ABC [1]=ABD [2]=ACD [3]=BCD
    logic [5:0] comp;   // [0]=AB [1]=AC [2]=AD [3]=BC [4]=BD [5]=CD
    logic [3:0] slct;   // selector, one computer
  } mode_terms_t;

  // Control byte: bits 1-3 operation, bit 4 type, bits 5-8 VCS address.
  typedef struct packed {
    logic [3:0] addr;   // one bit per VCS unit
    logic       matrix; // 0 = voter operation, 1 = matrix operation
    logic [2:0] op;
  } control_byte_t;

  // Odd parity bit for a byte: the nine bits together hold an odd number of ones.
  function automatic logic odd_parity(input logic [7:0] b);
    return ~(^b);
  endfunction

  function automatic logic [2:0] count4(input logic [3:0] m);
    return 3'(m[0]) + 3'(m[1]) + 3'(m[2]) + 3'(m[3]);
  endfunction

endpackage
