// noc_codec_pkg: shared types and constants of the NoC link encoders.
//
// The link is a word of W lines. Line positions count from 0; "odd
// inversion" inverts positions 1,3,5,..., "even inversion" positions
// 0,2,4,..., "full inversion" every line. The masks below are wide enough for
// any W up to MAX_W and are sliced by the modules.
//
// inv_code_e is the scheme III action code, {odd bit, even bit}: it is also
// the value that lands on the two top link lines, because those lines enter
// the encoder as 0 and line W-1 is odd, line W-2 even (W even).
//
// link_stats_t holds the transition counts of the link power model
// P ~ T(0->1)*Cs + (T1 + 2*T2)*Cc.
package noc_codec_pkg;

  localparam int unsigned MAX_W = 256;
  localparam logic [MAX_W-1:0] ODD_MASK  = {(MAX_W/2){2'b10}};
  localparam logic [MAX_W-1:0] EVEN_MASK = {(MAX_W/2){2'b01}};

  typedef enum logic [1:0] {
    INV_NONE = 2'b00,
    INV_EVEN = 2'b01,
    INV_ODD  = 2'b10,
    INV_FULL = 2'b11
  } inv_code_e;

  localparam int unsigned STAT_W = 32;

  typedef struct packed {
    logic [STAT_W-1:0] t01;     // 0->1 transitions of single lines (self)
    logic [STAT_W-1:0] t1;      // Type I pair transitions
    logic [STAT_W-1:0] t2;      // Type II
    logic [STAT_W-1:0] t3;      // Type III
    logic [STAT_W-1:0] t4;      // Type IV
    logic [STAT_W-1:0] coupling; // T1 + 2*T2, the Cc weight of the power model
  } link_stats_t;

endpackage
