// rc_pkg: types shared by the route-lookup cache blocks.
//
// res_kind_e   how a lookup of the pipelined direct-mapped cache was answered:
//              main-cache hit, victim-cache hit, real miss (a new routing-table
//              search) or pseudo-miss (the address was already being searched).
// repl_mode_e  replacement policy of the TCAM route cache: plain LRU, LAR
//              (Least Access and Recently used) or RLAI (Relatively Least Average
//              Interval).
// samp_mode_e  port-error sampling technique: none, interval, selective,
//              adaptive, or every-hit (the ideal reference that checks every hit).
package rc_pkg;

  typedef enum logic [1:0] {
    RES_HIT    = 2'd0,
    RES_VC_HIT = 2'd1,
    RES_MISS   = 2'd2,
    RES_PSEUDO = 2'd3
  } res_kind_e;

  typedef enum logic [1:0] {
    REPL_LRU  = 2'd0,
    REPL_LAR  = 2'd1,
    REPL_RLAI = 2'd2
  } repl_mode_e;

  typedef enum logic [2:0] {
    SAMP_NONE      = 3'd0,
    SAMP_INTERVAL  = 3'd1,
    SAMP_SELECTIVE = 3'd2,
    SAMP_ADAPTIVE  = 3'd3,
    SAMP_EVERY_HIT = 3'd4
  } samp_mode_e;

endpackage
