// icache_pkg: types shared by the instruction cache's controller and datapath.
//
// The three controller states are the ones of the cache's state machine:
// flush after reset, tag compare in normal operation, and the main-memory
// read that replaces a line after a miss.
package icache_pkg;

  typedef enum logic [1:0] { ST_FLUSH, ST_TAGCMP, ST_MEMREAD } ic_state_e;

endpackage
