// accprof_pkg: types and constants shared by the call-graph profiling IP.
//
// The IP takes one 64-bit "metadata" word plus seven 64-bit count words per
// profiling record. Every profiled call owns one 64-byte chunk (eight 64-bit
// words) of the call-graph RAM. The byte layout of the metadata word is:
//   bytes 0..5  event IDs of the six counted events (written by software)
//   byte  6     function ID; 0 marks an epilogue record, >0 a prologue
//   byte  7     call level, filled in by the hardware (1 = outermost)
// The chunk layout is word 0 = metadata with the level, word 1 = processor
// cycles, words 2..7 = event counts 1..6. The split of the word into six
// event bytes, a function-ID byte and a level byte follows the document; the
// byte order and the chunk word order are this design's choice.
package accprof_pkg;

  localparam int unsigned DATA_W          = 64;  // register and RAM word width
  localparam int unsigned NUM_EVENTS      = 6;   // user-selected PMU events
  localparam int unsigned NUM_COUNTS      = NUM_EVENTS + 1; // cycles + events
  localparam int unsigned NUM_REGS        = 8;   // software-visible registers
  localparam int unsigned WORDS_PER_ENTRY = 8;   // 64-byte chunk per call
  localparam int unsigned ID_W            = 8;   // function / event ID width
  localparam int unsigned LEVEL_W         = 8;   // call level width

  // Register numbers (64-bit word offsets in the register window).
  localparam int unsigned REG_CYCLES = 0;        // 1..6 are the event counts
  localparam int unsigned REG_META   = 7;        // writing it starts the IP
  localparam int unsigned REG_STATUS = 8;        // read-only status word

  typedef logic [DATA_W-1:0] word_t;

  typedef struct packed {
    logic [LEVEL_W-1:0]                level;    // byte 7
    logic [ID_W-1:0]                   func_id;  // byte 6
    logic [NUM_EVENTS-1:0][ID_W-1:0]   event_id; // bytes 5..0
  } meta_t;

  // One record as handed from the register slave to the controller.
  typedef struct packed {
    meta_t                             meta;
    logic [NUM_COUNTS-1:0][DATA_W-1:0] counts;   // [0] = cycles
  } record_t;

  // Sticky error flags reported in the status word.
  typedef struct packed {
    logic ram_full;        // a prologue found no free chunk
    logic stack_overflow;  // a prologue found the stack full
    logic stack_underflow; // an epilogue found the stack empty
  } err_t;

endpackage
