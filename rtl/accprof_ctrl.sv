// accprof_ctrl: call-graph builder, the sequencing core of the profiling IP.
//
// Each record written by the instrumented application (metadata word plus
// cycles and six event counts) arrives with a one-cycle 'start' strobe. The
// function ID in the metadata selects one of two sequences:
//
//  * Prologue (function ID > 0), done in the start cycle itself:
//    the call stack is peeked; the new call gets the caller's level + 1, or
//    level 1 when the stack is empty. The metadata word with the level in its
//    top byte is written to word 0 of the next free chunk of the call-graph
//    RAM, that chunk index is pushed on the stack together with the level,
//    and the next-free register advances by one chunk (64 bytes).
//  * Epilogue (function ID = 0): the stack is popped; its top names the chunk
//    of the call that is ending (all its callees have already returned). The
//    seven counts are then written to words 1..7 of that chunk, one word per
//    cycle, while 'busy' is high: 1 + 7 cycles in all.
//
// The two sequences follow the document. Its own choices are: the one-word-
// per-cycle write, the 'busy' hand-shake, and the handling of the cases the
// document leaves open, all reported in the sticky 'err' flags:
//  * RAM full on a prologue: nothing is written, but an entry marked invalid
//    is still pushed so that the matching epilogue pops the right entry and
//    discards its counts;
//  * stack full on a prologue: the record is dropped;
//  * stack empty on an epilogue: the record is dropped.
//
// Interface: 'start' must only be given while 'busy' is low (asserted below);
// the record must stay stable in the start cycle only, it is copied then.
module accprof_ctrl
  import accprof_pkg::*;
#(
  parameter int unsigned ENTRIES     = 2048,
  localparam int unsigned IDX_W   = $clog2(ENTRIES),
  localparam int unsigned USED_W  = $clog2(ENTRIES + 1),
  localparam int unsigned ADDR_W  = IDX_W + $clog2(WORDS_PER_ENTRY),
  localparam int unsigned SE_W    = 1 + LEVEL_W + IDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // record from the register slave
  input  logic              start,
  input  record_t           rec,
  output logic              busy,
  // call-graph RAM write port
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_waddr,
  output word_t             ram_wdata,
  // call stack
  output logic              stk_push,
  output logic [SE_W-1:0]   stk_push_data,
  output logic              stk_pop,
  input  logic [SE_W-1:0]   stk_top,
  input  logic              stk_empty,
  input  logic              stk_full,
  // status
  output logic [USED_W-1:0] used,
  output err_t              err
);

  typedef struct packed {
    logic               valid;  // chunk was allocated in the RAM
    logic [LEVEL_W-1:0] level;
    logic [IDX_W-1:0]   idx;
  } stk_entry_t;

  typedef enum logic [0:0] {S_IDLE, S_WRITE} state_t;

  state_t                       state;
  logic [USED_W-1:0]            next_idx;   // next free chunk
  logic [IDX_W-1:0]             wr_idx;     // chunk being completed
  logic [2:0]                   wr_cnt;     // count word being written
  logic [NUM_COUNTS-1:0][DATA_W-1:0] counts_q;

  stk_entry_t top_e, new_e;
  logic       is_prologue, is_epilogue, ram_has_room;
  meta_t      meta_lvl;

  assign top_e        = stk_entry_t'(stk_top);
  assign is_prologue  = start && (state == S_IDLE) && (rec.meta.func_id != '0);
  assign is_epilogue  = start && (state == S_IDLE) && (rec.meta.func_id == '0);
  assign ram_has_room = (next_idx != USED_W'(ENTRIES));

  always_comb begin
    new_e.valid = ram_has_room;
    new_e.level = stk_empty ? LEVEL_W'(1) : top_e.level + LEVEL_W'(1);
    new_e.idx   = ram_has_room ? next_idx[IDX_W-1:0] : '0;
    meta_lvl       = rec.meta;
    meta_lvl.level = new_e.level;
  end

  assign stk_push      = is_prologue && !stk_full;
  assign stk_push_data = SE_W'(new_e);
  assign stk_pop       = is_epilogue && !stk_empty;

  always_comb begin
    ram_we    = 1'b0;
    ram_waddr = '0;
    ram_wdata = '0;
    if (is_prologue && !stk_full && ram_has_room) begin
      ram_we    = 1'b1;
      ram_waddr = {next_idx[IDX_W-1:0], 3'd0};
      ram_wdata = word_t'(meta_lvl);
    end else if (state == S_WRITE) begin
      ram_we    = 1'b1;
      ram_waddr = {wr_idx, wr_cnt + 3'd1};
      ram_wdata = counts_q[wr_cnt];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      next_idx <= '0;
      wr_idx   <= '0;
      wr_cnt   <= '0;
      err      <= '0;
      counts_q <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (is_prologue) begin
            if (stk_full)           err.stack_overflow <= 1'b1;
            else if (!ram_has_room) err.ram_full       <= 1'b1;
            else                    next_idx <= next_idx + USED_W'(1);
          end else if (is_epilogue) begin
            if (stk_empty) begin
              err.stack_underflow <= 1'b1;
            end else if (top_e.valid) begin
              wr_idx   <= top_e.idx;
              wr_cnt   <= '0;
              counts_q <= rec.counts;
              state    <= S_WRITE;
            end
          end
        end
        S_WRITE: begin
          if (wr_cnt == 3'(NUM_COUNTS - 1)) state <= S_IDLE;
          wr_cnt <= wr_cnt + 3'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign used = next_idx;

  // A new record must not arrive while counts are still being written.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
