// accprof_call_stack: LIFO of the functions that are currently active.
//
// The controller pushes one entry per prologue (the call-graph chunk index of
// the new call and its level) and pops one per epilogue. Because the caller
// of any new call is always the top entry, the caller's chunk and level are
// read with a plain peek instead of a walk through the call-graph RAM; this
// is the idea the design is built around.
//
// Interface: push/pop are single-cycle strobes; the entry is an opaque
// WIDTH-bit vector packed by the user. 'top' shows the current top entry
// combinationally (valid when !empty). push and pop in the same cycle replace
// the top entry. A push when full and a pop when empty are ignored; the
// controller flags those cases itself. Reset empties the stack.
//
// DEPTH defaults to 255 because the document stores the call level in one
// byte, so no deeper nesting could be recorded; the document does not give a
// stack depth.
module accprof_call_stack #(
  parameter int unsigned DEPTH = 255,
  parameter int unsigned WIDTH = 20,
  localparam int unsigned PTR_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic             full,
  output logic [PTR_W-1:0] depth
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] cnt;   // number of entries held; top is mem[cnt-1]

  assign empty = (cnt == '0);
  assign full  = (cnt == PTR_W'(DEPTH));
  assign depth = cnt;
  assign top   = empty ? '0 : mem[cnt - PTR_W'(1)];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (push && pop && !empty) begin
      mem[cnt - PTR_W'(1)] <= push_data;          // replace top
    end else if (push && !full) begin
      mem[cnt] <= push_data;
      cnt      <= cnt + PTR_W'(1);
    end else if (pop && !empty) begin
      cnt <= cnt - PTR_W'(1);
    end
  end

endmodule
