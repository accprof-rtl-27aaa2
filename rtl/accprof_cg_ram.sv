// accprof_cg_ram: call-graph block RAM.
//
// Holds ENTRIES chunks of WORDS_PER_ENTRY 64-bit words, one chunk per profiled
// call, stored in call order. Word address = {chunk index, word in chunk}.
// Simple dual port: port A (controller) writes one word per cycle, port B
// (host read-back) reads one word per cycle with one cycle of latency, the
// usual registered-output block RAM. A read and a write of the same word in
// the same cycle return the old contents.
//
// The default of 2048 chunks (128 KiB) follows the document's sizing of
// 64 bytes per call and "almost 128 KBytes" for the 2000 calls of its largest
// workload; the dual-port organisation and read latency are this design's.
// The array is not reset: software only reads chunks the controller has
// written, and the status word says how many those are.
module accprof_cg_ram #(
  parameter int unsigned ENTRIES         = 2048,
  parameter int unsigned WORDS_PER_ENTRY = 8,
  parameter int unsigned DATA_W          = 64,
  localparam int unsigned DEPTH  = ENTRIES * WORDS_PER_ENTRY,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
