// accprof_top: FPGA call-graph profiling IP.
//
// An instrumented application reports each profiled call twice over a
// memory-mapped bus: at the prologue it writes a metadata word (function ID
// and the IDs of the six counted events); at the epilogue it writes the
// processor cycles and six event counts it read from its performance
// counters, then a metadata word with function ID 0. The IP turns this
// stream into a call graph in on-chip RAM, one 64-byte chunk per call in call
// order, each with the call's level in the call tree, so the application
// itself never touches a profiling data structure. A stack of active calls
// gives the caller of every new call at once.
//
// Blocks: accprof_regs (AXI4-Lite slave, eight 64-bit registers, status
// word, RAM read window), accprof_ctrl (prologue/epilogue sequences),
// accprof_call_stack (active calls), accprof_cg_ram (call-graph RAM).
// The bus is a 64-bit AXI4-Lite slave with an 18-bit byte address at the
// defaults; see accprof_regs for the address map. One clock, active-low
// synchronous reset.
//
// Defaults: 2048 chunks of 64 bytes (128 KiB, the document's sizing for its
// 2000-call workload); stack depth 255, as deep as a one-byte level can
// count (the document gives no depth).
module accprof_top
  import accprof_pkg::*;
#(
  parameter int unsigned ENTRIES     = 2048,
  parameter int unsigned STACK_DEPTH = 255,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned RAM_AW = IDX_W + $clog2(WORDS_PER_ENTRY),
  localparam int unsigned ADDR_W = RAM_AW + 4,
  localparam int unsigned USED_W = $clog2(ENTRIES + 1),
  localparam int unsigned SPTR_W = $clog2(STACK_DEPTH + 1),
  localparam int unsigned SE_W   = 1 + LEVEL_W + IDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_wvalid,
  output logic              s_wready,
  input  logic [63:0]       s_wdata,
  input  logic [7:0]        s_wstrb,
  output logic              s_bvalid,
  input  logic              s_bready,
  output logic [1:0]        s_bresp,
  input  logic              s_arvalid,
  output logic              s_arready,
  input  logic [ADDR_W-1:0] s_araddr,
  output logic              s_rvalid,
  input  logic              s_rready,
  output logic [63:0]       s_rdata,
  output logic [1:0]        s_rresp
);

  logic              start, busy;
  record_t           rec;
  logic [USED_W-1:0] used;
  err_t              err;
  logic              ram_we, ram_re;
  logic [RAM_AW-1:0] ram_waddr, ram_raddr;
  word_t             ram_wdata, ram_rdata;
  logic              stk_push, stk_pop, stk_empty, stk_full;
  logic [SE_W-1:0]   stk_push_data, stk_top;
  logic [SPTR_W-1:0] stk_depth;

  accprof_regs #(
    .ADDR_W(ADDR_W), .RAM_AW(RAM_AW), .USED_W(USED_W), .SPTR_W(SPTR_W)
  ) u_regs (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata,
    .s_wstrb, .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready,
    .s_araddr, .s_rvalid, .s_rready, .s_rdata, .s_rresp,
    .start, .rec, .ctrl_busy(busy), .used, .stk_depth, .err,
    .ram_re, .ram_raddr, .ram_rdata
  );

  accprof_ctrl #(
    .ENTRIES(ENTRIES)
  ) u_ctrl (
    .clk, .rst_n, .start, .rec, .busy,
    .ram_we, .ram_waddr, .ram_wdata,
    .stk_push, .stk_push_data, .stk_pop, .stk_top, .stk_empty, .stk_full,
    .used, .err
  );

  accprof_call_stack #(
    .DEPTH(STACK_DEPTH), .WIDTH(SE_W)
  ) u_stack (
    .clk, .rst_n, .push(stk_push), .push_data(stk_push_data), .pop(stk_pop),
    .top(stk_top), .empty(stk_empty), .full(stk_full), .depth(stk_depth)
  );

  accprof_cg_ram #(
    .ENTRIES(ENTRIES), .WORDS_PER_ENTRY(WORDS_PER_ENTRY), .DATA_W(DATA_W)
  ) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata)
  );

endmodule
