// accprof_host_if: AXI4-Lite host model used by the testbenches.
//
// Plays the role of the processor and its instrumented application: single
// 64-bit writes and reads on the profiling IP's slave port, and the two
// record sequences the instrumentation emits (prologue: metadata with a
// non-zero function ID; epilogue: seven counts, then metadata with function
// ID 0). It also counts the cycles a write waited for the slave
// (stall_cycles) and the SLVERR responses it received.
interface accprof_host_if #(parameter int ADDR_W = 18) (input logic clk);
  logic              awvalid, awready, wvalid, wready, bvalid, bready;
  logic              arvalid, arready, rvalid, rready;
  logic [ADDR_W-1:0] awaddr, araddr;
  logic [63:0]       wdata, rdata;
  logic [7:0]        wstrb;
  logic [1:0]        bresp, rresp;
  int                stall_cycles = 0;
  int                slverr_count = 0;

  localparam logic [ADDR_W-1:0] RAM_BASE = ADDR_W'(1) << (ADDR_W - 1);

  task automatic init();
    awvalid = 1'b0; wvalid = 1'b0; bready = 1'b0;
    arvalid = 1'b0; rready = 1'b0;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0;
  endtask

  // Signals are driven 1 time unit after a rising edge and sampled on the
  // falling edge, where they are stable, to decide whether the next rising
  // edge completes a handshake.
  task automatic write(input logic [ADDR_W-1:0] a, input logic [63:0] d,
                       input logic [7:0] strb = 8'hFF);
    #1;
    awvalid = 1'b1; awaddr = a; wvalid = 1'b1; wdata = d; wstrb = strb;
    bready  = 1'b1;
    @(negedge clk);
    while (!(awready && wready)) begin stall_cycles++; @(negedge clk); end
    @(posedge clk); #1;
    awvalid = 1'b0; wvalid = 1'b0;
    @(negedge clk);
    while (!bvalid) @(negedge clk);
    if (bresp != 2'b00) slverr_count++;
    @(posedge clk); #1;
    bready = 1'b0;
  endtask

  task automatic read(input logic [ADDR_W-1:0] a, output logic [63:0] d);
    #1;
    arvalid = 1'b1; araddr = a; rready = 1'b1;
    @(negedge clk);
    while (!arready) @(negedge clk);
    @(posedge clk); #1;
    arvalid = 1'b0;
    @(negedge clk);
    while (!rvalid) @(negedge clk);
    d = rdata;
    if (rresp != 2'b00) slverr_count++;
    @(posedge clk); #1;
    rready = 1'b0;
  endtask

  // Instrumented prologue: one metadata write with the function ID.
  task automatic prologue(input logic [7:0] func_id, input logic [47:0] event_ids);
    write(ADDR_W'(7 * 8), {8'h00, func_id, event_ids});
  endtask

  // Instrumented epilogue: cycles and six event counts, then function ID 0.
  task automatic epilogue(input logic [6:0][63:0] counts);
    for (int k = 0; k < 7; k++) write(ADDR_W'(k * 8), counts[k]);
    write(ADDR_W'(7 * 8), 64'd0);
  endtask

  task automatic read_ram(input int word, output logic [63:0] d);
    read(RAM_BASE + ADDR_W'(word * 8), d);
  endtask
endinterface
