// tb_accprof_top: end-to-end test of the profiling IP at its default sizes
// (2048 chunks, stack depth 255). A host model plays the instrumented
// application: prologue and epilogue records over AXI4-Lite, then read-back
// of the whole call graph, compared with a reference model of the call tree.
// Scenarios:
//   1. the six-function example tree (A calls C calls D; B calls E and F)
//   2. three STREAM-mod rounds (Copy calls Scale and Add, each calls Triad
//      twice: seven calls on three levels)
//   3. 2048 calls fill the RAM, a 2049th sets the RAM-full flag
//   4. 256 nested calls overflow the 255-deep stack; unwinding them ends in
//      a stack underflow
// Each mechanism (prologue, epilogue, level 3 nesting, bus stall during an
// epilogue, RAM full, stack overflow, stack underflow, SLVERR) is counted,
// and a mechanism that never happened counts as a failure.
module tb_accprof_top;
  import accprof_pkg::*;
  localparam int ENTRIES = 2048;
  localparam int SDEPTH  = 255;
  localparam int ADDR_W  = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  accprof_host_if #(.ADDR_W(ADDR_W)) h (clk);

  accprof_top dut (
    .clk, .rst_n,
    .s_awvalid(h.awvalid), .s_awready(h.awready), .s_awaddr(h.awaddr),
    .s_wvalid(h.wvalid), .s_wready(h.wready), .s_wdata(h.wdata), .s_wstrb(h.wstrb),
    .s_bvalid(h.bvalid), .s_bready(h.bready), .s_bresp(h.bresp),
    .s_arvalid(h.arvalid), .s_arready(h.arready), .s_araddr(h.araddr),
    .s_rvalid(h.rvalid), .s_rready(h.rready), .s_rdata(h.rdata), .s_rresp(h.rresp));

  // ARMv8 PMU event numbers of the six counted events: L1D refill, L1I
  // refill, L1D TLB refill, L1I TLB refill, L2D refill, L2D write-back.
  localparam logic [47:0] EVENTS = {8'h18, 8'h17, 8'h02, 8'h05, 8'h01, 8'h03};

  // reference model
  word_t exp_meta [ENTRIES];
  word_t exp_cnt  [ENTRIES][NUM_COUNTS];
  int    mstk_idx [$];
  int    mstk_lvl [$];
  int    mused;
  err_t  merr;

  int checks = 0, failures = 0;
  int n_pro = 0, n_epi = 0, n_lvl3 = 0, n_ramfull = 0, n_ovf = 0, n_udf = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic do_reset();
    @(posedge clk); #1;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    mstk_idx.delete(); mstk_lvl.delete(); mused = 0; merr = '0;
  endtask

  task automatic call_begin(input int fid);
    int lvl;
    h.prologue(8'(fid), EVENTS);
    n_pro++;
    lvl = (mstk_lvl.size() == 0) ? 1 : mstk_lvl[$] + 1;
    if (lvl >= 3) n_lvl3++;
    if (mstk_lvl.size() == SDEPTH) begin
      merr.stack_overflow = 1'b1; n_ovf++;
      return;
    end
    if (mused == ENTRIES) begin
      merr.ram_full = 1'b1; n_ramfull++;
      mstk_idx.push_back(-1);
    end else begin
      exp_meta[mused] = {8'(lvl), 8'(fid), EVENTS};
      for (int k = 0; k < NUM_COUNTS; k++) exp_cnt[mused][k] = 'x;
      mstk_idx.push_back(mused);
      mused++;
    end
    mstk_lvl.push_back(lvl);
  endtask

  task automatic call_end();
    logic [6:0][63:0] c;
    int idx;
    for (int k = 0; k < NUM_COUNTS; k++) c[k] = {$urandom, $urandom};
    h.epilogue(c);
    n_epi++;
    if (mstk_idx.size() == 0) begin
      merr.stack_underflow = 1'b1; n_udf++;
      return;
    end
    idx = mstk_idx.pop_back();
    void'(mstk_lvl.pop_back());
    if (idx >= 0) for (int k = 0; k < NUM_COUNTS; k++) exp_cnt[idx][k] = c[k];
  endtask

  task automatic check_status(input string tag);
    word_t s;
    int polls = 0;
    // the last epilogue may still be storing its counts: poll 'busy'
    h.read(ADDR_W'(REG_STATUS * 8), s);
    while (s[63] && polls < 20) begin
      h.read(ADDR_W'(REG_STATUS * 8), s);
      polls++;
    end
    check(int'(s[15:0]) == mused, $sformatf("%s: used %0d != %0d", tag, s[15:0], mused));
    check(int'(s[31:16]) == mstk_lvl.size(), $sformatf("%s: stack depth", tag));
    check(s[34:32] == merr, $sformatf("%s: error flags %b != %b", tag, s[34:32], merr));
    check(s[63] == 1'b0, $sformatf("%s: idle", tag));
  endtask

  // read the whole call graph back over the bus
  task automatic check_graph(input string tag, input int first, input int last);
    word_t d;
    for (int e = first; e <= last; e++) begin
      h.read_ram(e * WORDS_PER_ENTRY, d);
      check(d == exp_meta[e], $sformatf("%s: chunk %0d metadata %h != %h", tag, e, d, exp_meta[e]));
      for (int k = 0; k < NUM_COUNTS; k++) begin
        h.read_ram(e * WORDS_PER_ENTRY + 1 + k, d);
        if (!$isunknown(exp_cnt[e][k]))
          check(d == exp_cnt[e][k], $sformatf("%s: chunk %0d count %0d", tag, e, k));
      end
    end
  endtask

  task automatic stream_mod_round();
    call_begin(1);                       // Copy
      call_begin(2);                     // Scale
        call_begin(4); call_end();       // Triad
        call_begin(4); call_end();       // Triad
      call_end();
      call_begin(3);                     // Add
        call_begin(4); call_end();
        call_begin(4); call_end();
      call_end();
    call_end();
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d;
    int e0;
    h.init();
    do_reset();
    // 1: example tree, A..F = IDs 1..6
    call_begin(1); call_begin(3); call_begin(4); call_end(); call_end(); call_end();
    call_begin(2); call_begin(5); call_end(); call_begin(6); call_end(); call_end();
    check_status("example tree");
    check_graph("example tree", 0, mused - 1);
    h.read_ram(0, d);  check(d[63:56] == 8'd1, "A at level 1");
    h.read_ram(16, d); check(d[63:56] == 8'd3, "D at level 3");
    h.read_ram(24, d); check(d[63:56] == 8'd1, "B at level 1");
    // 2: STREAM-mod rounds continue in the same graph
    for (int r = 0; r < 3; r++) stream_mod_round();
    check_status("STREAM-mod");
    check_graph("STREAM-mod", 0, mused - 1);
    // writes to the read-only RAM window are refused
    e0 = h.slverr_count;
    h.write(h.RAM_BASE, 64'd0);
    check(h.slverr_count == e0 + 1, "SLVERR on RAM write");
    // 3: fill the RAM
    do_reset();
    for (int i = 0; i < ENTRIES; i++) begin call_begin(1 + i % 200); call_end(); end
    check_status("RAM just full");
    call_begin(7); call_begin(8); call_end(); call_end();
    check_status("RAM overflowed");
    check_graph("full RAM", 0, ENTRIES - 1);
    // 4: stack overflow and underflow
    do_reset();
    for (int i = 0; i < SDEPTH + 1; i++) call_begin(1 + i % 255);
    check_status("stack overflowed");
    for (int i = 0; i < SDEPTH + 1; i++) call_end();
    check_status("stack underflowed");
    check_graph("deep nesting", 0, mused - 1);
    h.read_ram((SDEPTH - 1) * WORDS_PER_ENTRY, d);
    check(d[63:56] == 8'(SDEPTH), "deepest call at level 255");

    $display("prologues=%0d epilogues=%0d level3+=%0d stalls=%0d ramfull=%0d ovf=%0d udf=%0d slverr=%0d",
             n_pro, n_epi, n_lvl3, h.stall_cycles, n_ramfull, n_ovf, n_udf, h.slverr_count);
    check(n_pro > 0 && n_epi > 0, "prologue and epilogue happened");
    check(n_lvl3 > 0, "three-level nesting happened");
    check(h.stall_cycles > 0, "bus stall during epilogue happened");
    check(n_ramfull > 0, "RAM full happened");
    check(n_ovf > 0, "stack overflow happened");
    check(n_udf > 0, "stack underflow happened");
    check(h.slverr_count > 0, "SLVERR happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
