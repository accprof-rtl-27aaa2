// tb_accprof_workloads: the call patterns of the evaluated benchmarks, at
// the IP's default sizes, each followed by a read-back of the complete call
// graph compared with a reference model.
//   STREAM      500 rounds of Copy, Scale, Add, Triad, each its own
//               top-level call: 2000 calls on one level
//   STREAM-mod  285 rounds of Copy calling Scale and Add, each of those
//               calling Triad twice: 1995 calls on three levels
//   Embench     22 benchmarks, one profiled call each
// Every workload must fit: no error flag, every chunk correct.
module tb_accprof_workloads;
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
  int max_level;

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
    if (lvl > max_level) max_level = lvl;
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

  task automatic stream_round();
    for (int f = 1; f <= 4; f++) begin call_begin(f); call_end(); end
  endtask

  task automatic stream_mod_round();
    call_begin(1);
      call_begin(2);
        call_begin(4); call_end();
        call_begin(4); call_end();
      call_end();
      call_begin(3);
        call_begin(4); call_end();
        call_begin(4); call_end();
      call_end();
    call_end();
  endtask

  task automatic finish_workload(input string name, input int calls, input int levels);
    check_status(name);
    check(mused == calls, $sformatf("%s: %0d chunks used, expected %0d", name, mused, calls));
    check(merr == '0, $sformatf("%s: fits without errors", name));
    check(max_level == levels, $sformatf("%s: %0d levels", name, max_level));
    check_graph(name, 0, mused - 1);
    $display("%s: %0d calls, %0d bytes of call graph, %0d levels", name, mused, mused * 64, max_level);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h.init();
    do_reset(); max_level = 0;
    for (int r = 0; r < 500; r++) stream_round();
    finish_workload("STREAM", 2000, 1);
    do_reset(); max_level = 0;
    for (int r = 0; r < 285; r++) stream_mod_round();
    finish_workload("STREAM-mod", 1995, 3);
    do_reset(); max_level = 0;
    for (int b = 1; b <= 22; b++) begin call_begin(b); call_end(); end
    finish_workload("Embench", 22, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
