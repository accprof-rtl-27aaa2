// tb_accprof_ctrl: self-checking test of the prologue/epilogue controller.
// The controller is connected to the real call stack and to a RAM model that
// records every write. Random call trees (random function IDs, event IDs and
// counts) are fed as records; a reference model of the two sequences
// computes the expected chunks, levels, used count and error flags. Small
// sizes (16 chunks, stack of 4) make the RAM-full, stack-overflow and
// stack-underflow cases happen. The epilogue's 1 + 7 cycle occupancy is
// checked on every epilogue.
module tb_accprof_ctrl;
  import accprof_pkg::*;
  localparam int ENTRIES = 16;
  localparam int SDEPTH  = 4;
  localparam int IDX_W   = $clog2(ENTRIES);
  localparam int ADDR_W  = IDX_W + 3;
  localparam int SE_W    = 1 + LEVEL_W + IDX_W;
  localparam int USED_W  = $clog2(ENTRIES + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  record_t rec = '0;
  logic busy, ram_we, stk_push, stk_pop, stk_empty, stk_full;
  logic [ADDR_W-1:0] ram_waddr;
  word_t ram_wdata;
  logic [SE_W-1:0] stk_push_data, stk_top;
  logic [$clog2(SDEPTH+1)-1:0] stk_depth;
  logic [USED_W-1:0] used;
  err_t err;

  int checks = 0, failures = 0;
  int n_pro = 0, n_epi = 0, n_ramfull = 0, n_ovf = 0, n_udf = 0, max_level = 0;

  accprof_ctrl #(.ENTRIES(ENTRIES)) dut (.*);
  accprof_call_stack #(.DEPTH(SDEPTH), .WIDTH(SE_W)) u_stk (
    .clk, .rst_n, .push(stk_push), .push_data(stk_push_data), .pop(stk_pop),
    .top(stk_top), .empty(stk_empty), .full(stk_full), .depth(stk_depth));

  // RAM model written by the controller
  word_t ram [ENTRIES*8];
  always_ff @(posedge clk) if (ram_we) ram[ram_waddr] <= ram_wdata;

  always #5 clk = ~clk;

  // reference model
  typedef struct { bit valid; int level; int idx; } se_t;
  se_t   mstk [$];
  word_t exp_ram [ENTRIES*8];
  bit    exp_wr  [ENTRIES*8];
  int    mused;
  err_t  merr;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_reset();
    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    mstk.delete(); mused = 0; merr = '0;
    foreach (exp_wr[i]) exp_wr[i] = 1'b0;
    @(posedge clk);
  endtask

  task automatic send(input record_t r);
    int cyc;
    rec   <= r;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    rec   <= '0;            // record only needs to be valid in the start cycle
    cyc = 1;
    #1;
    while (busy) begin @(posedge clk); cyc++; #1; end
    // reference model
    if (r.meta.func_id != 0) begin
      se_t e; meta_t m;
      n_pro++;
      e.level = (mstk.size() == 0) ? 1 : mstk[$].level + 1;
      if (mstk.size() == SDEPTH) begin
        merr.stack_overflow = 1'b1; n_ovf++;
      end else begin
        e.valid = (mused < ENTRIES);
        e.idx   = mused;
        if (e.valid) begin
          m = r.meta; m.level = 8'(e.level);
          exp_ram[mused*8] = word_t'(m); exp_wr[mused*8] = 1'b1;
          mused++;
          if (e.level > max_level) max_level = e.level;
        end else begin
          merr.ram_full = 1'b1; n_ramfull++;
        end
        mstk.push_back(e);
      end
      check(cyc == 1, "prologue takes one cycle");
    end else begin
      n_epi++;
      if (mstk.size() == 0) begin
        merr.stack_underflow = 1'b1; n_udf++;
        check(cyc == 1, "dropped epilogue takes one cycle");
      end else begin
        se_t e;
        e = mstk.pop_back();
        if (e.valid) begin
          for (int k = 0; k < NUM_COUNTS; k++) begin
            exp_ram[e.idx*8 + 1 + k] = r.counts[k]; exp_wr[e.idx*8 + 1 + k] = 1'b1;
          end
          check(cyc == 1 + NUM_COUNTS, "epilogue takes 1+7 cycles");
        end else begin
          check(cyc == 1, "discarded epilogue takes one cycle");
        end
      end
    end
    check(int'(used) == mused, "used count");
    check(err == merr, "error flags");
    check(int'(stk_depth) == mstk.size(), "stack depth");
  endtask

  function automatic record_t rand_rec(input bit prologue);
    record_t r;
    r = '0;
    for (int k = 0; k < NUM_COUNTS; k++) r.counts[k] = {$urandom, $urandom};
    for (int k = 0; k < NUM_EVENTS; k++) r.meta.event_id[k] = 8'($urandom);
    r.meta.level   = 8'($urandom);   // software's byte 7 is overwritten
    r.meta.func_id = prologue ? 8'(1 + $urandom % 255) : 8'd0;
    return r;
  endfunction

  task automatic compare_ram(input string tag);
    for (int a = 0; a < ENTRIES*8; a++)
      if (exp_wr[a]) check(ram[a] == exp_ram[a], $sformatf("%s word %0d", tag, a));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();
    // 1: random well-formed trees, fewer calls than chunks
    for (int t = 0; t < 20; t++) begin
      do_reset();
      for (int i = 0; i < 24; i++) begin
        bit pro;
        pro = (mstk.size() == 0) || ((mstk.size() < 3) && (($urandom % 2) != 0)) ;
        if (mused >= 12 && mstk.size() != 0) pro = 1'b0;
        send(rand_rec(pro));
      end
      while (mstk.size() != 0) send(rand_rec(1'b0));
      compare_ram($sformatf("tree %0d", t));
      check(err == '0, "no errors on a well-formed tree");
    end
    // 2: fill the RAM past its end, with nesting
    do_reset();
    for (int i = 0; i < 40; i++) begin
      bit pro;
      pro = (mstk.size() == 0) || ((mstk.size() < SDEPTH - 1) && (($urandom % 2) != 0));
      send(rand_rec(pro));
    end
    while (mstk.size() != 0) send(rand_rec(1'b0));
    compare_ram("ram full");
    // 3: stack overflow and underflow
    do_reset();
    for (int i = 0; i < SDEPTH + 2; i++) send(rand_rec(1'b1));
    for (int i = 0; i < SDEPTH + 2; i++) send(rand_rec(1'b0));
    compare_ram("overflow");
    check(n_ramfull > 0, "RAM-full case exercised");
    check(n_ovf > 0, "stack overflow exercised");
    check(n_udf > 0, "stack underflow exercised");
    check(max_level >= 3, "three call levels reached");
    $display("prologues=%0d epilogues=%0d ramfull=%0d ovf=%0d udf=%0d maxlevel=%0d",
             n_pro, n_epi, n_ramfull, n_ovf, n_udf, max_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
