// tb_accprof_regs: self-checking test of the AXI4-Lite register slave.
// Around the slave: a controller model that holds 'busy' for 7 cycles after
// an epilogue start, and a RAM model whose read data is a function of the
// address. Checks: register write/read-back with byte strobes, one 'start'
// pulse per metadata write (one cycle after it) and none for other writes,
// the record handed over, write stalls while busy, the status word, the RAM
// read window address mapping, and SLVERR for read-only or unmapped
// locations.
module tb_accprof_regs;
  import accprof_pkg::*;
  localparam int ADDR_W = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  accprof_host_if #(.ADDR_W(ADDR_W)) h (clk);

  logic start, ctrl_busy, ram_re;
  record_t rec;
  logic [11:0] used = 12'h5A3;
  logic [7:0] stk_depth = 8'd17;
  err_t err = 3'b101;
  logic [13:0] ram_raddr;
  word_t ram_rdata;

  accprof_regs dut (
    .clk, .rst_n,
    .s_awvalid(h.awvalid), .s_awready(h.awready), .s_awaddr(h.awaddr),
    .s_wvalid(h.wvalid), .s_wready(h.wready), .s_wdata(h.wdata), .s_wstrb(h.wstrb),
    .s_bvalid(h.bvalid), .s_bready(h.bready), .s_bresp(h.bresp),
    .s_arvalid(h.arvalid), .s_arready(h.arready), .s_araddr(h.araddr),
    .s_rvalid(h.rvalid), .s_rready(h.rready), .s_rdata(h.rdata), .s_rresp(h.rresp),
    .start, .rec, .ctrl_busy, .used, .stk_depth, .err,
    .ram_re, .ram_raddr, .ram_rdata);

  // controller model
  int busy_cnt = 0;
  int n_start = 0;
  record_t last_rec;
  assign ctrl_busy = (busy_cnt != 0);
  always_ff @(posedge clk) begin
    if (start) begin
      n_start  <= n_start + 1;
      last_rec <= rec;
      if (rec.meta.func_id == 0) busy_cnt <= 7;
    end else if (busy_cnt != 0) begin
      busy_cnt <= busy_cnt - 1;
    end
  end

  // RAM model
  function automatic word_t ram_val(logic [13:0] a);
    return {18'h0, a, 18'h0, ~a};
  endfunction
  always_ff @(posedge clk) if (ram_re) ram_rdata <= ram_val(ram_raddr);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t d, vals [8];
  int s0, e0;

  initial begin
    h.init();
    ram_rdata = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // registers 0..6: write and read back, no start
    for (int r = 0; r < 7; r++) begin
      vals[r] = {$urandom, $urandom};
      h.write(ADDR_W'(r * 8), vals[r]);
    end
    check(n_start == 0, "no start for count registers");
    for (int r = 0; r < 7; r++) begin
      h.read(ADDR_W'(r * 8), d);
      check(d == vals[r], $sformatf("read back reg %0d", r));
    end
    // byte strobes
    h.write(ADDR_W'(8), 64'hFFFF_FFFF_FFFF_FFFF, 8'b0000_0101);
    h.read(ADDR_W'(8), d);
    vals[1][7:0] = 8'hFF; vals[1][23:16] = 8'hFF;
    check(d == vals[1], "byte strobes");
    // metadata write: prologue record, start one cycle later
    vals[7] = {8'h00, 8'h2A, 48'h0605_0403_0201};
    h.write(ADDR_W'(56), vals[7]);
    repeat (2) @(posedge clk);
    check(n_start == 1, "one start per metadata write");
    check(last_rec.meta == meta_t'(vals[7]), "record metadata");
    for (int k = 0; k < 7; k++) check(last_rec.counts[k] == vals[k], $sformatf("record count %0d", k));
    // epilogue: the next write must stall while the controller is busy
    s0 = h.stall_cycles;
    h.write(ADDR_W'(56), 64'd0);
    h.write(ADDR_W'(0), 64'h1234);
    check(h.stall_cycles - s0 >= 6, $sformatf("write stalled while busy (%0d)", h.stall_cycles - s0));
    check(n_start == 2, "second start");
    h.read(ADDR_W'(0), d);
    check(d == 64'h1234, "write after stall landed");
    // status word
    h.read(ADDR_W'(64), d);
    check(d[15:0] == 16'h5A3 && d[31:16] == 16'd17 && d[34:32] == 3'b101 && d[63] == 1'b0,
          "status word");
    // RAM window
    for (int i = 0; i < 50; i++) begin
      int w;
      w = (i < 2) ? ((i == 0) ? 0 : 16383) : int'($urandom % 16384);
      h.read_ram(w, d);
      check(d == ram_val(14'(w)), $sformatf("RAM window word %0d", w));
    end
    // errors: writes to status and RAM, read of unmapped register
    e0 = h.slverr_count;
    h.write(ADDR_W'(64), 64'd1);
    h.write(h.RAM_BASE, 64'd1);
    h.read(ADDR_W'(72), d);
    check(h.slverr_count - e0 == 3, "SLVERR on read-only/unmapped");
    check(n_start == 2, "no start from rejected writes");
    $display("stall_cycles=%0d", h.stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
