// tb_accprof_cg_ram: self-checking test of the call-graph RAM at its default
// size (2048 chunks x 8 words x 64 bits). Fills every word with a value
// computed from its address, reads all back (one-cycle read latency
// checked), then checks random rewrites and a same-cycle read/write of one
// word, which must return the old contents.
module tb_accprof_cg_ram;
  localparam int ENTRIES = 2048;
  localparam int WPE     = 8;
  localparam int DEPTH   = ENTRIES * WPE;
  localparam int AW      = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [63:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [63:0] shadow [DEPTH];

  accprof_cg_ram dut (.*);

  always #5 clk = ~clk;

  function automatic logic [63:0] pattern(int a);
    return {32'(a) * 32'h9E37_79B9, ~32'(a)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we <= 1'b1; waddr <= AW'(a); wdata <= pattern(a); shadow[a] = pattern(a);
      @(posedge clk);
    end
    we <= 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      re <= 1'b1; raddr <= AW'(a);
      @(posedge clk);
      re <= 1'b0;
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h != %h", a, rdata, shadow[a]);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = $urandom % DEPTH;
      we <= 1'b1; waddr <= AW'(a); wdata <= {$urandom, $urandom};
      re <= 1'b1; raddr <= AW'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        $display("FAIL read-during-write addr %0d", a);
      end
      shadow[a] = wdata;
      we <= 1'b0; re <= 1'b0;
      @(posedge clk);
    end
    // rdata holds while re is low
    re <= 1'b1; raddr <= 0;
    @(posedge clk);
    re <= 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (rdata !== shadow[0]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
