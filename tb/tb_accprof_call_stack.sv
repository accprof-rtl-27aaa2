// tb_accprof_call_stack: self-checking test of the active-call stack.
// Random push/pop traffic, with a small DEPTH so that full and empty are
// reached often, is compared cycle by cycle with a queue reference model.
// Checks top (peek), empty, full, depth, ignored push-when-full and
// pop-when-empty, and push+pop replacing the top.
module tb_accprof_call_stack;
  localparam int DEPTH = 8;
  localparam int WIDTH = 20;
  localparam int PTR_W = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [WIDTH-1:0] push_data = '0, top;
  logic empty, full;
  logic [PTR_W-1:0] depth;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_replace = 0;
  logic [WIDTH-1:0] model [$];

  accprof_call_stack #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (model depth %0d, dut depth %0d)", what, model.size(), depth);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      // compare outputs with the model
      #1;
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(depth) == model.size(), "depth");
      if (model.size() != 0) check(top == model[$], "top");
      if (full) n_full++;
      if (empty) n_empty++;
      // drive next operation; bias the direction in phases
      push      <= ($urandom % 100) < ((((i / 200) % 2) != 0) ? 70 : 30);
      pop       <= ($urandom % 100) < ((((i / 200) % 2) != 0) ? 30 : 70);
      push_data <= WIDTH'($urandom);
      @(posedge clk);
      if (push && pop && model.size() != 0) begin
        model[$] = push_data;
        n_replace++;
      end else if (push && model.size() < DEPTH) begin
        model.push_back(push_data);
      end else if (pop && model.size() != 0) begin
        void'(model.pop_back());
      end
      push <= 1'b0; pop <= 1'b0;
    end
    check(n_full > 0, "stack reached full");
    check(n_empty > 0, "stack reached empty");
    check(n_replace > 0, "push+pop replace happened");
    $display("full=%0d empty=%0d replace=%0d", n_full, n_empty, n_replace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
