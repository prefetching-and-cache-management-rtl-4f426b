// tb_sync_fifo: self-checking test of the command FIFO at its default depth
// (32). A reference queue models the expected contents; random pushes and pops
// are applied, and the head, count, full/empty flags and ordering are compared
// every cycle. It also fills the FIFO to the brim and checks that a push is
// refused when full and accepted when a pop happens in the same cycle.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        push_valid, push_ready, pop_valid, pop;
  logic [15:0] push_data, pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  sync_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  logic [15:0] model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  task automatic step(input bit pv, input logic [15:0] pd, input bit pp);
    bit acc;
    push_valid = pv; push_data = pd; pop = pp;
    #1;
    check(count == model.size(), "count");
    check(pop_valid == (model.size() != 0), "pop_valid");
    check(push_ready == (model.size() < DEPTH || pp), "push_ready");
    if (model.size() != 0) check(pop_data == model[0], "head");
    acc = pv && push_ready;
    @(posedge clk);
    if (pp && model.size() != 0) void'(model.pop_front());
    if (acc) model.push_back(pd);
    #1;
  endtask

  initial begin
    push_valid = 0; pop = 0; push_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // random traffic
    for (int i = 0; i < 2000; i++)
      step($urandom_range(0, 99) < 60, 16'($urandom), $urandom_range(0, 99) < 45);
    // fill completely
    while (model.size() < DEPTH) step(1, 16'($urandom), 0);
    pop = 0; push_valid = 0; #1;
    check(!push_ready, "full refuses push");
    step(1, 16'hBEEF, 0);               // refused
    check(model.size() == DEPTH, "still full");
    step(1, 16'hCAFE, 1);               // push+pop when full
    check(model[DEPTH-1] == 16'hCAFE, "push with pop when full");
    while (model.size() != 0) step(0, 0, 1);
    check(!pop_valid && count == 0, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
