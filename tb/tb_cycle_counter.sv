// tb_cycle_counter: self-checking test of the cycle counter: counts exactly one
// per clock while running, holds while stopped, clears on request.
module tb_cycle_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ctrl_we = 0, running;
  logic [1:0] ctrl_wdata = '0;
  logic [31:0] value;

  cycle_counter #(.WIDTH(32)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic ctrl(input logic [1:0] d);
    ctrl_we = 1; ctrl_wdata = d;
    @(posedge clk); #1 ctrl_we = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    check(value == 0 && !running, "reset state");
    ctrl(2'b01);                         // start
    repeat (100) @(posedge clk); #1;
    check(running && value == 100, $sformatf("100 cycles counted, got %0d", value));
    ctrl(2'b00);                         // stop: the stop cycle still counts
    check(value == 101, $sformatf("stop write cycle, got %0d", value));
    repeat (50) @(posedge clk); #1;
    check(value == 101 && !running, "holds while stopped");
    ctrl(2'b10);                         // clear
    check(value == 0, "cleared");
    ctrl(2'b11);                         // clear and run
    check(value == 0 && running, "clear and run");
    repeat (37) @(posedge clk); #1;
    check(value == 37, $sformatf("37 cycles counted, got %0d", value));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
