// cycle_counter: free-running clock cycle counter of the TSU, used to time
// events in the prototype.
//
// Software writes the control register: bit 0 = run, bit 1 = clear. While run
// is set the 32-bit count advances by one every clock; clear sets it to zero
// (a write with both bits set clears and keeps running from zero). The count
// is read back at any time. The counter itself follows the document; its
// control encoding and width are this design's choice.
//
// Timing: a write in cycle t takes effect at the clock edge ending cycle t.
module cycle_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ctrl_we,
  input  logic [1:0]       ctrl_wdata,   // {clear, run}
  output logic             running,
  output logic [WIDTH-1:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      value   <= '0;
    end else if (ctrl_we) begin
      running <= ctrl_wdata[0];
      if (ctrl_wdata[1]) value <= '0;
      else if (running)  value <= value + 1'b1;
    end else if (running) begin
      value <= value + 1'b1;
    end
  end
endmodule
