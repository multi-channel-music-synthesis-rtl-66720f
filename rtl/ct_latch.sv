// CT latch: remembers that the 100 kHz toggle clock ticked.
//
// Every rising edge of CLK3 (the 100 kHz toggle clock) sets the CT flag;
// the controller sees it, advances its counting states and clears the flag
// through the active-low CLRT line in the following state. An edge that
// arrives while CLRT is low is lost, as in the original latch, whose clear
// input dominated. The original latch was a flip-flop clocked by CLK3 with
// its D input tied high; here CLK3 is synchronized to the chip clock first
// (ext_clk_sync), which is this design's choice.
//
// Timing: ct_o rises on the third rising clk edge that samples CLK3 high
// and falls on the first clk edge at which clrt_n_i is low.
module ct_latch (
  input  logic clk,
  input  logic clk3_i,    // CLK3, 100 kHz toggle clock
  input  logic clrt_n_i,  // CLRT, active low clear
  output logic ct_o       // CT
);

  logic tick;

  ext_clk_sync u_sync (.clk(clk), .ext_i(clk3_i), .edge_o(tick));

  always_ff @(posedge clk) begin
    if (!clrt_n_i)  ct_o <= 1'b0;
    else if (tick)  ct_o <= 1'b1;
  end

endmodule
