// Duration counter: measures the time since the current note started.
//
// A 5-bit counter of rising edges of the 100 Hz input CLK2, cleared by the
// controller's active-low CLRN at start-up and at every note change. It
// wraps after 31. It is shared by all channels. Its bits are tapped by the
// implicit rest generator: dur_o[3] first rises 8 edges (80 ms) into a
// note, DETECT (all five bits high) 31 edges (310 ms) into a note. The
// counter, its clear and the DETECT gate follow the original circuit;
// synchronizing CLK2 to the chip clock is this design's choice.
//
// Timing: dur_o changes one clk after each synchronized CLK2 edge pulse.
module duration_counter #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             clk2_i,    // CLK2, 100 Hz
  input  logic             clrn_n_i,  // CLRN, active low clear
  output logic [WIDTH-1:0] dur_o,     // DUR0..DUR4
  output logic             detect_o   // DETECT: all bits high
);

  logic tick;

  ext_clk_sync u_sync (.clk(clk), .ext_i(clk2_i), .edge_o(tick));

  always_ff @(posedge clk) begin
    if (!clrn_n_i) dur_o <= '0;
    else if (tick) dur_o <= dur_o + 1'b1;
  end

  assign detect_o = &dur_o;

endmodule
