// Tempo generator: produces the note clock latch CN.
//
// The 10 Hz input CLK1 times the notes. With TEMPO high (fast) every
// rising edge of CLK1 sets CN, so one song entry (a sixteenth note) lasts
// 0.1 s and a whole note 1.6 s. With TEMPO low (slow) CLK1 is divided by
// four, so a sixteenth lasts 0.4 s and a whole note 6.4 s. The divider and
// the CN latch are cleared by the controller's active-low CLRN, which is
// low at start-up and at every note change, so the slow count of four
// CLK1 edges starts at the beginning of each note.
//
// The two tempos, the divide-by-four and the clearing by CLRN follow the
// original circuit. In the original the slow clock was bit 1 of a 2-bit
// counter, whose first rise after a clear comes after two CLK1 edges; this
// design fires on the fourth edge after a clear (the counter's wrap) so
// that every slow note lasts the stated four CLK1 periods.
//
// Timing: cn_o rises one clk after the synchronized CLK1 edge that
// completes the count, and falls on the first clk edge with clrn_n_i low.
module tempo_gen #(
  parameter int unsigned SLOW_DIV = 4   // CLK1 edges per note at slow tempo
) (
  input  logic clk,
  input  logic clk1_i,    // CLK1, 10 Hz
  input  logic tempo_i,   // TEMPO: 1 fast, 0 slow
  input  logic clrn_n_i,  // CLRN, active low clear
  output logic cn_o       // CN
);

  localparam int unsigned DW = (SLOW_DIV > 1) ? $clog2(SLOW_DIV) : 1;

  logic          tick;
  logic [DW-1:0] div_q;
  logic          slow_tick;

  ext_clk_sync u_sync (.clk(clk), .ext_i(clk1_i), .edge_o(tick));

  assign slow_tick = tick && (div_q == DW'(SLOW_DIV - 1));

  always_ff @(posedge clk) begin
    if (!clrn_n_i) begin
      div_q <= '0;
      cn_o  <= 1'b0;
    end else begin
      if (tick) div_q <= slow_tick ? '0 : div_q + 1'b1;
      if (tempo_i ? tick : slow_tick) cn_o <= 1'b1;
    end
  end

endmodule
