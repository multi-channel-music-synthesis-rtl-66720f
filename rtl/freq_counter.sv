// Frequency counter of a channel.
//
// An 8-bit up-counter. LOAD copies the channel input word (the Count Map
// output for the current note) into it; COUNT adds one. Counting up from
// the loaded value N, the counter wraps to zero after 256 - N counts, which
// the controller sees on CHZERO and answers by flipping the output and
// reloading. With one count per 10 us toggle clock, each half of the output
// square wave lasts (256 - N) x 10 us, so the tone period is
// (256 - N) x 20 us. The load, the increment and the zero detect follow the
// original circuit, whose load used the flip-flops' asynchronous set and
// clear inputs; here the load is synchronous.
//
// Timing: q_o takes the new value on the clk edge at which load_i or
// count_i is high (load wins); chzero_o is combinational from q_o.
module freq_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             load_i,   // LOAD
  input  logic             count_i,  // COUNT
  input  logic [WIDTH-1:0] d_i,      // IN1x: channel input word
  output logic [WIDTH-1:0] q_o,      // B0..B7
  output logic             chzero_o  // CHZERO
);

  always_ff @(posedge clk) begin
    if (load_i)       q_o <= d_i;
    else if (count_i) q_o <= q_o + 1'b1;
  end

  assign chzero_o = (q_o == '0);

endmodule
