// Behavioural model of the external song address counter, driven by the
// chip's address select field {ADDR2, ADDR1}: code 3 holds it at zero,
// code 1 advances it by one per clock (the chip gives code 1 for exactly
// one clock at each note change), codes 2 and 0 hold it.
module address_counter #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic [1:0]    sel_i,
  output logic [AW-1:0] addr_o
);
  always_ff @(posedge clk) begin
    if (sel_i == 2'd3)      addr_o <= '0;
    else if (sel_i == 2'd1) addr_o <= addr_o + 1'b1;
  end
endmodule
