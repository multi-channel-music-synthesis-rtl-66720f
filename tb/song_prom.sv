// Behavioural model of the user's song memory: 256 entries of six bits,
// {note code, endnote}, read asynchronously. The testbench writes the song
// through the program port before playing it.
module song_prom (
  input  logic       clk,
  input  logic       we_i,
  input  logic [7:0] waddr_i,
  input  logic [5:0] wdata_i,
  input  logic [7:0] addr_i,
  output logic [5:0] data_o
);
  logic [5:0] mem [256];

  always_ff @(posedge clk) if (we_i) mem[waddr_i] <= wdata_i;

  assign data_o = mem[addr_i];
endmodule
