// Behavioural model of the external clock divider: four decade counters
// in series clocked by the 100 kHz oscillator. Each stage divides by ten
// and drives a square wave (high for counts 5 to 9). The taps give
// 10 kHz, 1 kHz, 100 Hz and 10 Hz; the chip uses the 100 Hz and 10 Hz
// taps and the oscillator itself. Stage states start at zero.
module decade_counter_chain (
  input  logic osc_i,       // 100 kHz oscillator
  output logic f10k_o,
  output logic f1k_o,
  output logic f100_o,
  output logic f10_o
);
  logic [3:0] st [4] = '{4'd0, 4'd0, 4'd0, 4'd0};

  always_ff @(posedge osc_i) begin
    for (int i = 0; i < 4; i++) begin
      // A stage advances when every stage before it wraps.
      logic carry;
      carry = 1'b1;
      for (int j = 0; j < i; j++) carry &= (st[j] == 4'd9);
      if (carry) st[i] <= (st[i] == 4'd9) ? 4'd0 : st[i] + 4'd1;
    end
  end

  assign f10k_o = st[0] >= 4'd5;
  assign f1k_o  = st[1] >= 4'd5;
  assign f100_o = st[2] >= 4'd5;
  assign f10_o  = st[3] >= 4'd5;
endmodule
