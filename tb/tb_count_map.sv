// Testbench of count_map.
//
// Checks all 64 entries against the published note table, that the
// endnote bit lands in the LSB, that the rest code gives 20 hex, and that
// the tone each word makes, 100 kHz / (2 x (256 - N)), is within 3 % of the
// equal-tempered pitch (C4 = 261.63 Hz) from C4 to C5 and within 5 % above,
// rising from note to note.
module tb_count_map;
  logic [5:0] addr;
  logic [7:0] word;
  int         checks = 0, failures = 0;

  count_map dut (.addr_i(addr), .word_o(word));

  localparam logic [7:0] TABLE [25] = '{
    8'h40, 8'h4A, 8'h54, 8'h5E, 8'h66, 8'h70, 8'h78, 8'h7E, 8'h86, 8'h8C,
    8'h94, 8'h9A, 8'h9E, 8'hA4, 8'hAA, 8'hAE, 8'hB2, 8'hB6, 8'hBA, 8'hBE,
    8'hC2, 8'hC6, 8'hC8, 8'hCC, 8'hCE};

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s addr=%02h word=%02h", msg, addr, word); end
  endtask

  initial begin
    real f, ideal, err, prev_f;
    prev_f = 0.0;
    for (int code = 0; code < 32; code++) begin
      for (int e = 0; e < 2; e++) begin
        addr = {5'(code), 1'(e)};
        #1;
        if (code < 25) begin
          chk(word == (TABLE[code] | 8'(e)), "table entry");
          f = 100000.0 / (2.0 * real'(256 - int'(word)));
          ideal = 261.6256 * (2.0 ** (real'(code) / 12.0));
          err = (f - ideal) / ideal;
          if (err < 0) err = -err;
          chk(err < ((code <= 12) ? 0.03 : 0.05), $sformatf("pitch error %f for code %0d", err, code));
          if (e == 0) begin
            chk(f > prev_f, "rising pitch");
            prev_f = f;
          end
        end else begin
          chk(word == 8'h20, "rest / unassigned code");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
