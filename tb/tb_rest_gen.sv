// Testbench of rest_gen.
//
// Exhaustive over all 256 input words, IREST and CHTOGGLE: REST must be
// high for exactly the words with bits 7..4 = 0010 (the rest word 20 hex
// and the words that share its decoded bits), and the output must be
// CHTOGGLE unless a rest is active.
module tb_rest_gen;
  logic [7:0] in_i;
  logic       irest, chtoggle, rest, out;
  int         checks = 0, failures = 0;

  rest_gen dut (.in_i(in_i), .irest_i(irest), .chtoggle_i(chtoggle), .rest_o(rest), .out_o(out));

  initial begin
    logic exp_rest, exp_out;
    for (int w = 0; w < 256; w++) begin
      for (int c = 0; c < 4; c++) begin
        in_i = 8'(w); {irest, chtoggle} = 2'(c);
        #1;
        exp_rest = (w >> 4) == 2;
        exp_out  = chtoggle && !exp_rest && !irest;
        checks++;
        if (rest !== exp_rest || out !== exp_out) begin
          failures++;
          $display("FAIL w=%02h irest=%b chtoggle=%b rest=%b out=%b", w, irest, chtoggle, rest, out);
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
