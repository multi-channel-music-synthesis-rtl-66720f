// Testbench of implicit_rest_gen.
//
// For every combination of TEMPO, endnote and the two duration taps,
// checks whether IREST is set, that it stays set when the product falls,
// and that CLRN clears it.
module tb_implicit_rest_gen;
  logic clk = 1'b0;
  logic tempo, endnote, fast_tap, detect, clrn_n, irest;
  int   checks = 0, failures = 0;

  implicit_rest_gen dut (.clk(clk), .tempo_i(tempo), .endnote_i(endnote), .fast_tap_i(fast_tap),
                         .detect_i(detect), .clrn_n_i(clrn_n), .irest_o(irest));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  initial begin
    logic exp;
    {tempo, endnote, fast_tap, detect} = '0;
    clrn_n = 0;
    repeat (3) @(negedge clk);
    for (int v = 0; v < 16; v++) begin
      clrn_n = 0; {tempo, endnote, fast_tap, detect} = '0;
      @(negedge clk);
      clrn_n = 1;
      chk(!irest, "cleared");
      {tempo, endnote, fast_tap, detect} = 4'(v);
      exp = endnote && (tempo ? fast_tap : detect);
      @(negedge clk);
      chk(irest == exp, $sformatf("combination %b", 4'(v)));
      {fast_tap, detect} = 2'b00;
      @(negedge clk);
      chk(irest == exp, "latched");
      // Setting wins only while CLRN is high.
      clrn_n = 0; {tempo, endnote, fast_tap, detect} = 4'(v);
      @(negedge clk);
      chk(!irest, "clear dominates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
