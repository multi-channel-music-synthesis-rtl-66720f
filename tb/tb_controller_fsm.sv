// Testbench of controller_fsm.
//
// Drives INITIAL, CT, CN and CHZERO by hand and compares the state and all
// outputs with the controller program: the start-up sequence 0-1-2, the
// count-and-wait loop 3-9-3-9, the zero branch into the high half 4-5-10-5,
// the end-of-period test in S6 with and without CN, the address pulse
// 0 then 1 at a note change, and the look-ahead LOAD/COUNT strobes.
module tb_controller_fsm;
  import music_synth_pkg::*;

  logic   clk = 1'b0;
  logic   initial_i, ct_i, cn_i, chzero_i;
  ctrl_t  ctrl;
  logic   load, count;
  state_t state;
  int     checks = 0, failures = 0;

  controller_fsm dut (.clk(clk), .initial_i(initial_i), .ct_i(ct_i), .cn_i(cn_i),
                      .chzero_i(chzero_i), .ctrl_o(ctrl), .load_o(load),
                      .count_o(count), .state_o(state));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs, written from the controller program independently
  // of the package function: {addr, load, count, chtoggle, clrn, clrt}.
  function automatic logic [6:0] exp_out(input int s);
    case (s)
      0:  return 7'b11_0_0_0_1_0;
      1:  return 7'b10_0_0_0_0_0;
      2:  return 7'b10_1_0_0_1_1;
      3:  return 7'b10_0_1_0_1_0;
      4:  return 7'b10_1_0_1_1_1;
      5:  return 7'b10_0_1_1_1_0;
      6:  return 7'b10_0_0_1_1_0;
      7:  return 7'b00_0_0_1_0_0;
      8:  return 7'b01_0_0_1_0_0;
      9:  return 7'b10_0_0_0_1_1;
      10: return 7'b10_0_0_1_1_1;
      default: return 7'b11_0_0_0_0_0;
    endcase
  endfunction

  task automatic check_state(input int s);
    logic [6:0] got;
    got = {ctrl.addr, ctrl.load, ctrl.count, ctrl.chtoggle, ctrl.clrn_n, ctrl.clrt_n};
    checks++;
    if (int'(state) != s || got !== exp_out(s)) begin
      failures++;
      $display("FAIL t=%0t state=%0d exp %0d outputs=%b exp %b", $time, state, s, got, exp_out(s));
    end
  endtask

  // Apply inputs, step one clock, check the new state.
  task automatic step(input logic ct, input logic cn, input logic z, input int s_exp,
                      input logic load_exp, input logic count_exp);
    ct_i = ct; cn_i = cn; chzero_i = z;
    #1;
    checks++;
    if (load !== load_exp || count !== count_exp) begin
      failures++;
      $display("FAIL t=%0t strobes load=%b count=%b exp %b %b", $time, load, count, load_exp, count_exp);
    end
    @(posedge clk); #1;
    check_state(s_exp);
  endtask

  initial begin
    initial_i = 1'b1; ct_i = 0; cn_i = 0; chzero_i = 0;
    #1;
    // INITIAL overrides the outputs.
    checks++;
    if ({ctrl.addr, ctrl.clrn_n, ctrl.clrt_n, ctrl.load, ctrl.count} !== 6'b11_0_0_0_0) begin
      failures++; $display("FAIL INITIAL outputs");
    end
    @(posedge clk); @(posedge clk); #1;
    initial_i = 1'b0; #1;
    check_state(0);
    step(1, 0, 0, 0, 0, 0);   // CT ignored in S0
    step(0, 1, 0, 1, 0, 0);   // CN -> S1
    step(0, 0, 0, 2, 1, 0);   // S1 -> S2, load strobe
    step(0, 0, 0, 2, 1, 0);   // wait for CT
    step(1, 0, 0, 3, 0, 1);   // CT -> S3, count strobe
    step(0, 0, 0, 9, 0, 0);   // not zero -> S9
    step(0, 0, 0, 9, 0, 0);
    step(1, 0, 0, 3, 0, 1);   // 3-9-3-9
    step(0, 0, 1, 4, 1, 0);   // zero -> S4, load
    step(0, 0, 1, 4, 1, 0);
    step(1, 0, 0, 5, 0, 1);   // CT -> S5
    step(0, 0, 0, 10, 0, 0);
    step(1, 0, 0, 5, 0, 1);   // 5-a-5-a
    step(0, 0, 1, 6, 0, 0);   // zero -> S6
    step(0, 0, 0, 2, 1, 0);   // no CN -> S2 (new period)
    step(1, 0, 0, 3, 0, 1);
    step(0, 0, 1, 4, 1, 0);
    step(1, 0, 0, 5, 0, 1);
    step(0, 1, 1, 6, 0, 0);
    step(0, 1, 0, 7, 0, 0);   // CN -> S7
    step(0, 0, 0, 8, 0, 0);   // S8
    step(0, 0, 0, 2, 1, 0);   // S2
    // INITIAL from the middle of a note returns to S0.
    initial_i = 1'b1;
    @(posedge clk); #1;
    initial_i = 1'b0; #1;
    check_state(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
