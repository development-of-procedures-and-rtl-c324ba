// tb_calc_ch -- auto-trigger of one port.
//
// Scripted filter reports with the expected trigger after each step:
//  1. after reset nothing is expected: A+T then B report, and only the
//     next decimation pulse triggers, with all three filters;
//  2. from then on the port triggers as soon as B completes the set;
//  3. the B window is switched off: A+T alone do not match, the next
//     decimation triggers with A+T, and later A+T trigger at once;
//  4. the values and counts presented with each trigger are the latest
//     ones reported by each filter.
module tb_calc_ch;
  import fet_pkg::*;
  logic clk = 0, rst, dec, a_dvo, b_dvo, t_dvo;
  filt_res_t a_res, b_res, t_res;
  port_meas_t meas;
  int checks = 0, failures = 0;
  int triggers = 0;

  calc_ch dut (.clk(clk), .rst(rst), .dec(dec), .a_dvo(a_dvo), .a_res(a_res),
    .b_dvo(b_dvo), .b_res(b_res), .t_dvo(t_dvo), .t_res(t_res), .meas(meas));

  always #25 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (!rst && meas.trig) triggers++;

  filt_res_t last_a, last_b, last_t;

  // one clock of inputs, then check whether a trigger with 'mask' follows
  task automatic step(input bit a, input bit b, input bit t, input bit d,
                      input bit exp_trig, input logic [2:0] exp_mask, input string what);
    @(negedge clk);
    a_dvo = a; b_dvo = b; t_dvo = t; dec = d;
    a_res = '{sum: 32'($urandom), count: 16'($urandom)};
    b_res = '{sum: 32'($urandom), count: 16'($urandom)};
    t_res = '{sum: 32'($urandom), count: 16'($urandom)};
    if (a) last_a = a_res;
    if (b) last_b = b_res;
    if (t) last_t = t_res;
    @(posedge clk); #1;
    a_dvo = 0; b_dvo = 0; t_dvo = 0; dec = 0;
    chk(meas.trig == exp_trig, {what, ": trigger"});
    if (exp_trig) begin
      chk(meas.mask == exp_mask, $sformatf("%s: mask %03b expected %03b", what, meas.mask, exp_mask));
      if (exp_mask[0]) chk(meas.a == last_a, {what, ": A value"});
      if (exp_mask[1]) chk(meas.b == last_b, {what, ": B value"});
      if (exp_mask[2]) chk(meas.t == last_t, {what, ": T value"});
    end
    @(posedge clk); #1;
    chk(!meas.trig, {what, ": trigger lasts one clock"});
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; dec = 0; a_dvo = 0; b_dvo = 0; t_dvo = 0;
    a_res = '0; b_res = '0; t_res = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    step(0, 0, 0, 1, 0, 0, "dec with nothing reported");
    step(1, 0, 1, 0, 0, 0, "first A+T");
    step(0, 1, 0, 0, 0, 0, "first B");
    step(0, 0, 0, 1, 1, 3'b111, "dec after first full set");
    for (int p = 0; p < 5; p++) begin
      step(1, 0, 1, 0, 0, 0, "A+T");
      step(0, 1, 0, 0, 1, 3'b111, "B completes the set");
      step(0, 0, 0, 1, 0, 0, "dec with set already sent");
    end
    // B window switched off
    step(1, 0, 1, 0, 0, 0, "A+T after change");
    step(0, 0, 0, 1, 1, 3'b101, "dec after change");
    for (int p = 0; p < 5; p++) begin
      step(1, 0, 1, 0, 1, 3'b101, "A+T match");
      step(0, 0, 0, 1, 0, 0, "dec");
    end
    // a report in the same clock as dec is still counted
    step(0, 1, 0, 1, 1, 3'b010, "B together with dec");
    step(0, 1, 0, 0, 1, 3'b010, "B alone matches");
    chk(triggers == 1 + 5 + 1 + 5 + 2, $sformatf("trigger count %0d", triggers));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
