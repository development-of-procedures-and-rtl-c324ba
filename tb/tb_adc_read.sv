// tb_adc_read -- ADC conversion/read sequencer against the published timing.
//
// An ADC model converts six known codes. The testbench finds the first clock
// of each cycle (CONVST rising) and checks every pin, clock by clock, against
// the timing table written out here: CONVST high for counts 0..79, CS low for
// 62..78, RD low at 62,63,65,66,...,77,78, dvo at 79. It checks that the six
// results equal the codes converted, that a one-clock request still runs a
// whole cycle, that back-to-back cycles are 81 clocks apart and that a
// sampling delay of D clocks stretches that to 81+D.
module tb_adc_read;
  import fet_pkg::*;
  logic clk = 0, rst, en;
  logic [31:0] samp_delay;
  logic [15:0] adc_data;
  logic adc_rd, adc_cs, adc_reset, adc_stby, adc_range, adc_wb, adc_ser_par_sel, adc_hs, adc_wr_refen_dis;
  logic [2:0] adc_convst;
  logic [5:0][15:0] v, ain;
  logic dvo, conv_intern, adc_busy;
  int conversions;
  int checks = 0, failures = 0;

  adc_read dut (.clk(clk), .rst(rst), .en(en), .samp_delay(samp_delay), .adc_data(adc_data),
    .adc_rd(adc_rd), .adc_cs(adc_cs), .adc_convst(adc_convst), .adc_reset(adc_reset),
    .adc_stby(adc_stby), .adc_range(adc_range), .adc_wb(adc_wb), .adc_ser_par_sel(adc_ser_par_sel),
    .adc_hs(adc_hs), .adc_wr_refen_dis(adc_wr_refen_dis), .v(v), .dvo(dvo), .conv_intern(conv_intern));

  ad7656_model adc (.ain(ain), .convst(adc_convst), .cs_n(adc_cs), .rd_n(adc_rd),
    .reset(adc_reset), .busy(adc_busy), .data(adc_data), .conversions(conversions));

  always #25 clk = ~clk;

  function automatic bit exp_rd_low(int c);
    int unsigned lows[12] = '{62, 63, 65, 66, 68, 69, 71, 72, 74, 75, 77, 78};
    foreach (lows[i]) if (lows[i] == c) return 1;
    return 0;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // cycle-by-cycle pin check; count = clocks since CONVST rose
  int  count = -1;
  int  last_start = -1;
  int  cyc = 0;
  int  starts[$];
  logic convst_d = 0;
  always @(posedge clk) begin
    cyc++;
    #2;
    if (adc_convst[0] && !convst_d) begin
      if (count >= 0 && count < 80) chk(0, "cycle restarted early");
      count = 0;
      starts.push_back(cyc);
    end else if (count >= 0) begin
      count++;
    end
    convst_d = adc_convst[0];
    if (count >= 0 && count <= 80) begin
      chk(adc_convst == {3{count <= 79}}, $sformatf("convst at count %0d", count));
      chk(adc_cs == !(count >= 62 && count <= 78), $sformatf("cs at count %0d", count));
      chk(adc_rd == !exp_rd_low(count), $sformatf("rd at count %0d", count));
      chk(dvo == (count == 79), $sformatf("dvo at count %0d", count));
      chk(conv_intern == (count <= 79), $sformatf("conv_intern at count %0d", count));
      if (count == 79) chk(v == ain, "results equal converted codes");
    end else begin
      chk(adc_cs && adc_rd && !dvo, "bus idle outside a cycle");
    end
    if (count == 80) count = -1;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; samp_delay = 0;
    for (int k = 0; k < 6; k++) ain[k] = 16'h1111 * 16'(k + 1) + 16'h0203;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(adc_reset == 1, "ADC reset held after FPGA reset");
    chk(adc_stby && adc_range && !adc_wb && !adc_ser_par_sel && !adc_hs && adc_wr_refen_dis,
        "fixed ADC mode pins");
    // request during ADC reset is deferred until reset is over
    en = 1;
    @(posedge clk); #1;
    en = 0;
    repeat (10) @(posedge clk);
    chk(adc_reset == 0, "ADC reset released");
    chk(conversions == 0, "no conversion while ADC in reset");
    // single-clock request: whole cycle runs
    @(negedge clk) en = 1;
    @(negedge clk) en = 0;
    repeat (100) @(posedge clk);
    chk(conversions == 1, "one-clock request runs one full cycle");
    chk(starts.size() == 1, "one cycle started");
    // continuous request, no delay: 81-clock spacing
    starts.delete();
    for (int k = 0; k < 6; k++) ain[k] = 16'($urandom);
    @(negedge clk) en = 1;
    repeat (81 * 3 + 5) @(posedge clk);
    chk(starts.size() >= 3, "three back-to-back cycles");
    for (int i = 1; i < starts.size(); i++) chk(starts[i] - starts[i-1] == 81, "cycle length 81 clocks");
    // continuous request with sampling delay
    @(negedge clk) en = 0;
    repeat (100) @(posedge clk);
    samp_delay = 40;
    starts.delete();
    for (int k = 0; k < 6; k++) ain[k] = 16'($urandom);
    @(negedge clk) en = 1;
    repeat (121 * 3 + 5) @(posedge clk);
    chk(starts.size() >= 3, "three delayed cycles");
    for (int i = 1; i < starts.size(); i++)
      chk(starts[i] - starts[i-1] == 81 + 40, $sformatf("cycle spacing %0d with delay 40", starts[i] - starts[i-1]));
    en = 0;
    repeat (200) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
