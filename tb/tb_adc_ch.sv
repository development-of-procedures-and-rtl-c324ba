// tb_adc_ch -- switched-bias generator, sampling windows, decimation tick
// and A/B/T routing of one port.
//
// With period 100, width 40 and windows [10,30) and [60,90) the testbench
// counts clocks from each rising edge of swb and checks that swb is high
// for exactly the first 40 of every 100 clocks and that adc_en is high
// exactly inside the two windows. dec must come every data_period clocks.
// BUSY pulses are driven at random times; the level of swb at the BUSY
// rising edge decides where the following result must go (A if high, B if
// low), and the temperature result must always go to T. Finally width =
// period must give constant level A and period 0 an idle port.
module tb_adc_ch;
  import fet_pkg::*;
  logic clk = 0, rst;
  port_cfg_t cfg;
  logic adc_busy, adc_dvi;
  logic [15:0] va, vt, val_h, val_l, val_t;
  logic swb, adc_en, dec, val_h_en, val_l_en, val_t_en;
  int checks = 0, failures = 0;

  adc_ch dut (.clk(clk), .rst(rst), .cfg(cfg), .adc_busy(adc_busy), .adc_dvi(adc_dvi),
    .va(va), .vt(vt), .swb(swb), .adc_en(adc_en), .dec(dec), .val_h(val_h), .val_h_en(val_h_en),
    .val_l(val_l), .val_l_en(val_l_en), .val_t(val_t), .val_t_en(val_t_en));

  always #25 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // waveform checker
  bit   monitor = 0;
  int   e = -1;               // clocks since swb rose
  logic swb_d = 0;
  int   cyc = 0, last_dec = -1, dec_gaps = 0, periods = 0;
  always @(posedge clk) begin
    cyc++;
    #2;
    if (monitor) begin
      if (swb && !swb_d) begin
        if (e >= 0) begin
          chk(e == 99, $sformatf("period %0d clocks", e + 1));
          periods++;
        end
        e = 0;
      end else if (e >= 0) e++;
      if (e >= 0) begin
        chk(swb == (e < 40), $sformatf("swb at %0d", e));
        chk(adc_en == ((e >= 10 && e < 30) || (e >= 60 && e < 90)), $sformatf("adc_en at %0d", e));
      end
      if (dec) begin
        if (last_dec >= 0) begin
          chk(cyc - last_dec == 500, $sformatf("dec spacing %0d", cyc - last_dec));
          dec_gaps++;
        end
        last_dec = cyc;
      end
    end
    swb_d = swb;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_a = 0, n_b = 0;
  initial begin
    rst = 1; cfg = '0; adc_busy = 0; adc_dvi = 0; va = 0; vt = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (20) @(posedge clk);
    chk(!swb && !adc_en && !dec, "idle until configured");
    cfg.sw_period = 100; cfg.sw_width = 40;
    cfg.phase_a = 10; cfg.phase_b = 30; cfg.phase_c = 60; cfg.phase_d = 90;
    cfg.data_period = 500;
    repeat (150) @(posedge clk);
    monitor = 1;
    // routing
    for (int i = 0; i < 100; i++) begin
      logic lvl;
      logic [15:0] a, t;
      repeat ($urandom_range(5, 60)) @(posedge clk);
      #3 adc_busy = 1;
      lvl = swb;                     // level at the sample-and-hold instant
      repeat ($urandom_range(3, 20)) @(posedge clk);
      #3 adc_busy = 0;
      a = 16'($urandom); t = 16'($urandom);
      repeat ($urandom_range(1, 5)) @(posedge clk);
      #3 adc_dvi = 1; va = a; vt = t;
      @(posedge clk); #1;
      adc_dvi = 0; va = ~a;
      chk(val_t_en && val_t == t, "temperature routed to T");
      if (lvl) begin
        chk(val_h_en && !val_l_en && val_h == a, "level A sample routed to A");
        n_a++;
      end else begin
        chk(val_l_en && !val_h_en && val_l == a, "level B sample routed to B");
        n_b++;
      end
      @(posedge clk); #1;
      chk(!val_h_en && !val_l_en && !val_t_en, "filter enables last one clock");
    end
    chk(periods > 20 && dec_gaps > 4, "enough periods observed");
    chk(n_a > 5 && n_b > 5, "both levels routed");
    // constant biasing
    monitor = 0;
    cfg.sw_width = 100;
    repeat (300) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #2;
      chk(swb == 1, "width = period holds level A");
    end
    // unconfigured port
    cfg = '0;
    repeat (600) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #2;
      chk(!swb && !adc_en && !dec, "period 0 keeps the port idle");
    end
    $display("A routed %0d, B routed %0d", n_a, n_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
