// tb_fet_workloads -- the two measurement set-ups of the characterisation
// runs, simulated on the full FPGA at its default size, both ports at once.
//
//  * Port 1, constant-bias resistance measurement: 10 kHz sampling period
//    (2000 clocks), 100 % duty (width = period), window A from 0.5 us to
//    25 us (clocks 10..500), windows C/D off, 10 results per second (data
//    period 2,000,000 clocks).
//  * Port 2, switched biasing: 10 kHz, 50 % duty (width 1000), and 300
//    results in 1.5 minutes, i.e. 3.33 per second (data period 6,000,000
//    clocks). The windows are not given for this run; here window A is
//    clocks 10..500 (bias high) and window B clocks 1010..1500 (bias low).
//
// The analog side reads a fixed code per port, bias level and temperature
// channel, so every reported sum must equal code x count. The expected
// counts come from a monitor on the pins: on each rising edge of ADC BUSY
// it notes the two bias outputs. Both configurations repeat exactly every
// 2000 clocks and their data periods are whole multiples of that, so the
// number of conversions of a given kind in any one data period is fixed,
// and each block must hold exactly the number the monitor saw between the
// port's previous trigger and this one. The result intervals are checked
// to the clock (10 Hz and 3.33 Hz), and both rates are printed.
// The first two results of each port are not checked: the MCU writes the
// 32-bit data period low half first, so the first block is short, and its
// result is only sent when the next block closes, just before the first
// full block's result.
module tb_fet_workloads;
  import fet_pkg::*;
  logic clk = 0, areset;
  logic adc_rd, adc_cs, adc_reset, adc_stby, adc_range, adc_wb, adc_ser_par_sel, adc_hs, adc_wr_refen_dis;
  logic [2:0] adc_convst;
  logic adc_busy;
  logic [15:0] adc_data;
  logic sw_a, sw_b, range_ch1, range_ch2;
  logic [7:0] mcu_addr;
  logic [15:0] mcu_data_in, mcu_data_out;
  logic mcu_data_oe, mcu_oe, mcu_stream_dvo, mcu_stream_busy, mcu_stream_warn;
  logic mcu_req_mosi, mcu_req_mosi_ack, mcu_req_miso, mcu_req_miso_ack;
  logic [5:0][15:0] ain;
  int conversions, bus_errors;
  int checks = 0, failures = 0;

  localparam int SW_PERIOD = 2000;          // 10 kHz
  localparam int DP1 = 2_000_000;           // 10 results/s
  localparam int DP2 = 6_000_000;           // 300 results in 90 s
  localparam int BLOCKS1 = 8, BLOCKS2 = 3;  // results checked per port

  localparam logic signed [15:0] VA1 = 16'sd9000, T1 = 16'sd2500;
  localparam logic signed [15:0] VA2 = -16'sd11000, VB2 = 16'sd6000, T2 = -16'sd800;

  fet_root dut (.clk(clk), .areset(areset),
    .adc_rd(adc_rd), .adc_convst(adc_convst), .adc_cs(adc_cs), .adc_reset(adc_reset),
    .adc_stby(adc_stby), .adc_range(adc_range), .adc_wb(adc_wb), .adc_ser_par_sel(adc_ser_par_sel),
    .adc_hs(adc_hs), .adc_wr_refen_dis(adc_wr_refen_dis), .adc_busy(adc_busy), .adc_data(adc_data),
    .sw_a(sw_a), .sw_b(sw_b), .range_ch1(range_ch1), .range_ch2(range_ch2),
    .mcu_addr(mcu_addr), .mcu_data_in(mcu_data_in), .mcu_data_out(mcu_data_out),
    .mcu_data_oe(mcu_data_oe), .mcu_oe(mcu_oe), .mcu_stream_dvo(mcu_stream_dvo),
    .mcu_stream_busy(mcu_stream_busy), .mcu_stream_warn(mcu_stream_warn),
    .mcu_req_mosi(mcu_req_mosi), .mcu_req_mosi_ack(mcu_req_mosi_ack),
    .mcu_req_miso(mcu_req_miso), .mcu_req_miso_ack(mcu_req_miso_ack));

  ad7656_model adc (.ain(ain), .convst(adc_convst), .cs_n(adc_cs), .rd_n(adc_rd),
    .reset(adc_reset), .busy(adc_busy), .data(adc_data), .conversions(conversions));

  mcu_bus_model mcu (.addr(mcu_addr), .data_to_fpga(mcu_data_in), .data_from_fpga(mcu_data_out),
    .fpga_drives(mcu_data_oe), .oe(mcu_oe), .req_miso(mcu_req_miso), .req_miso_ack(mcu_req_miso_ack),
    .req_mosi(mcu_req_mosi), .req_mosi_ack(mcu_req_mosi_ack), .stream_busy(mcu_stream_busy),
    .errors(bus_errors));

  always #25 clk = ~clk;

  always_comb begin
    ain[0] = sw_a ? VA1 : 16'sd0;           // port 1 is never at level B
    ain[1] = T1;
    ain[2] = sw_b ? VA2 : VB2;
    ain[3] = T2;
    ain[4] = 16'h0000;
    ain[5] = 16'h0000;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // clock count and pin monitors
  int cyc = 0;
  int n_conv = 0, n_conv2_a = 0, n_conv2_b = 0, n_conv1_b = 0;
  int sw_b_rise = 0, sw_b_fall = 0, sw_b_period = 0, sw_b_width = 0;
  logic sw_b_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (sw_b && !sw_b_d) begin
      if (sw_b_rise != 0) sw_b_period = cyc - sw_b_rise;
      sw_b_rise = cyc;
    end
    if (!sw_b && sw_b_d) begin
      sw_b_fall = cyc;
      sw_b_width = sw_b_fall - sw_b_rise;
    end
    sw_b_d <= sw_b;
  end
  always @(posedge adc_busy) begin
    n_conv++;
    if (!sw_a) n_conv1_b++;
    if (sw_b) n_conv2_a++;
    else      n_conv2_b++;
  end

  // which port triggered, and the monitor counts at that moment
  int trig_at [2] = '{-1, -1};
  int snap_all [2], snap_a [2], snap_b [2];
  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (dut.meas[p].trig) begin
        trig_at[p]  = cyc;
        snap_all[p] = n_conv;
        snap_a[p]   = (p == 0) ? n_conv : n_conv2_a;
        snap_b[p]   = (p == 0) ? n_conv1_b : n_conv2_b;
      end
    end
  end

  task automatic cfg_port(input int p, input int period, input int width,
                          input int pa, input int pb, input int pc, input int pd, input int dp);
    int base = (p == 0) ? 0 : 4;
    int ph   = (p == 0) ? A_PHASE_A1 : A_PHASE_A2;
    mcu.write32(8'(base + 2), 32'(width));
    mcu.write32(8'(ph),     32'(pa));
    mcu.write32(8'(ph + 2), 32'(pb));
    mcu.write32(8'(ph + 4), 32'(pc));
    mcu.write32(8'(ph + 6), 32'(pd));
    mcu.write32(8'((p == 0) ? A_DATA_PER1 : A_DATA_PER2), 32'(dp));
    mcu.write32(8'(base), 32'(period));
  endtask

  // one retrieval of the port that just triggered
  task automatic retrieve(output int p, output logic [3:0] flags,
                          output logic signed [31:0] sum [3], output logic [15:0] cnt [3]);
    logic [15:0] d;
    logic [31:0] w;
    @(posedge mcu_stream_dvo);
    p = (trig_at[1] == cyc || trig_at[1] == cyc - 1 || trig_at[1] == cyc - 2) ? 1 : 0;
    mcu.stream_busy = 1;
    mcu.read(8'(A_CH_TRIG), d);
    flags = d[4 * p +: 4];
    for (int f = 0; f < 3; f++) begin
      int off  = (f == 2) ? 6 : 2 * f;
      int coff = (f == 2) ? 3 : f;
      mcu.read32(8'(((p == 0) ? A_CH1_VAL : A_CH2_VAL) + off), w);
      sum[f] = w;
      mcu.read(8'(((p == 0) ? A_CH1_CNT : A_CH2_CNT) + coff), d);
      cnt[f] = d;
    end
    mcu.stream_busy = 0;
  endtask

  initial begin
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, n [2], last_at [2], prev_all [2], prev_a [2], prev_b [2];
    int exp_a, exp_b, exp_t;
    logic [3:0] flags;
    logic signed [31:0] sum [3];
    logic [15:0] cnt [3];
    areset = 0;
    repeat (5) @(posedge clk);
    #3 areset = 1;
    repeat (20) @(posedge clk);

    mcu.write(8'(A_CH_TRIG), 16'hC000);        // stream both ports
    // port 2 first; port 1 a millisecond later so that the two ports'
    // results never arrive while the other is being read
    cfg_port(1, SW_PERIOD, SW_PERIOD / 2, 10, 500, 1010, 1500, DP2);
    #1ms;
    cfg_port(0, SW_PERIOD, SW_PERIOD, 10, 500, 0, 0, DP1);

    n = '{0, 0};
    last_at = '{-1, -1};
    while (n[0] < BLOCKS1 + 2 || n[1] < BLOCKS2 + 2) begin
      retrieve(p, flags, sum, cnt);
      if (n[p] > 1) begin
        // a whole data period lies between this trigger and the previous one
        exp_a = snap_a[p] - prev_a[p];
        exp_b = snap_b[p] - prev_b[p];
        exp_t = snap_all[p] - prev_all[p];
        chk(trig_at[p] - last_at[p] == ((p == 0) ? DP1 : DP2),
            $sformatf("port %0d result interval %0d", p + 1, trig_at[p] - last_at[p]));
        if (p == 0) begin
          chk(flags == 4'b1001, $sformatf("port 1 flags %b (A and T only)", flags));
          chk(exp_b == 0, "port 1 never sampled at level B");
          chk(32'(cnt[0]) == 32'(exp_a) && 32'(cnt[2]) == 32'(exp_t),
              $sformatf("port 1 counts A %0d T %0d, expected %0d %0d", cnt[0], cnt[2], exp_a, exp_t));
          chk(sum[0] == 32'(VA1) * 32'(cnt[0]), $sformatf("port 1 A sum %0d", sum[0]));
          chk(sum[2] == 32'(T1) * 32'(cnt[2]), $sformatf("port 1 T sum %0d", sum[2]));
          if (n[0] == 2)
            $display("port 1: %0d samples per result at 10 results/s (%0d per sampling period)",
                     cnt[0], 32'(cnt[0]) / (DP1 / SW_PERIOD));
        end else begin
          chk(flags == 4'b1011, $sformatf("port 2 flags %b (A, B and T)", flags));
          chk(32'(cnt[0]) == 32'(exp_a) && 32'(cnt[1]) == 32'(exp_b) && 32'(cnt[2]) == 32'(exp_t),
              $sformatf("port 2 counts A %0d B %0d T %0d, expected %0d %0d %0d",
                        cnt[0], cnt[1], cnt[2], exp_a, exp_b, exp_t));
          chk(sum[0] == 32'(VA2) * 32'(cnt[0]), $sformatf("port 2 A sum %0d", sum[0]));
          chk(sum[1] == 32'(VB2) * 32'(cnt[1]), $sformatf("port 2 B sum %0d", sum[1]));
          chk(sum[2] == 32'(T2) * 32'(cnt[2]), $sformatf("port 2 T sum %0d", sum[2]));
          if (n[1] == 2)
            $display("port 2: %0d A, %0d B, %0d T samples per result at 3.33 results/s",
                     cnt[0], cnt[1], cnt[2]);
        end
      end
      last_at[p]  = trig_at[p];
      prev_all[p] = snap_all[p];
      prev_a[p]   = snap_a[p];
      prev_b[p]   = snap_b[p];
      n[p]++;
    end

    // the bias outputs: port 1 constant, port 2 at 10 kHz and 50 %
    chk(sw_a, "port 1 bias constant at level A");
    chk(sw_b_period == SW_PERIOD && sw_b_width == SW_PERIOD / 2,
        $sformatf("port 2 bias period %0d width %0d", sw_b_period, sw_b_width));
    chk(!mcu_stream_warn, "no result lost");
    chk(bus_errors == 0, "bus handshakes");
    $display("results checked: port 1 %0d, port 2 %0d; conversions %0d",
             n[0] - 2, n[1] - 2, conversions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
