// tb_fet_root -- end-to-end test of the FPGA with an ADC model and an MCU
// bus model, at the design's only (default) size.
//
// The analog side is modelled so that each port's current channel reads a
// fixed code per bias level (port 1: +12000 at A, -7000 at B; port 2:
// -20000 at A, +15000 at B) and each temperature channel a fixed code. A
// filter that only ever sees one level must then report sum = code x count
// exactly, which checks the routing, the CIC and the register file at once.
// The MCU model configures the ports over the bus, waits for stream_dvo,
// raises stream_busy, reads the flags and the flagged results, and drops
// stream_busy, as the firmware does. Phases:
//  1. port 1 switched (period 1000, width 500, windows [100,400) and
//     [600,900), data period 5000): 4 conversions per window, so blocks of
//     20 A, 20 B and 40 T samples, one trigger every 5000 clocks;
//  2. sampling delay 29: conversions 110 clocks apart, 3 per window, 15/15/30;
//  3. width = period (constant bias): both windows sample level A, the B
//     filter falls silent and the auto-trigger switches to A+T (40/40);
//  4. port 2 configured alike and both ports streamed;
//  5. the MCU stays busy longer than a data period: lost measurements,
//     stream warning and locked results;
//  6. range relays and the software reset.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_fet_root;
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

  localparam logic signed [15:0] VA1 = 16'sd12000, VB1 = -16'sd7000, T1 = 16'sd3000;
  localparam logic signed [15:0] VA2 = -16'sd20000, VB2 = 16'sd15000, T2 = -16'sd1234;

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

  // analog model of the two measurement ports
  always_comb begin
    ain[0] = sw_a ? VA1 : VB1;
    ain[1] = T1;
    ain[2] = sw_b ? VA2 : VB2;
    ain[3] = T2;
    ain[4] = 16'h1234;
    ain[5] = 16'h5678;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters
  int n_bias_toggle = 0, n_a_blocks = 0, n_b_blocks = 0, n_t_blocks = 0;
  int n_delay_blocks = 0, n_const_blocks = 0, n_port2_blocks = 0, n_lost = 0;
  int n_locked = 0, n_range = 0, n_sw_reset = 0, n_streams = 0;
  logic sw_a_d = 0;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (sw_a != sw_a_d) n_bias_toggle++;
    sw_a_d <= sw_a;
  end

  // one streaming retrieval, as the firmware does it
  typedef struct {
    logic [15:0] flags;
    logic signed [31:0] sum [2][3];
    logic [15:0] cnt [2][3];
    int   at;
  } result_t;

  task automatic stream(output result_t r);
    logic [15:0] d;
    logic [31:0] w;
    @(posedge mcu_stream_dvo);
    r.at = cyc;
    mcu.stream_busy = 1;
    mcu.read(8'(A_CH_TRIG), d);
    r.flags = d;
    for (int p = 0; p < 2; p++) begin
      for (int f = 0; f < 3; f++) begin
        int off = (f == 2) ? 6 : 2 * f;       // a, b, t sums
        int coff = (f == 2) ? 3 : f;
        r.sum[p][f] = 0;
        r.cnt[p][f] = 0;
        if (d[4 * p + ((f == 2) ? 3 : f)]) begin
          mcu.read32(8'(((p == 0) ? A_CH1_VAL : A_CH2_VAL) + off), w);
          r.sum[p][f] = w;
          mcu.read(8'(((p == 0) ? A_CH1_CNT : A_CH2_CNT) + coff), d);
          r.cnt[p][f] = d;
          mcu.read(8'(A_CH_TRIG), d);
        end
      end
    end
    mcu.stream_busy = 0;
    n_streams++;
  endtask

  // sum must be code x count for every reported filter of a port
  task automatic check_sums(input result_t r, input int p, input string what);
    logic signed [15:0] code [3];
    code = (p == 0) ? '{VA1, VB1, T1} : '{VA2, VB2, T2};
    for (int f = 0; f < 3; f++) begin
      if (r.flags[4 * p + ((f == 2) ? 3 : f)]) begin
        chk(r.sum[p][f] == 32'(code[f]) * 32'(r.cnt[p][f]) && r.cnt[p][f] != 0,
            $sformatf("%s: port %0d filter %0d sum %0d count %0d", what, p + 1, f, r.sum[p][f], r.cnt[p][f]));
      end
    end
  endtask

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

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    result_t r;
    logic [15:0] d;
    int last_at;
    areset = 0;
    repeat (5) @(posedge clk);
    #3 areset = 1;
    repeat (20) @(posedge clk);
    chk(!sw_a && !sw_b && conversions == 0, "idle after reset");

    // ---- phase 1: port 1 switched biasing
    mcu.write(8'(A_CH_TRIG), 16'h4000);          // stream port 1
    cfg_port(0, 1000, 500, 100, 400, 600, 900, 5000);
    last_at = -1;
    for (int i = 0; i < 6; i++) begin
      stream(r);
      check_sums(r, 0, "phase 1");
      if (i >= 2) begin
        chk(r.flags[3:0] == 4'hB, $sformatf("phase 1 flags %h", r.flags));
        chk(r.cnt[0][0] == 20 && r.cnt[0][1] == 20 && r.cnt[0][2] == 40,
            $sformatf("phase 1 counts %0d/%0d/%0d", r.cnt[0][0], r.cnt[0][1], r.cnt[0][2]));
        chk(r.at - last_at == 5000, $sformatf("phase 1 trigger interval %0d", r.at - last_at));
        n_a_blocks++; n_b_blocks++; n_t_blocks++;
      end
      last_at = r.at;
    end
    chk(n_bias_toggle >= 2 * 6 * 5, "bias toggles every half period");

    // ---- phase 2: sampling delay
    mcu.write32(8'(A_SAMP_DELAY), 32'd29);
    for (int i = 0; i < 5; i++) begin
      stream(r);
      check_sums(r, 0, "phase 2");
      if (i >= 2) begin
        chk(r.cnt[0][0] == 15 && r.cnt[0][1] == 15 && r.cnt[0][2] == 30,
            $sformatf("phase 2 counts %0d/%0d/%0d", r.cnt[0][0], r.cnt[0][1], r.cnt[0][2]));
        n_delay_blocks++;
      end
    end
    mcu.write32(8'(A_SAMP_DELAY), 32'd0);

    // ---- phase 3: constant biasing (width = period)
    mcu.write32(8'(A_TWIDTH_A), 32'd1000);
    for (int i = 0; i < 6; i++) begin
      stream(r);
      check_sums(r, 0, "phase 3");
      if (i >= 3) begin
        chk(r.flags[3:0] == 4'h9, $sformatf("phase 3 flags %h", r.flags));
        chk(r.cnt[0][0] == 40 && r.cnt[0][2] == 40,
            $sformatf("phase 3 counts %0d/%0d", r.cnt[0][0], r.cnt[0][2]));
        n_const_blocks++;
      end
    end
    mcu.write32(8'(A_TWIDTH_A), 32'd500);

    // ---- phase 4: both ports
    cfg_port(1, 1000, 300, 50, 250, 500, 950, 5000);
    mcu.write(8'(A_CH_TRIG), 16'hC000);
    for (int i = 0; i < 10; i++) begin
      stream(r);
      check_sums(r, 0, "phase 4 port 1");
      check_sums(r, 1, "phase 4 port 2");
      if (i >= 4 && r.flags[7:4] == 4'hB) n_port2_blocks++;
    end

    // ---- phase 5: MCU too slow, measurements lost
    mcu.write(8'(A_CH_TRIG), 16'h4000);
    wait (mcu_stream_dvo);
    @(negedge mcu_stream_dvo);
    mcu.stream_busy = 1;
    mcu.read32(8'(A_CH1_VAL), r.sum[0][0]);
    repeat (12000) @(posedge clk);              // more than two data periods
    begin
      logic [31:0] w;
      mcu.read32(8'(A_CH1_VAL), w);
      chk(w == r.sum[0][0], "results locked while busy");
      if (w == r.sum[0][0]) n_locked++;
    end
    chk(mcu_stream_warn, "stream warning raised");
    mcu.read(8'(A_LOST_CNT), d);
    chk(d >= 2, $sformatf("lost counter %0d", d));
    n_lost = int'(d);
    mcu.stream_busy = 0;
    stream(r);
    check_sums(r, 0, "after lost measurements");
    chk(!mcu_stream_warn, "warning cleared by next retrieval");

    // ---- phase 6: range relays and software reset
    mcu.write(8'(A_CONTROL), 16'h0002);
    chk(range_ch1 && !range_ch2, "range relay port 1");
    mcu.write(8'(A_CONTROL), 16'h0004);
    chk(!range_ch1 && range_ch2, "range relay port 2");
    n_range = 2;
    mcu.write(8'(A_CONTROL), 16'h0001);
    repeat (10) @(posedge clk);
    mcu.read(8'(A_TPERIOD_A), d);
    chk(d == 0, "software reset clears configuration");
    chk(!range_ch2, "software reset opens range relay");
    repeat (1100) @(posedge clk);
    chk(!sw_a && !sw_b, "software reset stops switched biasing");
    if (d == 0) n_sw_reset++;

    // every mechanism must have happened
    chk(n_bias_toggle > 0,  "mechanism: switched biasing");
    chk(n_a_blocks > 0,     "mechanism: A-window filtering");
    chk(n_b_blocks > 0,     "mechanism: B-window filtering");
    chk(n_t_blocks > 0,     "mechanism: temperature filtering");
    chk(n_delay_blocks > 0, "mechanism: sampling delay");
    chk(n_const_blocks > 0, "mechanism: constant biasing / trigger-set change");
    chk(n_port2_blocks > 0, "mechanism: two ports streamed");
    chk(n_lost > 0,         "mechanism: lost measurement warning");
    chk(n_locked > 0,       "mechanism: result lock while busy");
    chk(n_range > 0,        "mechanism: range relays");
    chk(n_sw_reset > 0,     "mechanism: software reset");
    chk(bus_errors == 0,    "bus direction");
    $display("bias toggles %0d, streams %0d, conversions %0d, A/B/T blocks %0d/%0d/%0d, delay %0d, const %0d, port2 %0d, lost %0d",
             n_bias_toggle, n_streams, conversions, n_a_blocks, n_b_blocks, n_t_blocks,
             n_delay_blocks, n_const_blocks, n_port2_blocks, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
