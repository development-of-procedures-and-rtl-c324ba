// tb_mcu_io -- register file, MCU handshake and stream signalling.
//
// An MCU bus model writes random values to every configuration word and
// reads them back; the configuration outputs must be the word pairs (low
// word first). Port results presented with a trigger must appear at their
// published addresses, with the filter flags in word 27; only the port
// selected in word 27 may raise stream_dvo, for three clocks. With
// stream_busy high a selected trigger must raise stream_warn, count up the
// lost counter and leave the stored results alone, unless the
// always-update bit (word 28 bit 7) is set. Addresses above 63 read 0.
module tb_mcu_io;
  import fet_pkg::*;
  logic clk = 0, rst;
  logic [7:0] mcu_addr;
  logic [15:0] mcu_data_in, mcu_data_out;
  logic mcu_data_oe, mcu_oe, mcu_req_miso, mcu_req_miso_ack, mcu_req_mosi, mcu_req_mosi_ack;
  logic mcu_stream_busy, mcu_stream_dvo, mcu_stream_warn;
  port_cfg_t cfg1, cfg2;
  logic [31:0] samp_delay;
  logic range_ch1, range_ch2, sw_reset;
  port_meas_t meas1, meas2;
  int bus_errors;
  int checks = 0, failures = 0;

  mcu_io dut (.clk(clk), .rst(rst), .mcu_addr(mcu_addr), .mcu_data_in(mcu_data_in),
    .mcu_data_out(mcu_data_out), .mcu_data_oe(mcu_data_oe), .mcu_oe(mcu_oe),
    .mcu_req_miso(mcu_req_miso), .mcu_req_miso_ack(mcu_req_miso_ack),
    .mcu_req_mosi(mcu_req_mosi), .mcu_req_mosi_ack(mcu_req_mosi_ack),
    .mcu_stream_busy(mcu_stream_busy), .mcu_stream_dvo(mcu_stream_dvo),
    .mcu_stream_warn(mcu_stream_warn), .cfg1(cfg1), .cfg2(cfg2), .samp_delay(samp_delay),
    .range_ch1(range_ch1), .range_ch2(range_ch2), .sw_reset(sw_reset), .meas1(meas1), .meas2(meas2));

  mcu_bus_model mcu (.addr(mcu_addr), .data_to_fpga(mcu_data_in), .data_from_fpga(mcu_data_out),
    .fpga_drives(mcu_data_oe), .oe(mcu_oe), .req_miso(mcu_req_miso), .req_miso_ack(mcu_req_miso_ack),
    .req_mosi(mcu_req_mosi), .req_mosi_ack(mcu_req_mosi_ack), .stream_busy(mcu_stream_busy),
    .errors(bus_errors));

  always #25 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int dvo_clocks = 0;
  always @(posedge clk) if (mcu_stream_dvo) dvo_clocks++;

  function automatic port_meas_t rand_meas();
    port_meas_t m;
    m.trig = 0;
    m.mask = '{t: 1'b1, b: 1'b1, a: 1'b1};
    m.a = '{sum: 32'($urandom), count: 16'($urandom)};
    m.b = '{sum: 32'($urandom), count: 16'($urandom)};
    m.t = '{sum: 32'($urandom), count: 16'($urandom)};
    return m;
  endfunction

  task automatic fire(input int port, input port_meas_t m);
    @(negedge clk);
    if (port == 1) begin meas1 = m; meas1.trig = 1; end
    else           begin meas2 = m; meas2.trig = 1; end
    @(negedge clk);
    meas1.trig = 0; meas2.trig = 0;
    repeat (6) @(negedge clk);
  endtask

  // read back one port's stored results and compare
  task automatic check_port(input int port, input port_meas_t m, input string what);
    logic [31:0] s;
    logic [15:0] c;
    int vb = (port == 1) ? A_CH1_VAL : A_CH2_VAL;
    int cb = (port == 1) ? A_CH1_CNT : A_CH2_CNT;
    mcu.read32(8'(vb),     s); chk(s == m.a.sum, {what, ": A sum"});
    mcu.read32(8'(vb + 2), s); chk(s == m.b.sum, {what, ": B sum"});
    mcu.read32(8'(vb + 6), s); chk(s == m.t.sum, {what, ": T sum"});
    mcu.read(8'(cb),     c); chk(c == m.a.count, {what, ": A count"});
    mcu.read(8'(cb + 1), c); chk(c == m.b.count, {what, ": B count"});
    mcu.read(8'(cb + 3), c); chk(c == m.t.count, {what, ": T count"});
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] shadow [64];
  initial begin
    logic [15:0] d;
    logic [31:0] w;
    port_meas_t m1, m2, m3;
    rst = 1; meas1 = '0; meas2 = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // configuration words 0..25 and 56..59
    for (int a = 0; a < 64; a++) shadow[a] = '0;
    for (int a = 0; a < 26; a++) begin
      shadow[a] = 16'($urandom);
      mcu.write(8'(a), shadow[a]);
    end
    for (int a = 56; a < 60; a++) begin
      shadow[a] = 16'($urandom);
      mcu.write(8'(a), shadow[a]);
    end
    for (int a = 0; a < 26; a++) begin
      mcu.read(8'(a), d);
      chk(d == shadow[a], $sformatf("read back word %0d", a));
    end
    chk(cfg1.sw_period   == {shadow[1], shadow[0]},   "port 1 period");
    chk(cfg1.sw_width    == {shadow[3], shadow[2]},   "port 1 width");
    chk(cfg2.sw_period   == {shadow[5], shadow[4]},   "port 2 period");
    chk(cfg2.sw_width    == {shadow[7], shadow[6]},   "port 2 width");
    chk(cfg1.phase_a     == {shadow[9], shadow[8]},   "port 1 phase a");
    chk(cfg1.phase_d     == {shadow[15], shadow[14]}, "port 1 phase d");
    chk(cfg2.phase_b     == {shadow[19], shadow[18]}, "port 2 phase b");
    chk(cfg2.phase_c     == {shadow[21], shadow[20]}, "port 2 phase c");
    chk(samp_delay       == {shadow[25], shadow[24]}, "sampling delay");
    chk(cfg1.data_period == {shadow[57], shadow[56]}, "port 1 data period");
    chk(cfg2.data_period == {shadow[59], shadow[58]}, "port 2 data period");
    mcu.write(8'(A_CONTROL), 16'h0006);
    chk(range_ch1 && range_ch2 && !sw_reset, "range relays");
    mcu.write(8'd100, 16'hBEEF);
    mcu.read(8'd100, d);
    chk(d == 0, "address above 63 reads 0");
    // stream select: port 1 only
    mcu.write(8'(A_CH_TRIG), 16'h4000);
    m1 = rand_meas();
    dvo_clocks = 0;
    fire(1, m1);
    chk(dvo_clocks == 3, $sformatf("stream dvo held %0d clocks", dvo_clocks));
    check_port(1, m1, "port 1 results");
    mcu.read(8'(A_CH_TRIG), d);
    chk(d == 16'h400B, $sformatf("trigger flags %h", d));
    m2 = rand_meas();
    m2.mask.b = 0;
    dvo_clocks = 0;
    fire(2, m2);
    chk(dvo_clocks == 0, "unselected port raises no dvo");
    mcu.read32(8'(A_CH2_VAL), w);
    chk(w == m2.a.sum, "port 2 stored without dvo");
    mcu.read(8'(A_CH_TRIG), d);
    chk(d == 16'h409B, $sformatf("trigger flags with port 2 %h", d));
    // lost measurement while the MCU is busy: locked results, warning, counter
    mcu.stream_busy = 1;
    repeat (5) @(posedge clk);
    m3 = rand_meas();
    fire(1, m3);
    chk(mcu_stream_warn, "stream warning raised");
    check_port(1, m1, "results locked while busy");
    mcu.read(8'(A_LOST_CNT), d);
    chk(d == 1, $sformatf("lost counter %0d", d));
    // always-update mode
    mcu.write(8'(A_ADC_SETUP), 16'h0080);
    fire(1, m3);
    check_port(1, m3, "results updated while busy in always-update mode");
    mcu.read(8'(A_LOST_CNT), d);
    chk(d == 2, $sformatf("lost counter %0d", d));
    mcu.stream_busy = 0;
    repeat (5) @(posedge clk);
    chk(mcu_stream_warn, "warning kept until next retrieval");
    mcu.stream_busy = 1;
    repeat (5) @(posedge clk);
    chk(!mcu_stream_warn, "warning cleared at next retrieval");
    mcu.stream_busy = 0;
    // software reset bit
    mcu.write(8'(A_CONTROL), 16'h0001);
    chk(sw_reset, "software reset bit");
    chk(bus_errors == 0, $sformatf("bus direction errors %0d", bus_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
