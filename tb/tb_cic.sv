// tb_cic -- one-stage CIC decimator against a block-sum reference.
//
// Random 16-bit samples arrive with random gaps; decimate requests come at
// random times, sometimes in the same clock as a sample. The reference keeps
// the running sum and count of the current block: a block is closed by the
// first sample that arrives after a request, and that sample opens the
// next block. Each dvo must match the oldest expected block in sum (modulo
// 2**32) and count. Full-scale blocks of 65536 samples are run once to
// show the 32-bit word holds them.
module tb_cic;
  logic clk = 0, rst, en, dec, dvo;
  logic signed [15:0] x_in;
  logic signed [31:0] y_out;
  logic [15:0]        count_out;
  int checks = 0, failures = 0;

  cic dut (.clk(clk), .rst(rst), .en(en), .dec(dec), .x_in(x_in),
           .y_out(y_out), .count_out(count_out), .dvo(dvo));

  always #25 clk = ~clk;

  // reference
  longint      ref_sum;
  int unsigned ref_cnt;
  bit          ref_pend;
  longint      exp_sum[$];
  int unsigned exp_cnt[$];
  int          n_blocks = 0;

  task automatic drive(input bit s, input bit d, input logic signed [15:0] x);
    en = s; dec = d; x_in = x;
    @(posedge clk);
    if (d) ref_pend = 1;
    if (s) begin
      if (ref_pend && ref_cnt != 0) begin
        exp_sum.push_back(ref_sum);
        exp_cnt.push_back(ref_cnt);
        ref_sum = 0;
        ref_cnt = 0;
        ref_pend = 0;
      end else if (ref_cnt == 0) begin
        ref_pend = 0;
      end
      ref_sum += longint'(x);
      ref_cnt++;
    end
    #1;
    en = 0; dec = 0;
  endtask

  // compare outputs
  always @(posedge clk) begin
    if (!rst && dvo) begin
      checks++;
      n_blocks++;
      if (exp_sum.size() == 0) begin
        failures++;
        $display("FAIL unexpected dvo");
      end else begin
        longint s;
        int unsigned c;
        s = exp_sum.pop_front();
        c = exp_cnt.pop_front();
        if (y_out !== 32'(s) || count_out !== 16'(c)) begin
          failures++;
          $display("FAIL block: y=%0d count=%0d expected %0d / %0d", y_out, count_out, 32'(s), 16'(c));
        end
      end
    end
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_sum = 0; ref_cnt = 0; ref_pend = 0;
    rst = 1; en = 0; dec = 0; x_in = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // a decimate request before any sample has nothing to close
    drive(0, 1, 0);
    // random traffic
    for (int i = 0; i < 20000; i++) begin
      bit s, d;
      s = ($urandom_range(0, 2) != 0);
      d = ($urandom_range(0, 60) == 0);
      drive(s, d, 16'($urandom));
    end
    // full-scale blocks: 65536 samples of -32768, then of +32767
    drive(0, 1, 0);
    for (int i = 0; i < 65536; i++) drive(1, 0, -16'sd32768);
    drive(1, 1, 16'sd32767);   // closes the previous block together with a request
    for (int i = 1; i < 65536; i++) drive(1, 0, 16'sd32767);
    drive(0, 1, 0);
    drive(1, 0, 16'sd5);
    repeat (3) @(posedge clk);
    checks++;
    if (exp_sum.size() != 0 || n_blocks < 100) begin
      failures++;
      $display("FAIL %0d blocks left unreported, %0d seen", exp_sum.size(), n_blocks);
    end
    $display("blocks checked: %0d", n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
