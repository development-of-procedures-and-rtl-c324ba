// ad7656_model -- behavioural model of the AD7656 6-channel ADC (testbench only).
//
// Not synthesizable. On the rising edge of any CONVST bit the six analog
// inputs (given as 16-bit codes on ain) are sampled and BUSY goes high after
// T_BUSY_ON; it falls T_CONV later. In parallel word mode each falling RD
// edge while CS is low puts the next channel (1..6) on the data bus after
// T_ACCESS. A new CONVST restarts the read sequence. RESET clears it.
// conversions counts rising CONVST edges.
module ad7656_model #(
  parameter realtime T_BUSY_ON = 20ns,
  parameter realtime T_CONV    = 3000ns,
  parameter realtime T_ACCESS  = 20ns
) (
  input  logic [5:0][15:0] ain,
  input  logic [2:0]       convst,
  input  logic             cs_n,
  input  logic             rd_n,
  input  logic             reset,
  output logic             busy,
  output logic [15:0]      data,
  output int               conversions
);

  logic [5:0][15:0] held;
  int unsigned      ptr;
  logic             any_convst;

  assign any_convst = |convst;

  initial begin
    busy        = 1'b0;
    data        = '0;
    held        = '0;
    ptr         = 0;
    conversions = 0;
  end

  always @(posedge any_convst) begin
    if (!reset) begin
      held = ain;
      ptr  = 0;
      conversions++;
      #(T_BUSY_ON) busy = 1'b1;
      #(T_CONV)    busy = 1'b0;
    end
  end

  always @(negedge rd_n) begin
    if (!cs_n && ptr < 6) begin
      #(T_ACCESS) data = held[ptr];
      ptr++;
    end
  end

  always @(posedge reset) ptr = 0;

endmodule
