// mcu_bus_model -- the microcontroller's side of the FPGA parallel bus
// (testbench only, not synthesizable).
//
// Provides write() and read() tasks that run the four-signal handshake the
// way the MCU firmware does, with its own (unrelated) timing: set up
// direction and address, raise the request, wait for the acknowledge, drop
// the request, wait for the acknowledge to drop. read() takes the data
// only after the acknowledge and flags an error if the FPGA was not
// driving the bus then; write() flags one if the FPGA drives the bus while
// the MCU does. errors counts protocol errors, T_STEP is the MCU's delay
// between its own actions.
module mcu_bus_model #(
  parameter realtime T_STEP = 130ns
) (
  output logic [7:0]  addr,
  output logic [15:0] data_to_fpga,
  input  logic [15:0] data_from_fpga,
  input  logic        fpga_drives,
  output logic        oe,
  output logic        req_miso,
  input  logic        req_miso_ack,
  output logic        req_mosi,
  input  logic        req_mosi_ack,
  output logic        stream_busy,
  output int          errors
);

  initial begin
    addr = '0; data_to_fpga = '0; oe = 1'b0;
    req_miso = 1'b0; req_mosi = 1'b0; stream_busy = 1'b0; errors = 0;
  end

  task automatic write(input logic [7:0] a, input logic [15:0] d);
    wait (!req_mosi_ack);
    oe = 1'b1;
    #(T_STEP);
    addr = a;
    data_to_fpga = d;
    #(T_STEP);
    if (fpga_drives) errors++;
    req_mosi = 1'b1;
    wait (req_mosi_ack);
    #(T_STEP);
    req_mosi = 1'b0;
    wait (!req_mosi_ack);
  endtask

  task automatic read(input logic [7:0] a, output logic [15:0] d);
    wait (!req_miso_ack);
    addr = a;
    oe = 1'b0;
    #(T_STEP);
    req_miso = 1'b1;
    wait (req_miso_ack);
    #(T_STEP);
    if (!fpga_drives) errors++;
    d = data_from_fpga;
    req_miso = 1'b0;
    wait (!req_miso_ack);
  endtask

  task automatic write32(input logic [7:0] a, input logic [31:0] d);
    write(a, d[15:0]);
    write(a + 8'd1, d[31:16]);
  endtask

  task automatic read32(input logic [7:0] a, output logic [31:0] d);
    logic [15:0] lo, hi;
    read(a, lo);
    read(a + 8'd1, hi);
    d = {hi, lo};
  endtask

endmodule
