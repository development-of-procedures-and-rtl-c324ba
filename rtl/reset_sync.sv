// reset_sync -- reset synchroniser of the FET measurement FPGA.
//
// Two reset sources are combined: the board's reset push-button (a
// normally-closed switch, so its pin is active low) and the software reset
// bit the MCU writes into the register file. Their OR asynchronously sets a
// chain of two flip-flops; the chain releases one clock cycle after the
// other, so the rest of the design leaves reset on a clock edge and never
// sees a release close to one. Assertion is immediate, release takes two
// rising clock edges after both sources are inactive.
//
// The two flip-flop structure follows the published design, which takes
// the output from the second flip-flop alone; ORing the request into the
// output is a choice of this design, as is the polarity of in_async
// (low = reset), read from the "normally closed, therefore inverted" remark.
module reset_sync (
  input  logic clk,
  input  logic in_async,   // push-button reset, active low
  input  logic sw_reset,   // software reset from the register file, active high
  output logic out_sync    // synchronised reset, active high
);

  logic rst_req;
  logic meta_reg;
  logic sync_reg;

  assign rst_req = ~in_async | sw_reset;

  always_ff @(posedge clk or posedge rst_req) begin
    if (rst_req) begin
      meta_reg <= 1'b1;
      sync_reg <= 1'b1;
    end else begin
      meta_reg <= 1'b0;
      sync_reg <= meta_reg;
    end
  end

  // the raw request is ORed in so that reset is asserted at once, even
  // before the first clock edge after power-up; release stays synchronous
  assign out_sync = sync_reg | rst_req;

endmodule
