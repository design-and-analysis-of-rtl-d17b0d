// Bit-clock generator for the transmitter (TxC) and receiver (RxC).
//
// A down counter is reloaded with div and gives a one-cycle tick each time
// it reaches zero, so tick is high once every div+1 system clocks. The
// divisor is a 16-bit input whose reset value in the top level is 15, the
// value shown for baud_rate_div in the simulation of the self-testing UART.
// Using a clock enable instead of a separate TxC/RxC clock is this design's
// choice; everything in the UART runs on one clock.
module baud_gen #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [DIV_W-1:0] div,   // tick period minus one
  output logic             tick
);

  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= div;
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= div;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
