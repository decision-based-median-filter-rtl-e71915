// UART transmitter, 8 data bits, no parity, 1 stop bit (8N1).
//
// A 10-bit shift register {stop, data[7:0], start} is loaded in parallel
// when send is asserted while ready is high, then shifted out LSB first, one
// bit every DIV = CLK_HZ / BAUD clocks (5208 clocks at 50 MHz and 9600 baud,
// a 0.006 % rate error). The line idles high. ready is low from the clock
// after send until the last clock of the stop bit, in which it rises again,
// so one byte takes 10 * DIV clocks and a byte handed over as soon as ready
// rises follows the previous one without a gap.
//
// Interface: send/data are sampled only when ready is high (a send while
// busy is a protocol error, flagged by an assertion). rst is synchronous.
// The shift-register structure and the 9600 8N1 format follow the published design;
// the handshake is this design's choice.
module uart_tx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       send,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(DIV);

  logic [9:0]    shreg;
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  // ready already in the last clock of the stop bit, so that a byte handed
  // over then starts its start bit right after the stop bit
  assign ready = (bits_left == 4'd0) || (bits_left == 4'd1 && cnt == CW'(DIV - 1));
  assign txd   = shreg[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
    end else if (send && ready) begin
      shreg     <= {1'b1, data, 1'b0};
      bits_left <= 4'd10;
      cnt       <= '0;
    end else if (bits_left == 4'd0) begin
      cnt <= '0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt       <= '0;
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 4'd1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  a_no_send_when_busy: assert property (@(posedge clk) disable iff (rst) !(send && !ready))
    else $error("uart_tx: send while busy");

endmodule
