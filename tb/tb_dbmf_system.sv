// End-to-end testbench for dbmf_system.
//
// Plays the host over the serial line: sends a byte that is not a command,
// then LOAD and a noisy test image, then START, and collects the filtered
// image the system sends back, which is compared pixel by pixel with a
// reference computed here (border-replicated 3x3 windows, decision rules
// applied to a sorted list of the information pixels). Two frames are run
// to show that the system returns to idle and can be used again.
//
// The test image is a smooth diagonal ramp in 16..239, cut into horizontal bands
// whose salt-and-pepper density rises from 10 % to 90 %, with a block of
// solid 0 and a block of solid 255 so that every decision of the filter
// occurs. The testbench counts how often each mechanism happened (command
// ignored, load, start, the five filter decisions, windows that use
// replicated border pixels, back-to-back transmitted bytes) and counts a
// failure for any that never did. It also checks that filtering the whole
// image takes (W+2)*(H+2) clocks plus a small constant, i.e. one pixel per
// clock, and prints the PSNR of each band against the clean image.
module tb_dbmf_system;
  import dbmf_pkg::*;

  localparam int CLK_HZ = 1_000_000;
  localparam int BAUD   = 100_000;
  localparam int W      = 11;
  localparam int H      = 18;
  localparam int FRAMES = 2;
  localparam bit PRELOAD = 1'b0;
  localparam int DIV    = CLK_HZ / BAUD;
  localparam int N      = W * H;

  logic clk = 0, rst, uart_rxd, uart_txd, busy;

  dbmf_system #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .IMG_W(W), .IMG_H(H)) dut (.*);

  `include "tb_dbmf_system_body.svh"

  // watchdog: the serial images and commands of every frame, with margin
  localparam longint WATCHDOG = longint'(FRAMES) * ((PRELOAD ? 1 : 2) * N + 8) * 10 * DIV * 11 / 10
                               + 100_000;
  initial begin
    #(WATCHDOG * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
