// Full-size end-to-end testbench for dbmf_system, every parameter at its
// default: 50 MHz clock, 9600 baud, 125 x 60 image.
//
// Same host model, test image, reference and checks as tb_dbmf_system (see
// tb_dbmf_system_body.svh), for one frame. The noisy image is preloaded
// into the input RAM, as an FPGA configuration would do; the host then
// sends the START command and receives the 7500 filtered bytes, which are
// compared pixel by pixel. (The LOAD path is exercised by the other system
// testbenches.) At 5208 clocks per bit the reply alone is about 390 million
// clocks of simulated time (7.8 s of real time).
module tb_dbmf_system_full;
  import dbmf_pkg::*;

  localparam int CLK_HZ = 50_000_000;
  localparam int BAUD   = 9600;
  localparam int W      = 125;
  localparam int H      = 60;
  localparam int FRAMES = 1;
  localparam bit PRELOAD = 1'b1;
  localparam int DIV    = CLK_HZ / BAUD;
  localparam int N      = W * H;

  logic clk = 0, rst, uart_rxd, uart_txd, busy;

  dbmf_system dut (.*);

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
