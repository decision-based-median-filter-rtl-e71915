// End-to-end testbench for dbmf_system configured for a 128 x 128 image.
//
// Same host model, test image, reference and checks as tb_dbmf_system (see
// tb_dbmf_system_body.svh): LOAD over the serial line, START, and all
// returned pixels compared with the reference, with per-band PSNR printed
// for noise densities of 10 % to 90 %. The serial link runs at 10 clocks per
// bit to keep the simulation short; bit timing at 9600 baud is covered by
// tb_dbmf_system_full.
module tb_dbmf_system_128;
  import dbmf_pkg::*;

  localparam int CLK_HZ = 1_000_000;
  localparam int BAUD   = 100_000;
  localparam int W      = 128;
  localparam int H      = 128;
  localparam int FRAMES = 1;
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
