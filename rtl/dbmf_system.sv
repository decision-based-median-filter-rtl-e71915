// Decision based median filter system: UART-attached impulse noise remover.
//
// A host sends a grayscale image (IMG_W x IMG_H, 8 bits per pixel) over a
// 9600 baud 8N1 serial line into the input image RAM, then a start command.
// The controller scans the image once, one pixel per clock, through the
// 3x3 window generator and the decision based median filter, writing the
// results to the output image RAM, and then streams the filtered image back
// over the serial line.
//
//   uart_rxd -> uart_rx -> dbmf_ctrl -> image_ram (input)
//                                     -> window_gen -> dbmf_filter
//                                     -> image_ram (output) -> uart_tx -> uart_txd
//
// Ports: clk (CLK_HZ), rst (synchronous, active high), the two serial lines
// and busy (high while loading, filtering or sending).
// Timing at the defaults (50 MHz, 9600 baud, 125 x 60): filtering takes
// 62 * 127 = 7874 clocks (about 157 us); each serial byte takes 10 bit times
// (1.04 ms), so loading or returning an image takes about 7.8 s.
// Structure, clock, baud rate and image size follow the published design; the
// command protocol, the output RAM and border handling are this design's.
module dbmf_system
  import dbmf_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600,
  parameter int unsigned IMG_W  = 125,
  parameter int unsigned IMG_H  = 60
) (
  input  logic clk,
  input  logic rst,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic busy
);

  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned AW   = $clog2(NPIX);

  logic          rx_valid, rx_ferr;
  logic [7:0]    rx_data;
  logic          tx_ready, tx_send;
  logic [7:0]    tx_data;
  logic          in_we, out_we;
  logic [AW-1:0] in_waddr, in_raddr, out_waddr, out_raddr;
  pixel_t        in_wdata, in_rdata, out_wdata, out_rdata;
  logic          wg_start, wg_valid, win_valid, f_valid;
  pixel_t        wg_pix, f_med;
  window_t       win;
  filt_case_e    f_case;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data), .frame_err(rx_ferr)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .send(tx_send), .data(tx_data), .ready(tx_ready), .txd(uart_txd)
  );

  dbmf_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ctrl (
    .clk, .rst,
    .rx_valid, .rx_data,
    .tx_ready, .tx_send, .tx_data,
    .in_we, .in_waddr, .in_wdata, .in_raddr, .in_rdata,
    .wg_start, .wg_valid, .wg_pix,
    .f_valid, .f_med,
    .out_we, .out_waddr, .out_wdata, .out_raddr, .out_rdata,
    .busy
  );

  image_ram #(.DEPTH(NPIX)) u_in_ram (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(in_raddr), .rdata(in_rdata)
  );

  window_gen #(.LINE(IMG_W + 2)) u_win (
    .clk, .rst, .start(wg_start), .in_valid(wg_valid), .in_pix(wg_pix),
    .out_valid(win_valid), .out_win(win)
  );

  dbmf_filter u_filt (
    .clk, .rst, .in_valid(win_valid), .window(win),
    .out_valid(f_valid), .med(f_med), .fcase(f_case)
  );

  image_ram #(.DEPTH(NPIX)) u_out_ram (
    .clk, .we(out_we), .waddr(out_waddr), .wdata(out_wdata), .raddr(out_raddr), .rdata(out_rdata)
  );

endmodule
