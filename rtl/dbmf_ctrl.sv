// System controller: host command decoding, image scan and send-back.
//
// The host talks to the system over the UART with two command bytes
// (dbmf_pkg::CMD_LOAD and CMD_START); any other byte received while idle
// is ignored.
//   LOAD  ('L'): the next IMG_W*IMG_H received bytes are the noisy image in
//                raster order; they are written to the input RAM.
//   START ('S'): the image in the input RAM is filtered into the output RAM
//                and then sent back, IMG_W*IMG_H bytes in raster order.
// Filtering scans the image padded by one pixel on every side, the padding
// replicating the nearest border pixel: padded coordinate (py, px), with
// py in 0..IMG_H+1 and px in 0..IMG_W+1, reads image pixel
// (clamp(py-1), clamp(px-1)). One read is issued per clock, so the scan
// takes (IMG_H+2)*(IMG_W+2) clocks; the RAM's one-clock read latency is
// matched by delaying the read strobe into the window generator. Every
// filter result is written to the output RAM at the next sequential
// address (results arriving outside a scan are not written). When all IMG_W*IMG_H results are written, the controller reads
// the output RAM one byte at a time and hands each byte to the UART
// transmitter as soon as it is ready.
//
// busy is high in every state but IDLE. rst is synchronous.
// The published design has the host send a start signal over the UART, the image
// held in RAM, filtered and sent back; the command codes, the border
// replication and the sequencing are this design's choices.
module dbmf_ctrl
  import dbmf_pkg::*;
#(
  parameter int unsigned IMG_W = 125,
  parameter int unsigned IMG_H = 60,
  localparam int unsigned NPIX = IMG_W * IMG_H,
  localparam int unsigned AW   = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst,
  // UART receiver
  input  logic          rx_valid,
  input  logic [7:0]    rx_data,
  // UART transmitter
  input  logic          tx_ready,
  output logic          tx_send,
  output logic [7:0]    tx_data,
  // input image RAM
  output logic          in_we,
  output logic [AW-1:0] in_waddr,
  output pixel_t        in_wdata,
  output logic [AW-1:0] in_raddr,
  input  pixel_t        in_rdata,
  // window generator
  output logic          wg_start,
  output logic          wg_valid,
  output pixel_t        wg_pix,
  // filter result
  input  logic          f_valid,
  input  pixel_t        f_med,
  // output image RAM
  output logic          out_we,
  output logic [AW-1:0] out_waddr,
  output pixel_t        out_wdata,
  output logic [AW-1:0] out_raddr,
  input  pixel_t        out_rdata,
  output logic          busy
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SCAN, S_DRAIN, S_SEND_RD, S_SEND_TX} state_e;

  localparam int unsigned PXW = $clog2(IMG_W + 2);
  localparam int unsigned PYW = $clog2(IMG_H + 2);

  state_e         state;
  logic [AW-1:0]  cnt;        // load / send byte counter
  logic [PXW-1:0] px;
  logic [PYW-1:0] py;
  logic [AW-1:0]  row_base;   // clamp(py-1) * IMG_W
  logic [AW-1:0]  col;        // clamp(px-1)
  logic           rd_pend;    // a scan read was issued last clock
  logic [AW-1:0]  wr_cnt;     // filter results written

  // ---- scan address ----
  always_comb begin
    if (px == '0)                     col = '0;
    else if (px == PXW'(IMG_W + 1))   col = AW'(IMG_W - 1);
    else                              col = AW'(px) - AW'(1);
  end

  // ---- RAM and UART outputs ----
  assign in_we     = (state == S_LOAD) && rx_valid;
  assign in_waddr  = cnt;
  assign in_wdata  = rx_data;
  assign in_raddr  = row_base + col;

  assign wg_start  = (state == S_IDLE);
  assign wg_valid  = rd_pend;
  assign wg_pix    = in_rdata;

  assign out_we    = f_valid && (state == S_SCAN || state == S_DRAIN);
  assign out_waddr = wr_cnt;
  assign out_wdata = f_med;
  assign out_raddr = cnt;

  assign tx_send   = (state == S_SEND_TX) && tx_ready;
  assign tx_data   = out_rdata;

  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cnt      <= '0;
      px       <= '0;
      py       <= '0;
      row_base <= '0;
      rd_pend  <= 1'b0;
      wr_cnt   <= '0;
    end else begin
      rd_pend <= (state == S_SCAN);
      if (out_we) wr_cnt <= wr_cnt + 1'b1;

      unique case (state)
        S_IDLE: begin
          cnt      <= '0;
          px       <= '0;
          py       <= '0;
          row_base <= '0;
          wr_cnt   <= '0;
          if (rx_valid && rx_data == CMD_LOAD)  state <= S_LOAD;
          if (rx_valid && rx_data == CMD_START) state <= S_SCAN;
        end
        S_LOAD: begin
          if (rx_valid) begin
            if (cnt == AW'(NPIX - 1)) begin
              cnt   <= '0;
              state <= S_IDLE;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        S_SCAN: begin
          if (px == PXW'(IMG_W + 1)) begin
            px <= '0;
            py <= py + 1'b1;
            // rows 1..IMG_H of the padded frame map to image rows 0..IMG_H-1
            if (py != '0 && py < PYW'(IMG_H)) row_base <= row_base + AW'(IMG_W);
            if (py == PYW'(IMG_H + 1)) state <= S_DRAIN;
          end else begin
            px <= px + 1'b1;
          end
        end
        S_DRAIN: begin
          if (f_valid && wr_cnt == AW'(NPIX - 1)) begin
            cnt   <= '0;
            state <= S_SEND_RD;
          end
        end
        S_SEND_RD: begin
          // out_raddr = cnt was presented this clock; data is valid next clock
          state <= S_SEND_TX;
        end
        S_SEND_TX: begin
          if (tx_ready) begin
            if (cnt == AW'(NPIX - 1)) begin
              state <= S_IDLE;
            end else begin
              cnt   <= cnt + 1'b1;
              state <= S_SEND_RD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
