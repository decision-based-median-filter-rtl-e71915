// UART receiver, 8 data bits, no parity, 1 stop bit (8N1).
//
// rxd is first passed through a two-flop synchroniser. A falling edge on the
// idle-high line starts a frame; the receiver waits half a bit time
// (DIV/2 clocks, DIV = CLK_HZ / BAUD) and checks that the line is still
// low, so a glitch shorter than that is ignored. It then samples the line
// every DIV clocks, near the centre of each bit, shifting the eight data
// bits in LSB first, and finally samples the stop bit. A byte with a high
// stop bit is presented on data with a one-clock valid pulse; a low stop
// bit (framing error) drops the byte and pulses frame_err instead.
//
// Timing: valid rises about 9.5 bit times after the start edge, plus the
// two synchroniser clocks. rst is synchronous. The 9600 8N1 format and the
// bit-by-bit reassembly follow the published design; centre sampling and the
// framing check are this design's choices.
module uart_rx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(DIV);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e        state;
  logic [1:0]    sync;
  logic          rx;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        IDLE: begin
          cnt <= '0;
          if (!rx) state <= START;
        end
        START: begin
          if (cnt == CW'(DIV / 2 - 1)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= rx ? IDLE : DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == CW'(DIV - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            bitn  <= bitn + 3'd1;
            if (bitn == 3'd7) state <= STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == CW'(DIV - 1)) begin
            cnt   <= '0;
            state <= IDLE;
            if (rx) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
