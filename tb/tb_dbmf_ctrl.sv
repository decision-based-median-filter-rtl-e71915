// Self-checking testbench for dbmf_ctrl.
//
// The controller is surrounded by models written here: two one-clock-latency
// RAM arrays, a UART receiver side that hands over bytes as single-clock
// rx_valid pulses, a UART transmitter side whose ready drops for a few
// clocks after every byte, and a stand-in for window generator plus filter
// that follows the padded scan and returns the centre pixel of every
// complete window one clock later (an identity filter).
// Checks, on a 5 x 4 image:
//   - a byte other than a command is ignored (busy stays low);
//   - LOAD writes the following bytes to input RAM addresses 0..N-1;
//   - START reads the input RAM in padded, border-replicated raster order,
//     one address per clock, (W+2)*(H+2) reads in a row, with wg_valid and
//     wg_pix one clock behind the address;
//   - filter results are written to output RAM addresses 0..N-1;
//   - the output image is handed to the transmitter in order, one byte per
//     ready, and busy drops after the last byte.
module tb_dbmf_ctrl;
  import dbmf_pkg::*;

  localparam int W = 5, H = 4, N = W * H;
  localparam int AW = $clog2(N);

  logic          clk = 0, rst;
  logic          rx_valid;
  logic [7:0]    rx_data;
  logic          tx_ready, tx_send;
  logic [7:0]    tx_data;
  logic          in_we, out_we;
  logic [AW-1:0] in_waddr, in_raddr, out_waddr, out_raddr;
  pixel_t        in_wdata, in_rdata, out_wdata, out_rdata;
  logic          wg_start, wg_valid, f_valid;
  pixel_t        wg_pix, f_med;
  logic          busy;

  int checks = 0, failures = 0;

  dbmf_ctrl #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rs;
  function automatic logic [31:0] rnd();
    rs ^= rs << 13;
    rs ^= rs >> 17;
    rs ^= rs << 5;
    return rs;
  endfunction

  // ---- RAM models ----
  pixel_t in_mem[N], out_mem[N];
  always @(posedge clk) begin
    if (in_we)  in_mem[in_waddr]   <= in_wdata;
    if (out_we) out_mem[out_waddr] <= out_wdata;
    in_rdata  <= in_mem[in_raddr];
    out_rdata <= out_mem[out_raddr];
  end

  // ---- scan checker and identity filter ----
  pixel_t img[H][W];
  int     pix_idx;          // wg_valid pixels seen
  int     exp_out_addr;
  int     scan_first, scan_last, cyc = 0;

  function automatic int clampi(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  logic [AW-1:0] raddr_prev;
  always @(posedge clk) begin
    int py, px, a;
    cyc++;
    raddr_prev <= in_raddr;
    f_valid <= 1'b0;
    if (wg_valid) begin
      // the read behind this pixel was presented in the previous clock
      py = pix_idx / (W + 2);
      px = pix_idx % (W + 2);
      a  = clampi(py - 1, H - 1) * W + clampi(px - 1, W - 1);
      checks++;
      if (int'(raddr_prev) != a || wg_pix != in_mem[a]) begin
        failures++;
        $display("FAIL scan pixel %0d: address %0d data %h, want %0d %h",
                 pix_idx, raddr_prev, wg_pix, a, in_mem[a]);
      end
      if (pix_idx == 0) scan_first = cyc;
      scan_last = cyc;
      if (py >= 2 && px >= 2) begin
        f_valid <= 1'b1;
        f_med   <= img[py - 2][px - 2];
      end
      pix_idx++;
    end
    if (out_we && !rst) begin
      checks++;
      if (int'(out_waddr) != exp_out_addr) begin
        failures++; $display("FAIL output write at %0d, want %0d", out_waddr, exp_out_addr);
      end
      exp_out_addr++;
    end
  end

  // ---- transmitter model ----
  int tx_hold = 0;
  logic [7:0] sent[$];
  always @(posedge clk) begin
    if (tx_send) begin
      if (!tx_ready) begin failures++; $display("FAIL send while not ready"); end
      sent.push_back(tx_data);
      tx_hold = 2 + rnd() % 6;
    end else if (tx_hold > 0) tx_hold--;
  end
  assign tx_ready = (tx_hold == 0);

  task automatic rx_byte(input logic [7:0] b);
    repeat (1 + rnd() % 4) @(negedge clk);
    rx_valid = 1; rx_data = b;
    @(negedge clk);
    rx_valid = 0; rx_data = 8'(rnd());
  endtask

  initial begin
    rs = $urandom | 32'h1;
    rst = 1; rx_valid = 0; rx_data = '0; f_med = '0; f_valid = 0;
    pix_idx = 0; exp_out_addr = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = pixel_t'(rnd());

    rx_byte(8'h41);   // not a command
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL non-command byte started something"); end

    rx_byte(CMD_LOAD);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) rx_byte(img[y][x]);
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy after load"); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (in_mem[i] != img[i / W][i % W]) begin failures++; $display("FAIL load addr %0d", i); end
    end

    rx_byte(CMD_START);
    while (sent.size() < N) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after sending"); end
    checks++;
    if (pix_idx != (W + 2) * (H + 2) || scan_last - scan_first + 1 != pix_idx) begin
      failures++;
      $display("FAIL scan: %0d reads over %0d clocks", pix_idx, scan_last - scan_first + 1);
    end
    checks++;
    if (exp_out_addr != N || sent.size() != N) begin
      failures++; $display("FAIL %0d results written, %0d bytes sent", exp_out_addr, sent.size());
    end
    for (int i = 0; i < N && i < sent.size(); i++) begin
      checks++;
      if (sent[i] != img[i / W][i % W]) begin
        failures++; $display("FAIL byte %0d sent %h want %h", i, sent[i], img[i / W][i % W]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
