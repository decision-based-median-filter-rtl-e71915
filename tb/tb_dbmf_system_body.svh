// Body shared by the system testbenches (included inside the module, after
// the localparams CLK_HZ, BAUD, W, H, FRAMES, DIV, N, PRELOAD and the DUT
// instance). With PRELOAD set, the noisy image is written straight into the
// input RAM array, as an FPGA configuration would preload the block RAM,
// instead of being sent with the LOAD command. Each including testbench
// adds its own watchdog.

  int checks = 0, failures = 0;

  localparam int SCAN_CLOCKS = (W + 2) * (H + 2);   // padded frame, one pixel per clock

  // clock period 10 time units; waits below are written as delays rather
  // than clock counts so that the testbench does not wake up every clock
  localparam int T = 10;
  always #(T / 2) clk = ~clk;


  logic [31:0] rs;
  function automatic logic [31:0] rnd();
    rs ^= rs << 13;
    rs ^= rs >> 17;
    rs ^= rs << 5;
    return rs;
  endfunction

  // mechanisms seen
  typedef enum int {M_IGNORED, M_LOAD, M_START, M_CLEAN, M_UNIFORM, M_MEAN, M_NEAREST,
                    M_MEDIAN, M_BORDER, M_B2B_TX, M_NUM} mech_e;
  int unsigned mech[M_NUM];

  // ---- reference filter ----
  function automatic pixel_t ref_window(input pixel_t w[9], output int dec);
    pixel_t lst[9];
    pixel_t t;
    int n = 0, sum = 0;
    bit same = 1;
    for (int i = 0; i < 9; i++) begin
      sum += int'(w[i]);
      if (w[i] != w[4]) same = 0;
      if (w[i] != 0 && w[i] != 255) begin lst[n] = w[i]; n++; end
    end
    if (w[4] != 0 && w[4] != 255) begin dec = 0; return w[4]; end
    if (same)                     begin dec = 1; return w[4]; end
    if (n == 0)                   begin dec = 2; return pixel_t'(sum / 9); end
    if (9 - n > 4)                begin dec = 3; return lst[0]; end
    for (int a = 0; a < n; a++)
      for (int b = 0; b + 1 < n - a; b++)
        if (lst[b] > lst[b+1]) begin t = lst[b]; lst[b] = lst[b+1]; lst[b+1] = t; end
    dec = 4;
    return lst[n/2];
  endfunction

  pixel_t clean[H][W], noisy[H][W], expect_img[H][W];

  function automatic int clampi(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  task automatic make_frame(input int f);
    int band;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        clean[y][x] = pixel_t'(16 + ((x + y + 8 * f) % 224));
        band = (y * 9) / H;                      // 0..8 -> 10 % .. 90 %
        if (int'(rnd() % 100) < (band + 1) * 10)
          noisy[y][x] = (rnd() % 2 == 1) ? PIX_MAX : PIX_MIN;
        else
          noisy[y][x] = clean[y][x];
      end
    // solid blocks: image content that happens to be 0 or 255
    for (int y = 1; y < 4; y++)
      for (int x = 1; x < 4; x++) begin
        noisy[y][x] = PIX_MIN;
        noisy[y][x + 5] = PIX_MAX;
        clean[y][x] = PIX_MIN;
        clean[y][x + 5] = PIX_MAX;
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        pixel_t w[9];
        int dec;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            w[r*3+c] = noisy[clampi(y + r - 1, H - 1)][clampi(x + c - 1, W - 1)];
        expect_img[y][x] = ref_window(w, dec);
        mech[M_CLEAN + dec]++;
        if (y == 0 || x == 0 || y == H - 1 || x == W - 1) mech[M_BORDER]++;
      end
  endtask

  // ---- host side of the serial line ----
  task automatic host_send(input logic [7:0] b);
    uart_rxd = 0;
    #(DIV * T);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      #(DIV * T);
    end
    uart_rxd = 1;
    #(DIV * T);
  endtask

  logic [7:0] rx_q[$];
  longint     last_start_bit = -1, first_start_bit = -1;
  function automatic longint cyc();
    return longint'($time) / longint'(T);
  endfunction

  // host receiver: samples in the middle of each bit
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      if (first_start_bit < 0) first_start_bit = cyc();
      // back to back: this start bit begins right after the previous stop bit
      if (last_start_bit >= 0 && cyc() - last_start_bit == longint'(10 * DIV)) mech[M_B2B_TX]++;
      last_start_bit = cyc();
      #((DIV / 2) * T);
      checks++;
      if (uart_txd != 1'b0) begin failures++; $display("FAIL false start bit"); end
      for (int i = 0; i < 8; i++) begin
        #(DIV * T);
        b[i] = uart_txd;
      end
      #(DIV * T);
      checks++;
      if (uart_txd != 1'b1) begin failures++; $display("FAIL stop bit"); end
      rx_q.push_back(b);
    end
  end

  initial begin
    longint t_start_end;
    rs = 32'h1234_5678 ^ $urandom;
    rs = rs | 32'h1;
    rst = 1; uart_rxd = 1;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);

    host_send(8'h3F);                 // not a command
    #(4 * DIV * T);
    checks++;
    if (busy) begin failures++; $display("FAIL non-command byte made the system busy"); end
    else mech[M_IGNORED]++;

    for (int f = 0; f < FRAMES; f++) begin
      real mse_band[9];
      int  n_band[9];
      make_frame(f);
      if (PRELOAD) begin
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) dut.u_in_ram.mem[y * W + x] = noisy[y][x];
        mech[M_LOAD]++;
      end else begin
        host_send(CMD_LOAD);
        checks++;
        if (!busy) begin failures++; $display("FAIL not busy while loading"); end
        else mech[M_LOAD]++;
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) host_send(noisy[y][x]);
        #(2 * DIV * T);
        checks++;
        if (busy) begin failures++; $display("FAIL busy after loading"); end
      end

      rx_q.delete();
      first_start_bit = -1;
      last_start_bit = -1;
      host_send(CMD_START);
      // the command byte is taken in the middle of its stop bit
      t_start_end = cyc() - longint'(DIV) / 2;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy after start"); end
      else mech[M_START]++;
      while (rx_q.size() < N) #(DIV * T);
      #(2 * DIV * T);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after sending the image"); end

      // one pixel per clock: the scan of the padded frame plus a few clocks
      checks++;
      if (first_start_bit - t_start_end < longint'(SCAN_CLOCKS) ||
          first_start_bit - t_start_end > longint'(SCAN_CLOCKS) + 12) begin
        failures++;
        $display("FAIL filtering took %0d clocks, want %0d + a few",
                 first_start_bit - t_start_end, (W + 2) * (H + 2));
      end else
        $display("frame %0d: %0d clocks from start command to first reply bit ((W+2)*(H+2) = %0d)",
                 f, first_start_bit - t_start_end, (W + 2) * (H + 2));

      foreach (mse_band[i]) begin mse_band[i] = 0.0; n_band[i] = 0; end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          pixel_t got;
          int band;
          got  = rx_q[y * W + x];
          band = (y * 9) / H;
          checks++;
          if (got != expect_img[y][x]) begin
            failures++;
            if (failures < 20)
              $display("FAIL pixel (%0d,%0d): got %h want %h", y, x, got, expect_img[y][x]);
          end
          mse_band[band] += real'((int'(got) - int'(clean[y][x])) ** 2);
          n_band[band]++;
        end
      for (int i = 0; i < 9; i++)
        if (n_band[i] > 0) begin
          real mse;
          mse = mse_band[i] / n_band[i];
          if (mse > 0.0)
            $display("frame %0d: noise %0d %%: PSNR %0.2f dB", f, (i + 1) * 10,
                     10.0 * $log10(255.0 * 255.0 / mse));
          else
            $display("frame %0d: noise %0d %%: exact", f, (i + 1) * 10);
        end
    end

    for (int m = 0; m < M_NUM; m++) begin
      mech_e me;
      me = mech_e'(m);
      checks++;
      $display("mechanism %s: %0d", me.name(), mech[m]);
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", me.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
