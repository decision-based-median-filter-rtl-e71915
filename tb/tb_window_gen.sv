// Self-checking testbench for window_gen.
//
// Streams two random frames of LINE x ROWS pixels (with random one-clock
// gaps in in_valid, and a start pulse before each frame) and checks every
// window that comes out against the 3x3 neighbourhood taken from a copy
// of the frame kept here: windows must come out in raster order of their
// centres, one for every pixel not on the frame's outer ring, exactly one
// clock after the pixel that completes them.
module tb_window_gen;
  import dbmf_pkg::*;

  localparam int LINE = 7;
  localparam int ROWS = 5;

  logic    clk = 0;
  logic    rst, start, in_valid;
  pixel_t  in_pix;
  logic    out_valid;
  window_t out_win;

  int checks = 0, failures = 0;

  window_gen #(.LINE(LINE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  pixel_t frame[ROWS][LINE];
  int     exp_cy, exp_cx;     // next expected window centre

  // checker: compare on every clock
  always @(posedge clk) begin
    bit took;
    took = in_valid;   // a pixel was presented in the clock that just ended
    #1;
    if (out_valid) begin
      checks++;
      if (exp_cy > ROWS - 2) begin
        failures++; $display("FAIL extra window");
      end else begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            if (out_win[r*3+c] != frame[exp_cy-1+r][exp_cx-1+c]) begin
              failures++;
              $display("FAIL window (%0d,%0d) tap %0d: %h vs %h", exp_cy, exp_cx, r*3+c,
                       out_win[r*3+c], frame[exp_cy-1+r][exp_cx-1+c]);
            end
        if (!took) begin
          failures++; $display("FAIL window not in the clock after its pixel");
        end
        if (exp_cx == LINE - 2) begin exp_cx = 1; exp_cy++; end
        else exp_cx++;
      end
    end
  end

  initial begin
    rs = $urandom | 32'h1;
    rst = 1; start = 0; in_valid = 0; in_pix = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < LINE; x++) frame[y][x] = pixel_t'(rnd());
      exp_cy = 1; exp_cx = 1;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < LINE; x++) begin
          while (rnd() % 4 == 0) begin
            in_valid = 0;
            @(negedge clk);
          end
          in_valid = 1;
          in_pix   = frame[y][x];
          @(negedge clk);
          in_valid = 0;
        end
      repeat (4) @(negedge clk);
      checks++;
      if (exp_cy != ROWS - 1 || exp_cx != 1) begin
        failures++; $display("FAIL frame %0d ended at centre (%0d,%0d)", f, exp_cy, exp_cx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
