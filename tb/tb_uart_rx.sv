// Self-checking testbench for uart_rx.
//
// Drives 8N1 frames of random bytes at 10 clocks per bit onto rxd, some
// back to back and some with idle time between, and checks that each byte
// is delivered exactly once with a one-clock valid pulse, within the
// frame's stop bit. Also checks that a frame with a low stop bit raises
// frame_err and delivers nothing, and that a start-bit glitch shorter than
// half a bit delivers nothing.
module tb_uart_rx;
  localparam int CLK_HZ = 1_000_000;
  localparam int BAUD   = 100_000;
  localparam int DIV    = CLK_HZ / BAUD;

  logic       clk = 0;
  logic       rst, rxd, valid, frame_err;
  logic [7:0] data;

  int checks = 0, failures = 0;
  int n_valid = 0, n_ferr = 0;
  logic [7:0] last_data;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    #1;
    if (valid) begin n_valid++; last_data = data; end
    if (frame_err) n_ferr++;
  end

  initial begin
    repeat (40000) @(posedge clk);
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

  task automatic bit_time(input logic v);
    rxd = v;
    repeat (DIV) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b;
    int v0, f0;
    rs = $urandom | 32'h1;
    rst = 1; rxd = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 50; k++) begin
      if (k % 2 == 0) repeat (rnd() % 30) @(negedge clk);
      b = 8'(rnd());
      v0 = n_valid;
      bit_time(0);
      for (int i = 0; i < 8; i++) bit_time(b[i]);
      // the byte must have arrived by the end of the stop bit
      bit_time(1);
      checks++;
      if (n_valid != v0 + 1 || last_data != b) begin
        failures++;
        $display("FAIL byte %h: %0d deliveries, last %h", b, n_valid - v0, last_data);
      end
    end
    // framing error: stop bit low
    v0 = n_valid; f0 = n_ferr;
    bit_time(0);
    for (int i = 0; i < 8; i++) bit_time(1'b1);
    bit_time(0);
    rxd = 1;
    repeat (3 * DIV) @(negedge clk);
    checks++;
    if (n_ferr != f0 + 1 || n_valid != v0) begin
      failures++; $display("FAIL framing error not flagged");
    end
    // glitch shorter than half a bit
    repeat (12 * DIV) @(negedge clk);
    v0 = n_valid; f0 = n_ferr;
    rxd = 0;
    repeat (DIV / 2 - 3) @(negedge clk);
    rxd = 1;
    repeat (12 * DIV) @(negedge clk);
    checks++;
    if (n_valid != v0 || n_ferr != f0) begin
      failures++; $display("FAIL glitch produced output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
