// Self-checking testbench for uart_tx.
//
// Sends random bytes, some back to back and some after idle gaps, at a
// divider of 10 clocks per bit. A receiver written here samples the line
// in the middle of every bit and checks the start bit, the eight data bits
// (LSB first) and the stop bit. It also checks the frame timing: the start
// bit begins on the clock edge that takes the byte, each bit lasts exactly
// DIV clocks, and ready is low for exactly 10*DIV-1 clocks (it rises in the last clock of
// the stop bit, so the next byte follows without a gap).
module tb_uart_tx;
  localparam int CLK_HZ = 1_000_000;
  localparam int BAUD   = 100_000;
  localparam int DIV    = CLK_HZ / BAUD;

  logic       clk = 0;
  logic       rst, send, ready, txd;
  logic [7:0] data;

  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    logic [7:0] b, got;
    int busy_clocks;
    rs = $urandom | 32'h1;
    rst = 1; send = 0; data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (!ready || !txd) begin failures++; $display("FAIL idle state"); end
    for (int k = 0; k < 60; k++) begin
      if (k % 3 == 0) repeat (rnd() % 25) @(negedge clk);
      while (!ready) @(negedge clk);
      b = 8'(rnd());
      send = 1; data = b;
      @(posedge clk);      // byte taken here; start bit starts now
      @(negedge clk);
      send = 0; data = 8'(rnd());
      busy_clocks = 0;   // counts the clocks in which ready is low
      // middle of start bit: DIV/2 clocks in
      repeat (DIV/2 - 1) begin @(negedge clk); busy_clocks++; end
      checks++;
      if (txd !== 1'b0 || ready) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) begin @(negedge clk); busy_clocks++; end
        got[i] = txd;
      end
      repeat (DIV) begin @(negedge clk); busy_clocks++; end
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++;
      if (got != b) begin failures++; $display("FAIL byte %h sent as %h", b, got); end
      while (!ready) begin @(negedge clk); busy_clocks++; end
      checks++;
      if (busy_clocks != 10 * DIV - 1) begin
        failures++;
        $display("FAIL ready low for %0d clocks, want %0d", busy_clocks, 10 * DIV - 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
