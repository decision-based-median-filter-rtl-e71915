// Self-checking testbench for image_ram.
//
// Random writes and reads on a small RAM (DEPTH 37), compared with a copy
// of the contents kept here. Checks that read data appears on the clock
// after the address (one clock of latency) and that a read of the address
// being written in the same clock returns the old contents.
module tb_image_ram;
  import dbmf_pkg::*;

  localparam int DEPTH = 37;
  localparam int AW = $clog2(DEPTH);

  logic          clk = 0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  pixel_t        wdata, rdata;

  int checks = 0, failures = 0;
  pixel_t model[DEPTH];

  image_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    pixel_t exp_rd;
    rs = $urandom | 32'h1;
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    // fill every location
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = pixel_t'(rnd()); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    // random mix; the expected read value is the content before this clock's write
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      raddr  = AW'(rnd() % DEPTH);
      we     = (rnd() % 2 == 1);
      waddr  = (rnd() % 4 == 0) ? raddr : AW'(rnd() % DEPTH);
      wdata  = pixel_t'(rnd());
      exp_rd = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata != exp_rd) begin
        failures++;
        $display("FAIL read %0d: got %h want %h", raddr, rdata, exp_rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
