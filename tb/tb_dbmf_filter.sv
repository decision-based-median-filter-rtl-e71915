// Self-checking testbench for dbmf_filter.
//
// Applies the five worked example windows (a lone noisy centre, an all-0
// window, an all-255 window, a window more than half corrupted and an
// all-0/255 window) and then random windows of every noise density, one
// window per clock. Each result is compared one clock later with a
// reference computed here from the decision rules directly: the
// information pixels are gathered into a list, bubble sorted, and the
// median, mean or first information pixel taken from that list. Also checks
// the reset value (0) and the one-clock latency, and that every decision
// was exercised.
module tb_dbmf_filter;
  import dbmf_pkg::*;

  logic       clk = 0;
  logic       rst;
  logic       in_valid;
  window_t    window;
  logic       out_valid;
  pixel_t     med;
  filt_case_e fcase;

  int checks = 0, failures = 0;
  int case_hits[5];

  dbmf_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_model(input window_t w, output pixel_t exp_med, output int exp_case);
    pixel_t lst[9];
    pixel_t t;
    int n = 0, sum = 0;
    bit same = 1;
    for (int i = 0; i < 9; i++) begin
      sum += int'(w[i]);
      if (w[i] != w[4]) same = 0;
      if (w[i] != 0 && w[i] != 255) begin lst[n] = w[i]; n++; end
    end
    if (w[4] != 0 && w[4] != 255) begin exp_med = w[4]; exp_case = 0; end
    else if (same)                begin exp_med = w[4]; exp_case = 1; end
    else if (n == 0)              begin exp_med = pixel_t'(sum / 9); exp_case = 2; end
    else if (9 - n > 4)           begin exp_med = lst[0]; exp_case = 3; end
    else begin
      for (int a = 0; a < n; a++)
        for (int b = 0; b + 1 < n - a; b++)
          if (lst[b] > lst[b+1]) begin t = lst[b]; lst[b] = lst[b+1]; lst[b+1] = t; end
      exp_med = lst[n/2]; exp_case = 4;
    end
  endfunction

  // xorshift32 stimulus generator (seeded from $urandom once)
  logic [31:0] rs;
  function automatic logic [31:0] rnd();
    rs ^= rs << 13;
    rs ^= rs >> 17;
    rs ^= rs << 5;
    return rs;
  endfunction

  function automatic window_t mk(input pixel_t p0, p1, p2, p3, p4, p5, p6, p7, p8);
    window_t w;
    w[0] = p0; w[1] = p1; w[2] = p2; w[3] = p3; w[4] = p4;
    w[5] = p5; w[6] = p6; w[7] = p7; w[8] = p8;
    return w;
  endfunction

  // apply one window, check its result one clock later
  task automatic apply(input window_t w, input int want_med = -1);
    pixel_t em;
    int     ec;
    ref_model(w, em, ec);
    if (want_med >= 0 && em != pixel_t'(want_med)) begin
      failures++;
      $display("reference disagrees with worked example: %h vs %h", em, want_med);
    end
    @(negedge clk);
    in_valid = 1;
    window = w;
    @(posedge clk);
    #1;
    in_valid = 0;
    checks++;
    if (!out_valid || med != em || int'(fcase) != ec) begin
      failures++;
      $display("FAIL win=%h: got med=%h case=%0d valid=%0b, want %h case %0d",
               w, med, fcase, out_valid, em, ec);
    end
    case_hits[ec]++;
  endtask

  initial begin
    rst = 1; in_valid = 0; window = '0;
    rs = $urandom | 32'h1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (med != 8'h00 || out_valid) begin failures++; $display("FAIL reset value"); end
    @(negedge clk) rst = 0;

    // worked examples
    apply(mk(8'h1B, 8'h19, 8'h1D, 8'h0F, 8'hFF, 8'h37, 8'h1F, 8'h16, 8'h14), int'(8'h1B));
    apply(mk(0, 0, 0, 0, 0, 0, 0, 0, 0), int'(8'h00));
    apply(mk(8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF), int'(8'hFF));
    apply(mk(8'h1B, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h05, 8'h19, 8'h33), int'(8'h1B));
    apply(mk(0, 8'hFF, 0, 8'hFF, 8'hFF, 0, 0, 8'hFF, 0), int'(8'd113));

    // no new window: output holds, valid drops
    @(posedge clk); #1;
    checks++;
    if (out_valid || med != 8'd113) begin failures++; $display("FAIL hold"); end

    // random windows: noise density d/8 per pixel, centre often noisy
    for (int k = 0; k < 4000; k++) begin
      window_t w;
      int d;
      d = k % 9;
      for (int i = 0; i < 9; i++) begin
        if (int'(rnd() % 8) < d) w[i] = (rnd() % 2 == 1) ? 8'hFF : 8'h00;
        else                    w[i] = pixel_t'(1 + rnd() % 254);
      end
      if (k % 3 != 0) w[4] = (rnd() % 2 == 1) ? 8'hFF : 8'h00;
      if (k % 97 == 0) w = {9{w[4]}};
      apply(w);
    end

    for (int c = 0; c < 5; c++) begin
      checks++;
      if (case_hits[c] == 0) begin failures++; $display("FAIL decision %0d never taken", c); end
      else $display("decision %0d taken %0d times", c, case_hits[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
