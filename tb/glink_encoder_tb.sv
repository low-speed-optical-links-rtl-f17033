// glink_encoder_tb: self-checking test of the G-Link frame encoder.
//
// Checks: fill frame out of reset and whenever DAV is low; an all-zero word
// right after reset encodes to 4FFFFF; every data frame decodes back to the
// word sent (true with C = 1011, inverted with C = 0100); the inversion choice
// matches a reference that tracks the line's running disparity from the
// frames actually seen; the disparity of the whole stream stays within +/-22;
// every frame has a transition between C[2] and C[1]; one-clock latency.
`timescale 1ns/1ps
module glink_encoder_tb;
  import glink_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  word_t  din;
  logic   dav;
  frame_t enc;

  int checks = 0, failures = 0;
  int n_inv = 0, n_true = 0, n_fill = 0;

  glink_encoder dut (.clk(clk), .rst(rst), .din(din), .dav(dav), .enc(enc));

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: enc=%h", what, $time, enc);
    end
  endtask

  function automatic int ones(input frame_t f);
    int n = 0;
    for (int i = 0; i < int'(FRAME_W); i++) n += int'(f[i]);
    return n;
  endfunction

  // reference running disparity of the frames seen on the output
  int rd_ref;

  task automatic drive_and_check(input word_t w, input bit v);
    int dt, di, exp_inv;
    din = w;
    dav = v;
    @(posedge clk);
    #1;
    check(enc[22] != enc[21], "mid-field transition");
    if (!v) begin
      check(enc == 24'hCFFC00, "fill frame when DAV low");
      n_fill++;
    end else begin
      dt = rd_ref + (2 * ones({4'b1011, w}) - 24);
      di = rd_ref + (2 * ones({4'b0100, ~w}) - 24);
      exp_inv = ((di < 0 ? -di : di) <= (dt < 0 ? -dt : dt)) ? 1 : 0;
      if (exp_inv != 0) begin
        check(enc == {4'b0100, ~w}, "inverted data frame");
        n_inv++;
      end else begin
        check(enc == {4'b1011, w}, "true data frame");
        n_true++;
      end
    end
    rd_ref += 2 * ones(enc) - 24;
    check(rd_ref <= 22 && rd_ref >= -22, "running disparity bounded");
  endtask

  initial begin
    rst = 1'b1; din = '0; dav = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(enc == FILL_FRAME, "fill frame in reset");
    rst = 1'b0;
    rd_ref = 0;
    // all-zero word from reset: 4FFFFF
    drive_and_check(20'h00000, 1'b1);
    check(enc == 24'h4FFFFF, "zero word from reset encodes to 4FFFFF");
    drive_and_check(20'h00000, 1'b1);
    drive_and_check(20'h55555, 1'b1);
    drive_and_check(20'hFFFFF, 1'b1);
    drive_and_check(20'hFFFFF, 1'b1);
    drive_and_check(20'h12345, 1'b0);
    // random words, DAV mostly high, with skewed densities
    for (int k = 0; k < 2000; k++) begin
      word_t w;
      w = 20'($urandom);
      if (k % 3 == 0) w = w | 20'($urandom);
      if (k % 5 == 0) w = w & 20'($urandom);
      drive_and_check(w, ($urandom % 4) != 0);
    end
    // latency: output changes on the clock after the input
    din = 20'h0F0F0; dav = 1'b1;
    #2;
    check(enc != {4'b1011, 20'h0F0F0} && enc != {4'b0100, 20'hF0F0F}, "no combinational path");
    check(n_inv > 0 && n_true > 0 && n_fill > 0, "all frame kinds seen");
    $display("frames: true=%0d inverted=%0d fill=%0d", n_true, n_inv, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
