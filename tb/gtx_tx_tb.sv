// gtx_tx_tb: self-checking test of the transmitter model.
//
// Checks the PLL lock delay (lock exactly LOCK_CYCLES+1 clocks after reset is
// released), an idle line (p=0, n=1) before lock, and then, for random bytes,
// that each byte written at clock edge k appears on the line after edge k+1,
// bit 0 first, one bit per UI_PS, with n the complement of p, i.e. eight bits
// in every 120 MHz period (960 Mbit/s).
`timescale 1ns/1ps
module gtx_tx_tb;
  localparam int unsigned UI_PS = 1041;
  localparam int unsigned LOCK_CYCLES = 16;

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] txdata;
  logic [1:0] txout;
  logic       pll_lock;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];

  gtx_tx #(.UI_PS(UI_PS), .LOCK_CYCLES(LOCK_CYCLES)) dut (
    .txusrclk(clk), .rst(rst), .txdata(txdata), .txout(txout), .pll_lock(pll_lock));

  always #4.167 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int cyc;
    rst = 1'b1; txdata = 8'h00;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #(2 * UI_PS * 1ps);
      check(txout == 2'b01, "idle line before lock");
      cyc++;
    end while (!pll_lock && cyc < 100);
    check(cyc == int'(LOCK_CYCLES) + 1, $sformatf("lock after %0d cycles", cyc));
    // stream random bytes; byte driven at edge k is serialized after edge k+1
    for (int k = 0; k < 500; k++) begin
      logic [7:0] b, exp;
      b = 8'($urandom);
      @(posedge clk);
      txdata <= b;
      sent.push_back(b);
      if (sent.size() > 1) begin
        exp = sent.pop_front();
        #((UI_PS / 2 + 1) * 1ps);
        for (int i = 0; i < 8; i++) begin
          check(txout == {exp[i], ~exp[i]}, $sformatf("bit %0d of %h", i, exp));
          if (i < 7) #(UI_PS * 1ps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
