// tb_ctrl: self-checking testbench of the frame timing generator.
//
// Keeps its own cycle count since reset release and checks every output on
// every cycle against the specified timing (counter k = cycle mod 1024):
// mclk high for k mod 4 in {0,1}, bclk high for k mod 16 >= 8, men on
// k mod 4 = 3, SCCnt = (k/4) mod 4, BitCnt = (k/16) mod 32, adclrc = daclrc
// = '1' for k >= 512, lrsel the inverse, ADC_en on k = 0 and k = 512. It
// also measures the periods of mclk (4), bclk (16) and adclrc (1024) between
// rising edges, and checks mclk = '1', bclk = '0' right after an adclrc edge.
module tb_ctrl;
  import snd_pkg::*;

  logic clk = 1'b0, rstn = 1'b1;
  logic mclk, bclk, adclrc, daclrc, lrsel, adc_en, men;
  logic [1:0] sccnt;
  logic [4:0] bitcnt;
  int checks = 0, failures = 0;

  ctrl dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int cyc = 0;
  int last_mclk = -1, last_bclk = -1, last_lrc = -1;
  logic mclk_q, bclk_q, lrc_q;
  int n_mclk = 0, n_bclk = 0, n_lrc = 0;

  initial begin
    #1 rstn = 1'b0;
    repeat (3) @(posedge clk);
    #1 rstn = 1'b1;
    // after release, cycle 0 is the current one
    for (cyc = 0; cyc < 3 * 1024 + 37; cyc++) begin
      int k;
      k = cyc % 1024;
      #5;  // mid cycle, outputs settled
      check(mclk   == ((k % 4) < 2),      "mclk");
      check(bclk   == ((k % 16) >= 8),    "bclk");
      check(men    == ((k % 4) == 3),     "men");
      check(sccnt  == 2'((k / 4) % 4),    "sccnt");
      check(bitcnt == 5'((k / 16) % 32),  "bitcnt");
      check(adclrc == (k >= 512),         "adclrc");
      check(daclrc == adclrc,             "daclrc");
      check(lrsel  == !adclrc,            "lrsel");
      check(adc_en == (k == 0 || k == 512), "adc_en");
      // period measurement on rising edges seen between samples
      if (cyc > 0) begin
        if (mclk && !mclk_q) begin
          if (last_mclk >= 0) begin check(cyc - last_mclk == 4, "mclk period"); n_mclk++; end
          last_mclk = cyc;
        end
        if (bclk && !bclk_q) begin
          if (last_bclk >= 0) begin check(cyc - last_bclk == 16, "bclk period"); n_bclk++; end
          last_bclk = cyc;
        end
        if (adclrc != lrc_q) begin
          check(mclk == 1'b1 && bclk == 1'b0, "mclk/bclk after lrc edge");
          if (adclrc) begin
            if (last_lrc >= 0) begin check(cyc - last_lrc == 1024, "adclrc period"); n_lrc++; end
            last_lrc = cyc;
          end
        end
      end
      mclk_q = mclk; bclk_q = bclk; lrc_q = adclrc;
      @(posedge clk);
    end
    check(n_mclk > 100 && n_bclk > 100 && n_lrc >= 2, "period measurements taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
