// tb_channel_mod: self-checking testbench of one audio channel.
//
// The testbench runs its own frame counter k (0..1023) and derives men,
// SCCnt, BitCnt and sel (= '1' for k < 512, as for the left channel) from it.
// Acting as the codec it puts a random 16-bit sample on adcdat, MSB first,
// one bit per 16-cycle slot from k = 512, followed by 16 random filler bits
// that must not enter RXReg. It then expects that sample on the adc bus for
// the whole next bus half. On the bus side it pulses dac_en once at a random
// cycle with a random sample (the dac bus holds other values elsewhere) and
// expects that sample MSB first on dacdat in the next serial half, the MSB
// already on the first cycle of it, and dacdat = '0' while sel = '1'.
module tb_channel_mod;
  import snd_pkg::*;

  logic clk = 1'b0, rstn = 1'b1;
  logic men, sel, dac_en, adcdat, dacdat;
  logic [1:0] sccnt;
  logic [4:0] bitcnt;
  sample_t adc, dac;
  int checks = 0, failures = 0;

  channel_mod dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at k=%0d t=%0t", what, k, $time);
    end
  endtask

  logic [9:0] k = '0;
  logic       run = 1'b0;
  sample_t    rx_smp, rx_expect, tx_smp, tx_expect;
  logic [15:0] filler;
  int unsigned dac_at;
  int frames = 0;
  bit have_rx = 0, have_tx = 0;

  assign men    = (k[1:0] == 2'b11);
  assign sccnt  = k[3:2];
  assign bitcnt = k[8:4];
  assign sel    = ~k[9];
  assign dac_en = run && sel && (k[8:0] == dac_at[8:0]);
  assign dac    = dac_en ? tx_smp : sample_t'(~tx_smp);
  assign adcdat = (k[9] && k[8:4] < 16) ? rx_smp[15 - k[7:4]] : filler[k[7:4]];

  always @(posedge clk) if (run) begin
    k <= k + 1'b1;
    if (k == 10'd1023) begin
      rx_expect <= rx_smp;      // what was just sent must show up now
      have_rx   <= 1;
      rx_smp    <= sample_t'($urandom);
      filler    <= 16'($urandom);
      frames    <= frames + 1;
    end
    if (k == 10'd511) begin
      tx_expect <= tx_smp;
      have_tx   <= 1;
    end
    if (k == 10'd1023) begin
      tx_smp <= sample_t'($urandom);
      dac_at <= 1 + ($urandom % 500);
    end
  end

  int n_dac_bits = 0;
  always @(negedge clk) if (run) begin
    if (sel) begin
      check(dacdat == 1'b0, "dacdat low while on bus side");
      if (have_rx) check(adc == rx_expect, "adc sample");
    end else begin
      if (have_tx && k[8:0] == 0) check(dacdat == tx_expect[15], "MSB on first serial cycle");
      // bclk rises in the middle of a slot: that is where the codec samples
      if (have_tx && k[3:0] == 4'd8 && k[8:4] < 16) begin
        check(dacdat == tx_expect[15 - k[7:4]], "dacdat bit");
        n_dac_bits++;
      end
    end
  end

  initial begin
    rx_smp = sample_t'($urandom); tx_smp = sample_t'($urandom);
    filler = 16'($urandom); dac_at = 100;
    #1 rstn = 1'b0;
    repeat (3) @(posedge clk);
    #1 rstn = 1'b1;
    run = 1'b1;
    wait (frames == 12);
    check(n_dac_bits >= 16 * 10, "enough dac bits checked");
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
